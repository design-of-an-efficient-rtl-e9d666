// completion_detect: the completion detection unit of the PASTA adder.
// TERM is raised when the adder is in its iterative phase (SEL = 1) and
// every carry signal is zero, which is the termination condition of the
// recursion: C_n + C_{n-1} + ... + C_1 = 0. Gating with SEL keeps stale
// carries from a previous addition from signalling completion before the
// iterations have begun. Combinational: a W-input NOR ANDed with SEL.
// W is the number of carries watched; the adder passes its pending
// carry-in, C_1 .. C_n and C_{n+1}.
module completion_detect #(
  parameter int unsigned W = 10  // number of carry signals
) (
  input  logic         sel,      // SEL: iterative phase active
  input  logic [W-1:0] carries,  // every carry of the adder
  output logic         term      // TERM: all carries zero
);
  always_comb term = sel && (carries == '0);
endmodule
