// half_adder: the one-bit adder used in every bit position of the
// parallel self-timed adder (PASTA). It forms s = x xor y and c = x and y,
// which are the per-bit sum and carry of the PASTA recursion: in the load
// step x,y are the operand bits a_i,b_i; in every later step they are the
// fed-back sum S_i and the carry C_i arriving from the bit below.
// Purely combinational. Using half adders rather than full adders is the
// core of the PASTA scheme; the gate-level form is this design's own.
module half_adder (
  input  logic x,  // first input bit
  input  logic y,  // second input bit
  output logic s,  // sum     = x ^ y
  output logic c   // carry   = x & y
);
  always_comb begin
    s = x ^ y;
    c = x & y;
  end
endmodule
