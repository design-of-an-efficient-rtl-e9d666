// pasta_adder: N-bit parallel self-timed adder (PASTA), computing
// sum = a + b + cin as an (N+1)-bit result.
//
// How it works. N+1 pasta_cell bit slices (bits 0..N) share one SEL line.
// On a request the cells load S_i = a_i ^ b_i, C_{i+1} = a_i & b_i (SEL=0;
// the top slice, bit N, loads zeros and its sum is the carry out). Then
// SEL goes to 1 and every slice repeats a half addition of its own sum
// with the carry from the slice below, all bits in parallel, until the
// completion detection unit sees that every carry is zero and raises TERM.
// The number of iterations equals the length of the longest carry run and
// is at most N+1 (0 when no bit generates a carry).
//
// Timing. Each iteration takes one clk cycle; the asynchronous loop of the
// original is emulated with one clock step per iteration, which is this
// design's own choice. start is sampled while busy is low; the edge that
// samples it loads the slices. With k iterations needed, term is high in
// the cycle after the k-th edge following that load edge (k = 0: the cycle
// right after the load edge), for exactly one cycle. sum is valid while
// term is high and is held until the next start. iterations reports k.
//
// Carry in. The bit-0 slice takes cin as its incoming carry C_0 in the
// first iteration only, and 0 afterwards, so cin is added exactly once;
// the pending cin is watched by the completion detector too. This use of
// cin is this design's own reading of the bit-0 slice.
module pasta_adder #(
  parameter int unsigned N  = 8,                // operand width
  localparam int unsigned IW = pasta_pkg::iter_width(N)  // iteration count width
) (
  input  logic          clk,
  input  logic          rst,         // synchronous reset, active high
  input  logic          start,       // request: load a, b, cin (when !busy)
  input  logic [N-1:0]  a,
  input  logic [N-1:0]  b,
  input  logic          cin,
  output logic          busy,        // SEL: iterative phase in progress
  output logic          term,        // TERM: result ready (one cycle)
  output logic [N:0]    sum,         // S_N..S_0; S_N is the carry out
  output logic [IW-1:0] iterations   // iterations used by this addition
);
  logic          sel_q;      // SEL
  logic          cin_q;      // carry into bit 0, consumed by iteration 1
  logic          en;         // advance all slices this cycle
  logic          load;
  logic [N:0]    s;          // S_i
  logic [N:0]    c;          // c[i] = C_{i+1}
  logic [N:0]    c_low;      // c_low[i] = C_i, carry into slice i
  logic [N:0]    op_a, op_b; // operand bits per slice (slice N gets 0)

  always_comb begin
    load  = start && !sel_q;
    en    = load || (sel_q && !term);
    op_a  = {1'b0, a};
    op_b  = {1'b0, b};
    c_low = {c[N-1:0], cin_q};
  end

  for (genvar i = 0; i <= N; i++) begin : g_bit
    pasta_cell u_cell (
      .clk  (clk),
      .rst  (rst),
      .en   (en),
      .sel  (sel_q),
      .a    (op_a[i]),
      .b    (op_b[i]),
      .c_in (c_low[i]),
      .s    (s[i]),
      .c_out(c[i])
    );
  end

  completion_detect #(.W(N + 2)) u_cdu (
    .sel    (sel_q),
    .carries({c, cin_q}),
    .term   (term)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      sel_q      <= 1'b0;
      cin_q      <= 1'b0;
      iterations <= '0;
    end else if (load) begin
      sel_q      <= 1'b1;
      cin_q      <= cin;
      iterations <= '0;
    end else if (sel_q) begin
      if (term) begin
        sel_q <= 1'b0;
      end else begin
        cin_q      <= 1'b0;
        iterations <= iterations + 1'b1;
      end
    end
  end

  // The recursion terminates within N+1 iterations.
  always_ff @(posedge clk) begin
    if (!rst && sel_q) begin
      assert (int'(iterations) <= N + 1)
        else $error("pasta_adder: recursion did not terminate");
    end
  end

  always_comb begin
    busy = sel_q;
    sum  = s;
  end
endmodule
