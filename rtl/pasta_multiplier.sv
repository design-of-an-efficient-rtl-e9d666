// pasta_multiplier: N x N unsigned multiplier whose final carry-propagate
// addition is done by the parallel self-timed adder.
//
// The carry-save array (csa_array) forms all partial products and reduces
// them to the low product bits plus a sum vector and a carry vector. Where
// a conventional array multiplier ends in a ripple-carry row, this one
// hands the two vectors to an N-bit pasta_adder, which adds them by
// parallel half-addition iterations and reports completion on TERM.
//
// Interface and timing. start is sampled when ready is high; x and y need
// only be valid in that cycle (the low bits are registered, the adder
// loads its operands). done is high for one cycle, in the cycle after the
// k-th edge following the start edge (k = PASTA iterations, 0..N), and
// product is valid from then until the next start. Which adder ends the multiplier follows the
// document; the registers around it are this design's own.
module pasta_multiplier #(
  parameter int unsigned N = 8   // operand width
) (
  input  logic           clk,
  input  logic           rst,       // synchronous reset, active high
  input  logic           start,     // begin a multiplication
  input  logic [N-1:0]   x,         // multiplicand
  input  logic [N-1:0]   y,         // multiplier
  output logic           ready,     // may start
  output logic           done,      // product valid (one cycle)
  output logic [2*N-1:0] product,
  output logic [pasta_pkg::iter_width(N)-1:0] iterations  // PASTA iterations used
);
  logic [N-1:0] p_low, sum_vec, carry_vec;
  logic [N-1:0] p_low_q;
  logic [N:0]   hi_sum;
  logic         busy;

  csa_array #(.N(N)) u_array (
    .x(x), .y(y), .p_low(p_low), .sum_vec(sum_vec), .carry_vec(carry_vec)
  );

  pasta_adder #(.N(N)) u_cpa (
    .clk(clk), .rst(rst),
    .start(start), .a(sum_vec), .b(carry_vec), .cin(1'b0),
    .busy(busy), .term(done), .sum(hi_sum), .iterations(iterations)
  );

  always_ff @(posedge clk) begin
    if (rst)                p_low_q <= '0;
    else if (start && ready) p_low_q <= p_low;
  end

  always_comb begin
    ready   = !busy;
    product = {hi_sum[N-1:0], p_low_q};
  end

  // The high half of a product never overflows N bits.
  always_ff @(posedge clk) begin
    if (!rst && done) begin
      assert (!hi_sum[N]) else $error("pasta_multiplier: final adder overflow");
    end
  end
endmodule
