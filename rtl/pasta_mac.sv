// pasta_mac: multiply-accumulate unit built on the parallel self-timed
// adder (PASTA). Each accepted operand pair is multiplied, the product is
// shown on final_out, and it is added to the running total acc:
//   final_out = Multiplier * Multiplicand
//   acc       = (acc + final_out) mod 2^(2N)
//
// Structure. A pasta_multiplier (carry-save array + PASTA final adder)
// forms the product; a second, 2N-bit pasta_adder adds it to acc. The
// accumulator register, 2N bits wide, and the port names follow the
// document's 8-bit multiply-accumulate unit; the operand handshake, the
// use of a PASTA adder for accumulation and the sequencing are this
// design's own.
//
// Timing. All state changes on the rising edge of clock; rst is a
// synchronous, active-high reset that clears acc and final_out. A pair is
// taken when in_valid and in_ready are both high. The multiplier needs
// 1 + k1 cycles, then the accumulation adder starts in the same cycle the
// product appears and needs 1 + k2 cycles (k1, k2 = PASTA iterations,
// data dependent). out_valid is high for one cycle when acc holds the new
// total; in_ready is high again in that cycle.
//
// The adders' iteration counts and the carry out of the accumulation
// adder are not used here (acc wraps by design); lint reports them as
// unused signals.
module pasta_mac #(
  parameter int unsigned N = 8   // operand width; product and acc are 2N
) (
  input  logic           clock,
  input  logic           rst,           // synchronous reset, active high
  input  logic           in_valid,      // operand pair offered
  output logic           in_ready,      // unit idle, pair accepted
  input  logic [N-1:0]   Multiplier,
  input  logic [N-1:0]   Multiplicand,
  output logic [2*N-1:0] final_out,     // last product
  output logic [2*N-1:0] acc,           // running sum of products
  output logic           out_valid      // acc just updated (one cycle)
);
  typedef enum logic [1:0] {
    IDLE,       // waiting for an operand pair
    MULTIPLY,   // pasta_multiplier iterating
    ACCUMULATE  // accumulation pasta_adder iterating
  } state_e;

  state_e        state;
  logic          mul_start, mul_ready, mul_done;
  logic [2*N-1:0] product;
  logic          acc_start, acc_busy, acc_term;
  logic [2*N:0]  acc_sum;
  logic [pasta_pkg::iter_width(N)-1:0]   mul_iter;   // not used here
  logic [pasta_pkg::iter_width(2*N)-1:0] acc_iter;   // not used here

  always_comb begin
    in_ready  = (state == IDLE);
    mul_start = in_ready && in_valid;
    acc_start = (state == MULTIPLY) && mul_done;
  end

  pasta_multiplier #(.N(N)) u_mul (
    .clk(clock), .rst(rst),
    .start(mul_start), .x(Multiplicand), .y(Multiplier),
    .ready(mul_ready), .done(mul_done), .product(product),
    .iterations(mul_iter)
  );

  pasta_adder #(.N(2*N)) u_acc_add (
    .clk(clock), .rst(rst),
    .start(acc_start), .a(acc), .b(product), .cin(1'b0),
    .busy(acc_busy), .term(acc_term), .sum(acc_sum), .iterations(acc_iter)
  );

  always_ff @(posedge clock) begin
    if (rst) begin
      state     <= IDLE;
      acc       <= '0;
      final_out <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        IDLE:       if (mul_start) state <= MULTIPLY;
        MULTIPLY:   if (mul_done) begin
                      final_out <= product;
                      state     <= ACCUMULATE;
                    end
        ACCUMULATE: if (acc_term) begin
                      acc       <= acc_sum[2*N-1:0];
                      out_valid <= 1'b1;
                      state     <= IDLE;
                    end
        default:    state <= IDLE;
      endcase
    end
  end

  // Handshake rules between the controller and the two PASTA units.
  always_ff @(posedge clock) begin
    if (!rst) begin
      if (mul_start) assert (mul_ready) else $error("pasta_mac: multiplier busy at start");
      if (acc_start) assert (!acc_busy) else $error("pasta_mac: adder busy at start");
    end
  end
endmodule
