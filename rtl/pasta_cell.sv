// pasta_cell: one bit position i of the parallel self-timed adder.
// Two 2:1 multiplexers steered by SEL choose what feeds the half adder:
//   SEL = 0 (initial phase):   the operand bits a_i and b_i
//   SEL = 1 (iterative phase): the cell's own sum S_i and the carry C_i
//                              coming from bit i-1
// The half-adder result is the cell state (C_{i+1}, S_i). In the
// asynchronous original the state settles around the feedback loop; here
// each iteration of the recursion
//   S_i^j = S_i^{j-1} ^ C_i^{j-1},   C_{i+1}^j = S_i^{j-1} & C_i^{j-1}
// is one clock step, taken on a rising clk edge while en is high, and the
// state is held in two flip-flops between steps. This clocked form is this
// design's own choice; the mux/half-adder structure follows the PASTA bit.
// Because the cell is built from a half adder, the state (C_{i+1},S_i) =
// (1,1) can never be reached; an assertion checks this.
// Reset (synchronous, active high) clears the state to (0,0).
module pasta_cell (
  input  logic clk,
  input  logic rst,    // synchronous reset, active high
  input  logic en,     // take one step at the next rising edge
  input  logic sel,    // SEL: 0 = load operands, 1 = iterate
  input  logic a,      // operand bit a_i
  input  logic b,      // operand bit b_i
  input  logic c_in,   // carry C_i from bit i-1
  output logic s,      // sum S_i (state)
  output logic c_out   // carry C_{i+1} (state)
);
  logic mux_x, mux_y;  // multiplexer outputs into the half adder
  logic ha_s, ha_c;

  always_comb begin
    mux_x = sel ? s    : a;
    mux_y = sel ? c_in : b;
  end

  half_adder u_ha (.x(mux_x), .y(mux_y), .s(ha_s), .c(ha_c));

  always_ff @(posedge clk) begin
    if (rst) begin
      s     <= 1'b0;
      c_out <= 1'b0;
    end else if (en) begin
      s     <= ha_s;
      c_out <= ha_c;
    end
  end

  // State (1,1) is unreachable for a half-adder cell.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (!(s && c_out))
        else $error("pasta_cell: illegal state (C,S) = (1,1)");
    end
  end
endmodule
