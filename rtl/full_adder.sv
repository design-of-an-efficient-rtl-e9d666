// full_adder: the "F" cell of the carry-save array multiplier. For three
// input bits of equal weight it produces the partial-sum bit
//   ps = a ^ b ^ c
// and the save-carry bit (majority)
//   sc = (a & b) | (a & c) | (b & c),
// the carry having twice the weight of the sum. These are the textbook
// carry-save equations. Purely combinational.
module full_adder (
  input  logic a,   // input bit (partial product)
  input  logic b,   // input bit (sum from the previous row)
  input  logic c,   // input bit (carry from the previous row)
  output logic ps,  // partial sum
  output logic sc   // save carry, weight x2
);
  always_comb begin
    ps = a ^ b ^ c;
    sc = (a & b) | (a & c) | (b & c);
  end
endmodule
