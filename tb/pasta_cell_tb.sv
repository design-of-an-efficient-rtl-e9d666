// pasta_cell_tb: drives one PASTA bit slice with random enable, SEL,
// operand and carry-in values and compares its (C_{i+1}, S_i) state after
// every clock edge with a model of the two multiplexers and the half
// adder: SEL=0 adds a and b, SEL=1 adds the held sum and c_in; without
// enable the state holds. Also checks that reset clears the state and that
// the state (1,1) is never seen. A directed part walks the two state
// tables of a PASTA bit, written as (C_{i+1} S_i):
//   initial phase, input a_i b_i:  00 -> 00, 01 -> 01, 10 -> 01, 11 -> 10
//   iterative phase, input c_i, from state
//     00: c=0 -> 00, c=1 -> 01     01: c=0 -> 01, c=1 -> 10
//     10: c=0 -> 00, c=1 -> 01
module pasta_cell_tb;
  logic clk = 1'b0, rst, en, sel, a, b, c_in, s, c_out;
  logic ref_s, ref_c;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  pasta_cell dut (.clk(clk), .rst(rst), .en(en), .sel(sel), .a(a), .b(b),
                  .c_in(c_in), .s(s), .c_out(c_out));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic x, y;
    rst = 1'b1; en = 1'b0; sel = 1'b0; a = 1'b0; b = 1'b0; c_in = 1'b0;
    @(negedge clk);
    @(negedge clk);
    checks++;
    if ({c_out, s} !== 2'b00) begin
      failures++;
      $display("FAIL reset state %b%b", c_out, s);
    end
    rst = 1'b0;
    // directed: every transition of the two state tables
    for (int ab = 0; ab < 4; ab++) begin
      for (int cin = 0; cin < 2; cin++) begin
        logic [1:0] st0, exp1, exp2;
        // initial phase: load a_i b_i
        en = 1'b1; sel = 1'b0; {a, b} = 2'(ab); c_in = 1'($urandom);
        @(negedge clk);
        st0  = {c_out, s};
        exp1 = (ab == 0) ? 2'b00 : (ab == 3) ? 2'b10 : 2'b01;
        checks++;
        if (st0 !== exp1) begin
          failures++;
          $display("FAIL initial phase ab=%02b: state %b expected %b", 2'(ab), st0, exp1);
        end
        // iterative phase: one step with carry c_i
        sel = 1'b1; c_in = 1'(cin); {a, b} = 2'($urandom);
        @(negedge clk);
        case (st0)
          2'b00:   exp2 = cin ? 2'b01 : 2'b00;
          2'b01:   exp2 = cin ? 2'b10 : 2'b01;
          default: exp2 = cin ? 2'b01 : 2'b00;
        endcase
        checks++;
        if ({c_out, s} !== exp2) begin
          failures++;
          $display("FAIL iterative phase from %b, c=%0d: state %b expected %b",
                   st0, cin, {c_out, s}, exp2);
        end
      end
    end
    en = 1'b0;
    @(negedge clk);
    ref_s = s;
    ref_c = c_out;
    for (int t = 0; t < 5000; t++) begin
      en   = ($urandom % 4) != 0;
      sel  = 1'($urandom);
      a    = 1'($urandom);
      b    = 1'($urandom);
      c_in = 1'($urandom);
      x = sel ? ref_s : a;
      y = sel ? c_in  : b;
      if (en) begin
        ref_s = x ^ y;
        ref_c = x & y;
      end
      @(negedge clk);
      checks++;
      if ({c_out, s} !== {ref_c, ref_s} || (c_out && s)) begin
        failures++;
        $display("FAIL t=%0d en=%b sel=%b a=%b b=%b cin=%b: state %b%b expected %b%b",
                 t, en, sel, a, b, c_in, c_out, s, ref_c, ref_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
