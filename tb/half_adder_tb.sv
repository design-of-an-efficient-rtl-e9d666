// half_adder_tb: exhaustive check of the half adder against integer
// addition: {c, s} must equal x + y for all four input pairs.
module half_adder_tb;
  logic x, y, s, c;
  int checks = 0, failures = 0;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {x, y} = 2'(v);
      #1;
      checks++;
      if ({c, s} !== 2'(int'(x) + int'(y))) begin
        failures++;
        $display("FAIL x=%b y=%b -> c=%b s=%b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
