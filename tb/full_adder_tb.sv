// full_adder_tb: exhaustive check of the carry-save cell against integer
// addition: {sc, ps} must equal a + b + c for all eight input triples.
module full_adder_tb;
  logic a, b, c, ps, sc;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .ps(ps), .sc(sc));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({sc, ps} !== 2'(int'(a) + int'(b) + int'(c))) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> sc=%b ps=%b", a, b, c, sc, ps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
