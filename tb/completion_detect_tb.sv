// completion_detect_tb: TERM must be high exactly when SEL is high and no
// carry is set. Checks every single-carry pattern, the all-zero pattern
// and random patterns, with SEL both low and high.
module completion_detect_tb;
  localparam int unsigned W = 10;
  logic         sel, term;
  logic [W-1:0] carries;
  int checks = 0, failures = 0;

  completion_detect #(.W(W)) dut (.sel(sel), .carries(carries), .term(term));

  task automatic check_one(logic s, logic [W-1:0] cv);
    logic exp;
    sel = s;
    carries = cv;
    #1;
    exp = s && (cv == '0);
    checks++;
    if (term !== exp) begin
      failures++;
      $display("FAIL sel=%b carries=%b term=%b expected %b", s, cv, term, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      check_one(1'(s), '0);
      for (int i = 0; i < int'(W); i++) check_one(1'(s), W'(1) << i);
      for (int r = 0; r < 200; r++) check_one(1'(s), W'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
