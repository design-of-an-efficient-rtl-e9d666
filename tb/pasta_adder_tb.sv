// pasta_adder_tb: checks the 8-bit parallel self-timed adder on every
// operand pair with carry-in 0 and on random pairs with carry-in 1.
// For each addition it checks
//   - the (N+1)-bit sum against a + b + cin,
//   - the latency: TERM rises k cycles after the first edge that follows
//     the request, k being the iteration count of the recursion computed
//     by an integer model, and k <= N+1,
//   - the iterations output against k, and that TERM lasts one cycle.
// Operand inputs are scrambled after the request, so the adder must not
// depend on them during the iterations. Reset in mid-addition is checked.
module pasta_adder_tb;
  import pasta_ref_pkg::*;
  localparam int unsigned N  = 8;
  localparam int unsigned IW = $clog2(N + 2);

  logic          clk = 1'b0, rst, start, cin, busy, term;
  logic [N-1:0]  a, b;
  logic [N:0]    sum;
  logic [IW-1:0] iterations;
  int checks = 0, failures = 0;
  int seen_k [N + 2];

  always #5 clk = ~clk;

  pasta_adder #(.N(N)) dut (.clk(clk), .rst(rst), .start(start), .a(a), .b(b),
                            .cin(cin), .busy(busy), .term(term), .sum(sum),
                            .iterations(iterations));

  initial begin : watchdog
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic add(logic [N-1:0] av, logic [N-1:0] bv, logic cv);
    int k, cyc;
    k = pasta_iters(64'(av), 64'(bv), cv, N);
    start = 1'b1; a = av; b = bv; cin = cv;
    @(negedge clk);
    start = 1'b0; a = N'($urandom); b = N'($urandom); cin = 1'($urandom);
    cyc = 0;
    while (!term && cyc <= int'(N) + 4) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("%0d+%0d+%0d: sum %0d", av, bv, cv, sum),
          term && sum == (N + 1)'(int'(av) + int'(bv) + int'(cv)));
    check($sformatf("%0d+%0d+%0d: latency %0d expected %0d", av, bv, cv, cyc, k),
          cyc == k && k <= int'(N) + 1);
    check($sformatf("%0d+%0d+%0d: iterations %0d expected %0d", av, bv, cv, iterations, k),
          int'(iterations) == k);
    if (k <= int'(N) + 1) seen_k[k]++;
    @(negedge clk);
    check("TERM lasts one cycle", !term && !busy);
  endtask

  initial begin
    rst = 1'b1; start = 1'b0; a = '0; b = '0; cin = 1'b0;
    repeat (2) @(negedge clk);
    check("idle after reset", !busy && !term);
    rst = 1'b0;
    // every pair, carry-in 0
    for (int x = 0; x < (1 << N); x++)
      for (int y = 0; y < (1 << N); y++)
        add(N'(x), N'(y), 1'b0);
    // carry-in 1, corners and random
    add('1, '0, 1'b1);
    add('1, '1, 1'b1);
    add('0, '0, 1'b1);
    for (int r = 0; r < 5000; r++) add(N'($urandom), N'($urandom), 1'b1);
    // reset during an iteration
    start = 1'b1; a = '1; b = 8'd1; cin = 1'b0;
    @(negedge clk);
    start = 1'b0;
    @(negedge clk);
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    check("reset aborts iteration", !busy && !term && sum == '0);
    add(8'd200, 8'd100, 1'b0);
    for (int k = 0; k <= int'(N) + 1; k++) begin
      $display("iterations=%0d seen %0d times", k, seen_k[k]);
      check($sformatf("iteration count %0d exercised", k), seen_k[k] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
