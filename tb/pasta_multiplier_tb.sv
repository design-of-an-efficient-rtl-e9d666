// pasta_multiplier_tb: every 8 x 8 operand pair is multiplied and checked
// against x*y. The done pulse must come k cycles after the first edge
// following start, where k is the PASTA iteration count for the sum and
// carry vectors of the carry-save array (integer model). The operands are
// changed right after start to show they are needed only in that cycle.
module pasta_multiplier_tb;
  import pasta_ref_pkg::*;
  localparam int unsigned N = 8;

  logic           clk = 1'b0, rst, start, ready, done;
  logic [N-1:0]   x, y;
  logic [2*N-1:0] product;
  logic [$clog2(N+2)-1:0] iterations;
  int checks = 0, failures = 0;
  int max_k = 0;

  always #5 clk = ~clk;

  pasta_multiplier #(.N(N)) dut (.clk(clk), .rst(rst), .start(start), .x(x), .y(y),
                                 .ready(ready), .done(done), .product(product),
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

  initial begin
    longint unsigned sv, cv;
    int k, cyc;
    rst = 1'b1; start = 1'b0; x = '0; y = '0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        csa_vectors(longint'(i), longint'(j), N, sv, cv);
        k = pasta_iters(sv, cv, 1'b0, N);
        if (k > max_k) max_k = k;
        check("ready before start", ready);
        start = 1'b1; x = N'(i); y = N'(j);
        @(negedge clk);
        start = 1'b0; x = N'($urandom); y = N'($urandom);
        cyc = 0;
        while (!done && cyc <= int'(N) + 4) begin
          @(negedge clk);
          cyc++;
        end
        check($sformatf("%0d*%0d = %0d", i, j, product), done && product == (2*N)'(i * j));
        check($sformatf("%0d*%0d latency %0d expected %0d", i, j, cyc, k), cyc == k);
        @(negedge clk);
      end
    end
    $display("longest final-adder iteration run: %0d", max_k);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
