// pasta_mac_tb: end-to-end test of the multiply-accumulate unit at its
// default size (8 x 8 operands, 16-bit product and accumulator).
//  1. Runs the example sequence 25*42, 15*15, 20*20, 20*20, 32*32 and
//     checks the products 1050, 225, 400, 400, 1024 and the running totals
//     1050, 1275, 1675, 2075, 3099.
//  2. Runs random operand pairs (with zeros and large values mixed in)
//     against an integer model of acc = (acc + x*y) mod 2^16.
//  3. Checks the latency of every operation: out_valid comes
//     k1 + k2 + 3 clock edges after the pair is offered, k1 and k2 being
//     the PASTA iteration counts of the multiplier's final adder and of the
//     accumulation adder (integer models).
//  4. Keeps in_valid high with other data while the unit is busy, which
//     must not be taken, and resets the unit in mid-operation.
// Each mechanism (carry-free and iterating additions in both adders,
// accumulator wrap-around, back-pressure, reset) is counted and must occur.
module pasta_mac_tb;
  import pasta_ref_pkg::*;
  localparam int unsigned N = 8;

  logic           clock = 1'b0, rst, in_valid, in_ready, out_valid;
  logic [N-1:0]   Multiplier, Multiplicand;
  logic [2*N-1:0] final_out, acc;
  int checks = 0, failures = 0;
  longint unsigned model_acc = 0;
  int n_mul_k0 = 0, n_mul_iter = 0, n_acc_k0 = 0, n_acc_iter = 0;
  int n_wrap = 0, n_backpressure = 0, n_reset = 0;

  // example sequence: multiplier, multiplicand, product, running total
  localparam int unsigned FIG_A [5] = '{25, 15, 20, 20, 32};
  localparam int unsigned FIG_B [5] = '{42, 15, 20, 20, 32};
  localparam int unsigned FIG_P [5] = '{1050, 225, 400, 400, 1024};
  localparam int unsigned FIG_S [5] = '{1050, 1275, 1675, 2075, 3099};

  always #5 clock = ~clock;

  pasta_mac dut (.clock(clock), .rst(rst), .in_valid(in_valid), .in_ready(in_ready),
                 .Multiplier(Multiplier), .Multiplicand(Multiplicand),
                 .final_out(final_out), .acc(acc), .out_valid(out_valid));

  initial begin : watchdog
    repeat (500_000) @(posedge clock);
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

  // One multiply-accumulate. Called at a negedge with the unit idle.
  task automatic mac(logic [N-1:0] mplier, logic [N-1:0] mcand);
    longint unsigned sv, cv, prod;
    int k1, k2, cyc;
    prod = longint'(mplier) * longint'(mcand);
    csa_vectors(longint'(mcand), longint'(mplier), N, sv, cv);
    k1 = pasta_iters(sv, cv, 1'b0, N);
    k2 = pasta_iters(model_acc, prod, 1'b0, 2 * N);
    if (k1 == 0) n_mul_k0++; else n_mul_iter++;
    if (k2 == 0) n_acc_k0++; else n_acc_iter++;
    if (model_acc + prod >= (64'd1 << (2 * N))) n_wrap++;
    check("idle before operation", in_ready);
    in_valid = 1'b1; Multiplier = mplier; Multiplicand = mcand;
    @(negedge clock);
    // keep offering other data while busy: it must not be taken
    Multiplier = N'($urandom); Multiplicand = N'($urandom);
    cyc = 1;
    while (!out_valid && cyc < 50) begin
      if (in_valid && !in_ready) n_backpressure++;
      @(negedge clock);
      cyc++;
    end
    in_valid = 1'b0;
    model_acc = (model_acc + prod) & ((64'd1 << (2 * N)) - 1);
    check($sformatf("%0d*%0d final_out=%0d", mplier, mcand, final_out),
          out_valid && final_out == (2*N)'(prod));
    check($sformatf("%0d*%0d acc=%0d expected %0d", mplier, mcand, acc, model_acc),
          acc == (2*N)'(model_acc));
    check($sformatf("%0d*%0d latency %0d expected %0d", mplier, mcand, cyc, k1 + k2 + 3),
          cyc == k1 + k2 + 3);
  endtask

  initial begin
    rst = 1'b1; in_valid = 1'b0; Multiplier = '0; Multiplicand = '0;
    repeat (2) @(negedge clock);
    rst = 1'b0;
    check("reset clears acc and final_out", acc == '0 && final_out == '0 && in_ready);

    // 1. example sequence
    for (int i = 0; i < 5; i++) begin
      mac(N'(FIG_A[i]), N'(FIG_B[i]));
      check($sformatf("example %0d: final_out=%0d acc=%0d", i, final_out, acc),
            final_out == 16'(FIG_P[i]) && acc == 16'(FIG_S[i]));
    end

    // 2. random pairs, with zero and all-ones operands mixed in
    for (int r = 0; r < 3000; r++) begin
      logic [N-1:0] x, y;
      x = N'($urandom);
      y = N'($urandom);
      case ($urandom % 8)
        0: x = '0;
        1: y = '0;
        2: begin x = '1; y = '1; end
        default: ;
      endcase
      mac(x, y);
    end

    // 4. reset in the middle of an operation
    in_valid = 1'b1; Multiplier = 8'd255; Multiplicand = 8'd255;
    @(negedge clock);
    in_valid = 1'b0;
    @(negedge clock);
    rst = 1'b1;
    @(negedge clock);
    rst = 1'b0;
    n_reset++;
    model_acc = 0;
    check("reset mid-operation", acc == '0 && final_out == '0 && in_ready && !out_valid);
    mac(8'd3, 8'd7);

    $display("mul carry-free=%0d mul iterating=%0d acc carry-free=%0d acc iterating=%0d",
             n_mul_k0, n_mul_iter, n_acc_k0, n_acc_iter);
    $display("acc wrap=%0d back-pressure cycles=%0d resets=%0d",
             n_wrap, n_backpressure, n_reset);
    check("carry-free multiply seen",     n_mul_k0 > 0);
    check("iterating multiply seen",      n_mul_iter > 0);
    check("carry-free accumulation seen", n_acc_k0 > 0);
    check("iterating accumulation seen",  n_acc_iter > 0);
    check("accumulator wrap seen",        n_wrap > 0);
    check("back-pressure seen",           n_backpressure > 0);
    check("reset seen",                   n_reset > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
