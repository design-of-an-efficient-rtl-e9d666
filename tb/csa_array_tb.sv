// csa_array_tb: exhaustive check of the 8 x 8 carry-save array. For every
// operand pair the low product bits must equal the low half of x*y, the
// sum and carry vectors must add up to the high half, and the top bit of
// the sum vector must be zero.
module csa_array_tb;
  localparam int unsigned N = 8;
  logic [N-1:0] x, y, p_low, sum_vec, carry_vec;
  int checks = 0, failures = 0;

  csa_array #(.N(N)) dut (.x(x), .y(y), .p_low(p_low), .sum_vec(sum_vec),
                          .carry_vec(carry_vec));

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned p;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        x = N'(i);
        y = N'(j);
        #1;
        p = i * j;
        checks++;
        if (p_low !== N'(p) || (int'(sum_vec) + int'(carry_vec)) != int'(p >> N) ||
            sum_vec[N-1] !== 1'b0) begin
          failures++;
          if (failures < 20)
            $display("FAIL %0d*%0d: low=%0d sum=%0d carry=%0d", i, j, p_low, sum_vec, carry_vec);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
