// tb_dco: sets control words and measures the output period, which must be
// DT * (2**(K+1) - DIN); also checks that a larger DIN means a higher frequency.
module tb_dco;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int K = 8;
  localparam realtime DT = 2.0;
  logic signed [K-1:0] din;
  logic clk;
  int checks = 0, failures = 0;
  realtime t0, t1;

  dco #(.K(K), .DT(DT)) dut (.din(din), .clk(clk));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int words[6] = '{0, 12, -128, 127, -5, 64};
    realtime prev_p;
    din = '0;
    foreach (words[i]) begin
      realtime p, expect_p;
      din = K'(words[i]);
      repeat (3) @(posedge clk);
      t0 = $realtime;
      repeat (10) @(posedge clk);
      t1 = $realtime;
      p = (t1 - t0) / 10.0;
      expect_p = DT * ((1 << (K + 1)) - words[i]);
      checks++;
      if (p < expect_p - 0.01 || p > expect_p + 0.01) begin
        failures++;
        $display("FAIL din=%0d period %f expected %f", words[i], p, expect_p);
      end
    end
    // 1 GHz at DIN = 12
    din = K'(12);
    repeat (3) @(posedge clk);
    t0 = $realtime;
    @(posedge clk);
    checks++;
    if ($realtime - t0 != 1000.0) begin failures++; $display("FAIL 1 GHz point"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
