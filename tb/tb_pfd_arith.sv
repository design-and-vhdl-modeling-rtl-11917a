// tb_pfd_arith: exhaustive check of ERROR = SIGN * (Dout + 1) for every TDC
// code and both signs, against integer arithmetic done in the testbench.
module tb_pfd_arith;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 4;
  logic              sign;
  logic [N-1:0]      dout;
  logic signed [N:0] error;
  int checks = 0, failures = 0;

  pfd_arith #(.N(N)) dut (.sign(sign), .dout(dout), .error(error));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_v;
    for (int s = 0; s < 2; s++) begin
      for (int d = 0; d <= (1 << N) - 2; d++) begin
        sign = 1'(s);
        dout = N'(d);
        #10;
        exp_v = (s == 1) ? (d + 1) : -(d + 1);
        checks++;
        if (int'(error) != exp_v) begin
          failures++;
          $display("FAIL sign=%0d dout=%0d error=%0d expected %0d", s, d, error, exp_v);
        end
      end
    end
    // full-scale codes of the published configuration
    sign = 1'b1; dout = N'(14); #10;
    checks++; if (int'(error) != 15) failures++;
    sign = 1'b0; #10;
    checks++; if (int'(error) != -15) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
