// tb_tdc_encoder: loads thermometer codes while MODE is high, closes the
// register with MODE falling, then changes the taps and checks that the held
// count is kept; also checks bubble codes (ones count) and the reset.
module tb_tdc_encoder;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 4;
  localparam int TAPS = (1 << N) - 2;
  logic rst, mode;
  logic [TAPS-1:0] taps;
  logic [N-1:0] dout;
  int checks = 0, failures = 0;

  tdc_encoder #(.N(N)) dut (.rst(rst), .mode(mode), .taps(taps), .dout(dout));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; mode = 0; taps = '1;
    #10;
    checks++; if (dout != 0) failures++;
    rst = 0;
    #10;
    checks++; if (dout != 0) begin failures++; $display("FAIL closed register changed"); end
    for (int k = 0; k <= TAPS; k++) begin
      mode = 1;
      taps = TAPS'((1 << k) - 1);
      #10;
      checks++;
      if (int'(dout) != k) begin failures++; $display("FAIL transparent k=%0d dout=%0d", k, dout); end
      mode = 0;
      #10;
      taps = '1;
      #10;
      taps = '0;
      #10;
      checks++;
      if (int'(dout) != k) begin failures++; $display("FAIL hold k=%0d dout=%0d", k, dout); end
    end
    // a bubble in the code costs one LSB at most
    mode = 1; taps = 14'b00_0001_1101_1111; #10 mode = 0; #10;
    checks++; if (dout != 4'd8) begin failures++; $display("FAIL bubble dout=%0d", dout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
