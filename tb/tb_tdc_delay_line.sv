// tb_tdc_delay_line: sends a pulse into the delay line and checks that every
// tap rises i*TAU after the input rises and falls i*TAU after it falls.
module tb_tdc_delay_line;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int TAPS = 14;
  localparam realtime TAU = 20.0;
  logic din;
  logic [TAPS-1:0] taps;
  int checks = 0, failures = 0;

  tdc_delay_line #(.TAPS(TAPS), .TAU(TAU)) dut (.din(din), .taps(taps));

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 0;
    #1000;
    checks++; if (taps != '0) failures++;
    din = 1;
    for (int k = 0; k <= TAPS; k++) begin
      // half a step after k*TAU: taps 0..k-1 high
      #((k == 0) ? TAU / 2 : TAU);
      checks++;
      if (taps != TAPS'((1 << k) - 1) && !(k == TAPS && taps == '1)) begin
        failures++;
        $display("FAIL rise step %0d taps=%b", k, taps);
      end
    end
    #(TAU * 5);
    din = 0;
    #(TAU / 2);
    for (int k = 1; k <= TAPS; k++) begin
      #(TAU);
      checks++;
      if (taps != ~TAPS'((1 << k) - 1)) begin
        failures++;
        $display("FAIL fall step %0d taps=%b", k, taps);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
