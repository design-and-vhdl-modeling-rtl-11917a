// tb_tdc: applies MODE pulses of random width and checks
// Dout = min(floor(width / TAU), 2**N - 2), computed in the testbench.
module tb_tdc;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 4;
  localparam realtime TAU = 20.0;
  logic rst, mode;
  logic [N-1:0] dout;
  int checks = 0, failures = 0, saturated = 0;

  tdc #(.N(N), .TAU(TAU)) dut (.rst(rst), .mode(mode), .dout(dout));

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; mode = 0;
    #1 rst = 1;
    #100 rst = 0;
    #100;
    checks++; if (dout != 0) failures++;
    for (int i = 0; i < 300; i++) begin
      int w, e;
      w = $urandom_range(1, 400);
      if (w % 20 == 0) w++;            // keep away from exact tap boundaries
      mode = 1;
      #(w);
      mode = 0;
      #1;
      e = w / 20;
      if (e > (1 << N) - 2) begin e = (1 << N) - 2; saturated++; end
      checks++;
      if (int'(dout) != e) begin
        failures++;
        $display("FAIL width %0d dout=%0d expected %0d", w, dout, e);
      end
      #600;
      checks++;
      if (int'(dout) != e) begin failures++; $display("FAIL dout not held"); end
    end
    checks++; if (saturated == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
