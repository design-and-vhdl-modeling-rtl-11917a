// tb_loop_filter: drives random PFD codes and compares the output with a
// reference PI filter computed in the testbench (integer arithmetic with the
// same gains, scaling and saturation), including the reset value, long runs
// of full-scale codes that saturate the integrator, and the one-cycle latency
// of the registered output.
module tb_loop_filter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int IN_W = 5, OUT_W = 8, FRAC = 4, K1 = 16, K2 = 1, INIT = 5;
  localparam longint ACC_MAX = (64'sd1 <<< (OUT_W + FRAC - 1)) - 1;
  localparam longint ACC_MIN = -(64'sd1 <<< (OUT_W + FRAC - 1));
  localparam longint OUT_MAX = (64'sd1 <<< (OUT_W - 1)) - 1;
  localparam longint OUT_MIN = -(64'sd1 <<< (OUT_W - 1));

  logic clk = 0, rst;
  logic signed [IN_W-1:0]  e;
  logic signed [OUT_W-1:0] dout;
  int checks = 0, failures = 0, n_sat = 0;
  longint acc_m, y_m;

  loop_filter #(.IN_W(IN_W), .OUT_W(OUT_W), .FRAC(FRAC), .K1(K1), .K2(K2), .INIT(INIT)) dut (
    .clk(clk), .rst(rst), .e(e), .dout(dout)
  );

  always #2000 clk = !clk;

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input int ev);
    longint y;
    e = IN_W'(ev);
    @(posedge clk);
    acc_m = acc_m + ev * K2;
    if (acc_m > ACC_MAX) acc_m = ACC_MAX;
    if (acc_m < ACC_MIN) acc_m = ACC_MIN;
    y = (acc_m + ev * K1) >>> FRAC;
    if (y > OUT_MAX) begin y = OUT_MAX; n_sat++; end
    if (y < OUT_MIN) begin y = OUT_MIN; n_sat++; end
    y_m = y;
    #1;
    checks++;
    if (longint'(dout) != y_m) begin
      failures++;
      $display("FAIL e=%0d dout=%0d expected %0d", ev, dout, y_m);
    end
  endtask

  initial begin
    rst = 0; e = '0;
    #1 rst = 1;
    #100;
    checks++;
    if (int'(dout) != INIT) begin failures++; $display("FAIL reset value %0d", dout); end
    @(negedge clk); rst = 0;
    acc_m = INIT * (1 << FRAC);
    // a single code reaches the output after one clock edge
    e = 5'sd7;
    #10;
    checks++; if (int'(dout) != INIT) failures++;
    step(7);
    for (int i = 0; i < 300; i++) step($urandom_range(0, 30) - 15);
    for (int i = 0; i < 400; i++) step(15);
    for (int i = 0; i < 800; i++) step(-15);
    for (int i = 0; i < 300; i++) step((i % 2 == 0) ? 1 : -1);
    checks++; if (n_sat == 0) failures++;
    rst = 1; #10;
    checks++; if (int'(dout) != INIT) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
