// tb_bbpfd: drives the bang-bang detector with rising edges of ref and div at
// known offsets and checks SIGN, the width of the MODE pulse (equal to the
// offset), that the detector clears itself after each measure cycle, that a
// second edge on the leading input is ignored, and that simultaneous edges
// still give a clean SIGN and no stuck state.
module tb_bbpfd;
  timeunit 1ps;
  timeprecision 1fs;

  logic rst, ref_clk, div, sign, mode;
  int checks = 0, failures = 0;
  realtime t_rise, t_fall;
  int mode_pulses = 0;
  int sim_sign1 = 0, sim_sign0 = 0;

  bbpfd dut (.rst(rst), .ref_clk(ref_clk), .div(div), .sign(sign), .mode(mode));

  always @(posedge mode) begin
    t_rise = $realtime;
    mode_pulses++;
  end
  always @(negedge mode) t_fall = $realtime;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // One measure cycle: first edge on ref (ref_first) or div, second edge
  // gap ps later; both inputs return low 1 ns later.
  task automatic cycle(input bit ref_first, input int gap);
    int p;
    p = mode_pulses;
    if (ref_first) ref_clk = 1; else div = 1;
    #(gap);
    if (ref_first) div = 1; else ref_clk = 1;
    #1000;
    ref_clk = 0; div = 0;
    #1000;
    check(sign == ref_first, $sformatf("sign after gap %0d ref_first %0d", gap, ref_first));
    check(mode == 0, "mode low after cycle");
    check(mode_pulses == p + 1, "one mode pulse");
    check((t_fall - t_rise) > gap - 0.5 && (t_fall - t_rise) < gap + 0.5,
          $sformatf("mode width %0f for gap %0d", t_fall - t_rise, gap));
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 0; ref_clk = 0; div = 0;
    #1 rst = 1;
    #500 rst = 0;
    #500;
    check(mode == 0 && sign == 0, "reset state");
    for (int i = 0; i < 40; i++) begin
      cycle(i % 2 == 0, $urandom_range(40, 900));
    end
    cycle(1, 100);
    cycle(0, 100);
    // ref edge twice before div: the second ref edge is ignored
    begin
      int p;
      p = mode_pulses;
      ref_clk = 1; #300 ref_clk = 0; #300 ref_clk = 1; #300 div = 1;
      #1000 ref_clk = 0; div = 0; #1000;
      check(mode_pulses == p + 1 && sign == 1, "double ref edge");
      check((t_fall - t_rise) > 899.5 && (t_fall - t_rise) < 900.5, "double ref width");
    end
    // simultaneous edges: clean random SIGN, detector back in wait state
    for (int i = 0; i < 60; i++) begin
      ref_clk = 1; div = 1;
      #1000 ref_clk = 0; div = 0; #1000;
      check(mode == 0, "mode low after tie");
      if (sign) sim_sign1++; else sim_sign0++;
      cycle(1, 200);
    end
    check(sim_sign1 > 0 && sim_sign0 > 0, "ties resolve both ways");
    // global reset clears SIGN
    rst = 1; #100;
    check(sign == 0 && mode == 0, "global reset");
    rst = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
