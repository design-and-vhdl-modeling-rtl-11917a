// tb_adpll: end-to-end run of the PLL with every parameter at its default.
//
// A reference slightly above 250 MHz (period 3990 ps) is applied from reset;
// the DCO starts at its reset frequency (976.6 MHz, below 4x the reference),
// so the detector first reports full-scale positive errors, then the loop pulls
// in and settles into the bang-bang limit cycle. Checked:
//   - during pull-in most of the first 30 codes are the full-scale +15;
//   - after lock, the mean DCO period over 400 reference cycles is 3990/4 ps
//     within 0.2 %, the mean divided period equals the reference period, and
//     the error code stays within a few steps of zero;
//   - four DCO rising edges per divided clock period;
//   - a global reset in mid-run reloads the filter and the loop locks again.
// Every mechanism of the loop must occur at least once: measure cycles led by
// ref and by div, positive and negative codes, saturation of the detector,
// bang-bang (+/-1) codes, near-simultaneous edges resolved by the arbiter,
// changes of the DCO word, and the global reset.
module tb_adpll;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime REF_PERIOD = 4000.0;

  logic rst, ref_clk;
  logic clk, div, sign, mode;
  logic [3:0] dout;
  logic signed [4:0] error;
  logic signed [7:0] din;

  int checks = 0, failures = 0;
  int n_ref_lead = 0, n_div_lead = 0, n_pos = 0, n_neg = 0, n_sat = 0;
  int n_bb = 0, n_close = 0, n_din_change = 0, n_reset = 0;
  int max_abs_err_locked;
  int  n_startup = 0, n_start_pos_sat = 0, n_start_neg_sat = 0;
  bit  locked_phase = 0;
  bit  div_seen = 0;
  int  clk_edges_in_div = 0;
  realtime mode_rise;

  adpll dut (
    .rst(rst), .ref_clk(ref_clk), .clk(clk), .div(div),
    .sign(sign), .mode(mode), .dout(dout), .error(error), .din(din)
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    ref_clk = 0;
    #(REF_PERIOD / 3);
    forever #(REF_PERIOD / 2) ref_clk = !ref_clk;
  end

  // Watchdog
  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Measure cycles and the codes they produce
  always @(posedge mode) mode_rise = $realtime;
  always @(negedge mode) begin
    if (!rst) begin
      if ($realtime - mode_rise < 10.0) n_close++;
      #20;  // let SIGN settle (arbiter delay)
      if (sign) n_ref_lead++; else n_div_lead++;
      if (n_startup < 30) begin
        n_startup++;
        if (error == 15) n_start_pos_sat++;
        if (error == -15) n_start_neg_sat++;
        if (n_startup == 30)
          check(n_start_pos_sat > n_start_neg_sat && n_start_pos_sat > 10,
                $sformatf("start-up codes: %0d at +15, %0d at -15", n_start_pos_sat, n_start_neg_sat));
      end
    end
  end

  always @(posedge div) begin
    if (!rst) begin
      if (error > 0) n_pos++;
      if (error < 0) n_neg++;
      if (error == 15 || error == -15) n_sat++;
      if (error == 1 || error == -1) n_bb++;
      if (locked_phase) begin
        int a;
        a = (error < 0) ? -int'(error) : int'(error);
        if (a > max_abs_err_locked) max_abs_err_locked = a;
      end
      if (div_seen)
        check(clk_edges_in_div == 4, $sformatf("%0d clk edges per div period", clk_edges_in_div));
      div_seen = 1;
      clk_edges_in_div = 0;
    end
  end
  always @(posedge clk) clk_edges_in_div++;
  always @(posedge rst) div_seen = 0;

  logic signed [7:0] din_prev;
  always @(din) begin
    if (din != din_prev) n_din_change++;
    din_prev = din;
  end

  task automatic measure_lock(input string tag);
    realtime t0, td0;
    int nclk;
    locked_phase = 1;
    max_abs_err_locked = 0;
    @(posedge div);
    td0 = $realtime;
    nclk = 0;
    fork
      begin : cnt
        forever begin @(posedge clk); nclk++; end
      end
    join_none
    t0 = $realtime;
    repeat (400) @(posedge div);
    disable fork;
    begin
      realtime pc, pd;
      pc = ($realtime - t0) / nclk;
      pd = ($realtime - td0) / 400.0;
      check(pc > REF_PERIOD / 4 * 0.998 && pc < REF_PERIOD / 4 * 1.002,
            $sformatf("%s: mean clk period %f ps", tag, pc));
      check(pd > REF_PERIOD - 1.0 && pd < REF_PERIOD + 1.0,
            $sformatf("%s: mean div period %f ps", tag, pd));
      check(max_abs_err_locked <= 4, $sformatf("%s: max |error| in lock %0d", tag, max_abs_err_locked));
      check(din >= 8 && din <= 16, $sformatf("%s: din %0d", tag, din));
      $display("%s: clk period %f ps, div period %f ps, max |error| %0d, din %0d",
               tag, pc, pd, max_abs_err_locked, din);
    end
    locked_phase = 0;
  endtask

  initial begin
    rst = 0;
    din_prev = '0;
    #1 rst = 1;
    #2000;
    check(din == -64, "reset value of din");
    rst = 0;
    repeat (600) @(posedge ref_clk);
    measure_lock("first lock");
    // global reset in mid-run
    rst = 1;
    n_reset++;
    #3000;
    check(din == -64 && mode == 0, "din and mode after reset");
    rst = 0;
    repeat (600) @(posedge ref_clk);
    measure_lock("relock");
    $display("mechanisms: ref_lead=%0d div_lead=%0d pos=%0d neg=%0d sat=%0d bb=%0d close=%0d din_changes=%0d resets=%0d",
             n_ref_lead, n_div_lead, n_pos, n_neg, n_sat, n_bb, n_close, n_din_change, n_reset);
    check(n_ref_lead > 0, "measure cycle led by ref");
    check(n_div_lead > 0, "measure cycle led by div");
    check(n_pos > 0 && n_neg > 0, "positive and negative codes");
    check(n_sat > 0, "detector saturation");
    check(n_bb > 0, "bang-bang codes");
    check(n_close > 0, "near-simultaneous edges");
    check(n_din_change > 0, "DCO word changes");
    check(n_reset > 0, "global reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
