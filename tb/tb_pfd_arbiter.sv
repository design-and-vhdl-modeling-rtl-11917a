// tb_pfd_arbiter: checks the arbiter model: idle outputs, which output wins
// for each input, that a decision holds while both requests are active, the
// propagation delay, and that near-simultaneous requests always give one clean
// (complementary) decision, with both outcomes occurring over many trials.
module tb_pfd_arbiter;
  timeunit 1ps;
  timeprecision 1fs;

  localparam realtime D = 10.0;
  logic s_n, r_n, q, qn;
  int checks = 0, failures = 0;
  int won_q = 0, won_qn = 0;
  int out_changes = 0;
  realtime t_out;

  always @(q or qn) begin
    out_changes++;
    t_out = $realtime;
  end

  pfd_arbiter #(.DELAY(D)) dut (.s_n(s_n), .r_n(r_n), .q(q), .qn(qn));

  task automatic expect_out(input logic eq, input logic eqn, input string what);
    checks++;
    if (q !== eq || qn !== eqn) begin
      failures++;
      $display("FAIL %s: q=%b qn=%b expected %b %b at %0t", what, q, qn, eq, eqn, $time);
    end
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_n = 1; r_n = 1;
    #100;
    expect_out(0, 0, "idle");
    // r_n first: q wins, after DELAY
    r_n = 0;
    #(D - 5);
    expect_out(0, 0, "before delay");
    #10;
    expect_out(1, 0, "r first");
    #50 s_n = 0;
    #(D + 5);
    expect_out(1, 0, "hold with both low");
    s_n = 1; r_n = 1;
    #(D + 5);
    expect_out(0, 0, "release");
    // s_n first: qn wins
    #100 s_n = 0;
    #(D + 5);
    expect_out(0, 1, "s first");
    r_n = 0;
    #(D + 5);
    expect_out(0, 1, "hold s first");
    s_n = 1; r_n = 1;
    #100;
    expect_out(0, 0, "release 2");
    // simultaneous and near-simultaneous requests: the second request falls
    // before the first decision is out, so the resolution is random
    for (int i = 0; i < 200; i++) begin
      int gap;
      realtime t_last;
      gap = (i % 4 == 0) ? 0 : $urandom_range(1, 8);
      out_changes = 0;
      if (gap == 0) {s_n, r_n} = 2'b00;
      else begin
        s_n = 0; #(gap); r_n = 0;
      end
      t_last = $realtime;
      #(2 * D + 5);
      // one clean decision, no glitch, DELAY after the second request
      checks++;
      if (out_changes != 1 || t_out != t_last + D) begin
        failures++;
        $display("FAIL gap %0d: %0d output changes, last at %f (request at %f)", gap, out_changes, t_out, t_last);
      end
      checks++;
      if (q == qn) begin
        failures++;
        $display("FAIL no clean decision q=%b qn=%b", q, qn);
      end
      if (q) won_q++; else won_qn++;
      s_n = 1; r_n = 1;
      #(2 * D + 5);
      expect_out(0, 0, "release loop");
    end
    checks++;
    if (won_q == 0 || won_qn == 0) begin
      failures++;
      $display("FAIL random resolution one-sided q=%0d qn=%0d", won_q, won_qn);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
