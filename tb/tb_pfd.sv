// tb_pfd: edges on ref and div at random offsets; after each measure cycle
// ERROR must be SIGN * (min(floor(offset/TAU), 2**N-2) + 1), i.e. the
// transfer function: +/-1 near zero, one step per TAU, saturation at +/-15.
module tb_pfd;
  timeunit 1ps;
  timeprecision 1fs;

  localparam int N = 4;
  localparam realtime TAU = 20.0;
  logic rst, ref_clk, div, sign, mode;
  logic [N-1:0] dout;
  logic signed [N:0] error;
  int checks = 0, failures = 0;
  int n_pos_sat = 0, n_neg_sat = 0, n_bb = 0;

  pfd #(.N(N), .TAU(TAU)) dut (
    .rst(rst), .ref_clk(ref_clk), .div(div),
    .sign(sign), .mode(mode), .dout(dout), .error(error)
  );

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
    for (int i = 0; i < 400; i++) begin
      int gap, mag, e;
      bit ref_first;
      ref_first = 1'($urandom);
      gap = $urandom_range(1, 450);
      if (gap % 20 == 0) gap++;
      if (ref_first) ref_clk = 1; else div = 1;
      #(gap);
      if (ref_first) div = 1; else ref_clk = 1;
      #1000;
      ref_clk = 0; div = 0;
      #1000;
      mag = gap / 20;
      if (mag > (1 << N) - 2) mag = (1 << N) - 2;
      e = ref_first ? mag + 1 : -(mag + 1);
      if (e == 15) n_pos_sat++;
      if (e == -15) n_neg_sat++;
      if (e == 1 || e == -1) n_bb++;
      checks++;
      // within one arbiter delay the decision is random: only |ERROR| is fixed
      if (gap < 10 && (error == 1 || error == -1)) e = int'(error);
      if (int'(error) != e) begin
        failures++;
        $display("FAIL gap %0d ref_first %0d error=%0d expected %0d", gap, ref_first, error, e);
      end
    end
    checks++;
    if (n_pos_sat == 0 || n_neg_sat == 0 || n_bb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
