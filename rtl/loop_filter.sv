// loop_filter: proportional-integral digital loop filter,
// H(z) = K1 + K2 / (1 - z^-1).
//
// Each rising edge of clk (the divided clock, 250 MHz in the published
// configuration) takes the PFD code e and computes
//   acc  <= acc + K2*e                         (integral path)
//   dout <= (K1*e + acc + K2*e) >>> FRAC       (proportional + integral)
// The gains are integers scaled by 2**-FRAC, so K1 = 16, K2 = 1, FRAC = 4 mean
// K1 = 1 and K2 = 1/16. Accumulator and output saturate instead of wrapping.
// The output is registered: a code sampled at one edge reaches the DCO right
// after that edge. An asynchronous reset loads the initial value INIT into the
// output and the integrator, so the DCO starts at a known frequency even while
// the divided clock is stopped. The filter form is published; gains, word
// widths, saturation and the registered output are this design's choices.
module loop_filter #(
  parameter int unsigned IN_W  = adpll_pkg::PFD_N + 1,
  parameter int unsigned OUT_W = adpll_pkg::DCO_K,
  parameter int unsigned FRAC  = 4,
  parameter int          K1    = 16,
  parameter int          K2    = 1,
  parameter int          INIT  = 0
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  e,
  output logic signed [OUT_W-1:0] dout
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned ACC_W = OUT_W + FRAC + 2;
  localparam int unsigned SUM_W = ACC_W + IN_W + 8;
  localparam logic signed [SUM_W-1:0] ACC_MAX = (SUM_W'(1) <<< (OUT_W + FRAC - 1)) - 1;
  localparam logic signed [SUM_W-1:0] ACC_MIN = -(SUM_W'(1) <<< (OUT_W + FRAC - 1));
  localparam logic signed [SUM_W-1:0] OUT_MAX = (SUM_W'(1) <<< (OUT_W - 1)) - 1;
  localparam logic signed [SUM_W-1:0] OUT_MIN = -(SUM_W'(1) <<< (OUT_W - 1));

  logic signed [ACC_W-1:0] acc;
  logic signed [SUM_W-1:0] e_x, acc_x, acc_sum, acc_sat, y_sum, y_shift;

  assign e_x     = SUM_W'(e);
  assign acc_x   = SUM_W'(acc);
  assign acc_sum = acc_x + e_x * SUM_W'(K2);

  always_comb begin
    if (acc_sum > ACC_MAX)      acc_sat = ACC_MAX;
    else if (acc_sum < ACC_MIN) acc_sat = ACC_MIN;
    else                        acc_sat = acc_sum;
    y_sum   = acc_sat + e_x * SUM_W'(K1);
    y_shift = y_sum >>> FRAC;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      acc  <= ACC_W'(INIT * (1 << FRAC));
      dout <= OUT_W'(INIT);
    end else begin
      acc <= ACC_W'(acc_sat);
      if (y_shift > OUT_MAX)      dout <= OUT_W'(OUT_MAX);
      else if (y_shift < OUT_MIN) dout <= OUT_W'(OUT_MIN);
      else                        dout <= OUT_W'(y_shift);
    end
  end

endmodule
