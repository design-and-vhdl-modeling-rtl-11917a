// adpll: second-order all-digital phase-locked loop.
//
// The loop multiplies a reference clock by M: the DCO output clk is divided by
// M into div, the phase-frequency detector compares div with ref_clk and
// produces a signed (N+1)-bit error code, and the PI loop filter, clocked by
// div, turns that code into the DCO control word din. With the published
// configuration (N = 4, M = 4) a 250 MHz reference gives a 1 GHz clk and the
// filter runs at 250 MHz. Only the DCO and the timing parts of the PFD (arbiter,
// delay line) are behavioural models; the rest is synthesizable.
//
// Timing: the filter samples error on each rising edge of div and updates din
// right after it; the DCO applies a new din within half of its period. rst is
// asynchronous and active high: it clears the PFD and the divider and loads the
// filter's initial value, so clk restarts at its reset frequency.
module adpll #(
  parameter int unsigned N        = adpll_pkg::PFD_N,
  parameter int unsigned M        = adpll_pkg::DIV_M,
  parameter int unsigned K        = adpll_pkg::DCO_K,
  parameter int unsigned LF_FRAC  = 4,
  parameter int          LF_K1    = 16,
  parameter int          LF_K2    = 1,
  parameter int          LF_INIT  = -64,
  parameter realtime     TDC_TAU  = adpll_pkg::TDC_TAU_PS,
  parameter realtime     DCO_DT   = adpll_pkg::DCO_DT_PS
) (
  input  logic              rst,
  input  logic              ref_clk,
  output logic              clk,
  output logic              div,
  output logic              sign,
  output logic              mode,
  output logic [N-1:0]      dout,
  output logic signed [N:0] error,
  output logic signed [K-1:0] din
);
  timeunit 1ps;
  timeprecision 1fs;

  pfd #(.N(N), .TAU(TDC_TAU)) u_pfd (
    .rst     (rst),
    .ref_clk (ref_clk),
    .div     (div),
    .sign    (sign),
    .mode    (mode),
    .dout    (dout),
    .error   (error)
  );

  loop_filter #(
    .IN_W (N + 1), .OUT_W (K), .FRAC (LF_FRAC),
    .K1 (LF_K1), .K2 (LF_K2), .INIT (LF_INIT)
  ) u_lf (
    .clk  (div),
    .rst  (rst),
    .e    (error),
    .dout (din)
  );

  dco #(.K(K), .DT(DCO_DT)) u_dco (
    .din (din),
    .clk (clk)
  );

  freq_divider #(.M(M)) u_div (
    .clk (clk),
    .rst (rst),
    .div (div)
  );

endmodule
