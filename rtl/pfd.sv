// pfd: multi-bit digital phase-frequency detector.
//
// The bang-bang detector (bbpfd) gives the sign of the phase error and a MODE
// pulse as long as the error; the TDC converts the pulse length into Dout and
// the arithmetic block forms ERROR = SIGN * (Dout + 1). Transfer function:
// ERROR is +1/-1 for errors below one TDC step, grows by one per TAU and
// saturates at +/-(2**N-1). ERROR is updated when a measure cycle ends; the
// sign can change one arbiter delay after a measure cycle starts. Structure as
// published.
module pfd #(
  parameter int unsigned N   = adpll_pkg::PFD_N,
  parameter realtime     TAU = adpll_pkg::TDC_TAU_PS
) (
  input  logic              rst,
  input  logic              ref_clk,
  input  logic              div,
  output logic              sign,
  output logic              mode,
  output logic [N-1:0]      dout,
  output logic signed [N:0] error
);
  timeunit 1ps;
  timeprecision 1fs;

  bbpfd u_bb (
    .rst     (rst),
    .ref_clk (ref_clk),
    .div     (div),
    .sign    (sign),
    .mode    (mode)
  );

  tdc #(.N(N), .TAU(TAU)) u_tdc (
    .rst  (rst),
    .mode (mode),
    .dout (dout)
  );

  pfd_arith #(.N(N)) u_arith (
    .sign  (sign),
    .dout  (dout),
    .error (error)
  );

endmodule
