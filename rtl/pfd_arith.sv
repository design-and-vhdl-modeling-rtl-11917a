// pfd_arith: arithmetic block of the PFD, ERROR = SIGN * (Dout + 1).
//
// Adding one before applying the sign keeps the sign information for errors
// too small for the TDC to see, so near lock the detector behaves as a pure
// bang-bang detector (+1 / -1). With Dout in [0, 2**N-2] the result lies in
// [-(2**N-1), 2**N-1] and fits an (N+1)-bit two's-complement code. SIGN = 1
// (ref leads) gives a positive code. Purely combinational.
module pfd_arith #(
  parameter int unsigned N = adpll_pkg::PFD_N
) (
  input  logic               sign,
  input  logic [N-1:0]       dout,
  output logic signed [N:0]  error
);
  timeunit 1ps;
  timeprecision 1fs;

  logic signed [N:0] mag;

  assign mag   = $signed({1'b0, dout}) + (N+1)'(1);
  assign error = sign ? mag : -mag;

endmodule
