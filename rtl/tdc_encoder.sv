// tdc_encoder: capture register and encoder of the TDC.
//
// The register is a row of D-latches, transparent while MODE is high and
// closed by its falling edge, so after a measure cycle it holds the thermometer
// code the delay line showed when MODE ended. The encoder turns that code into
// an unsigned binary number, the count of ones, in [0, 2**N-2]. Counting ones
// rather than finding the last one makes a bubble in the code cost one LSB at
// most. The output is combinational from the latches. A global reset clears the
// register (this design's choice, so the code is defined before the first
// measurement).
module tdc_encoder #(
  parameter int unsigned N    = adpll_pkg::PFD_N,
  parameter int unsigned TAPS = (1 << N) - 2
) (
  input  logic            rst,
  input  logic            mode,
  input  logic [TAPS-1:0] taps,
  output logic [N-1:0]    dout
);
  timeunit 1ps;
  timeprecision 1fs;

  logic [TAPS-1:0] held;

  always_latch begin
    if (rst)       held = '0;
    else if (mode) held = taps;
  end

  always_comb begin
    dout = '0;
    for (int i = 0; i < TAPS; i++) dout = dout + N'(held[i]);
  end

endmodule
