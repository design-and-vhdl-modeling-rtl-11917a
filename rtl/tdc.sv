// tdc: time-to-digital converter measuring the length of the MODE pulse.
//
// MODE enters a tapped delay line of 2**N-2 buffers (tdc_delay_line); the
// D-latch register closes on the falling edge of MODE and the encoder turns the
// held thermometer code into Dout = floor(pulse width / TAU), saturated at
// 2**N-2 (tdc_encoder). Dout is valid from the falling edge of MODE until the
// next rising edge, when the register opens again. Structure as published; TAU
// is this design's value.
module tdc #(
  parameter int unsigned N   = adpll_pkg::PFD_N,
  parameter realtime     TAU = adpll_pkg::TDC_TAU_PS
) (
  input  logic         rst,
  input  logic         mode,
  output logic [N-1:0] dout
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned TAPS = (1 << N) - 2;

  logic [TAPS-1:0] taps;

  tdc_delay_line #(.TAPS(TAPS), .TAU(TAU)) u_line (
    .din  (mode),
    .taps (taps)
  );

  tdc_encoder #(.N(N), .TAPS(TAPS)) u_enc (
    .rst  (rst),
    .mode (mode),
    .taps (taps),
    .dout (dout)
  );

endmodule
