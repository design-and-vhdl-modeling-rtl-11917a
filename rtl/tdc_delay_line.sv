// tdc_delay_line: behavioural model of the tapped delay line of the TDC.
//
// TAPS buffers in series, each with delay TAU; taps[i] is the input delayed by
// (i+1)*TAU. While a pulse travels along the line the taps show a thermometer
// code whose number of ones is the time elapsed since the rising edge, in units
// of TAU. Buffer delays are analog quantities, so this is a timing model and not
// synthesizable logic. The published line has 2**N-2 buffers; TAU is this
// design's choice (a plausible buffer delay).
module tdc_delay_line #(
  parameter int unsigned TAPS = 14,
  parameter realtime     TAU  = adpll_pkg::TDC_TAU_PS
) (
  input  logic            din,
  output logic [TAPS-1:0] taps
);
  timeunit 1ps;
  timeprecision 1fs;

  for (genvar i = 0; i < TAPS; i++) begin : g_buf
    if (i == 0) begin : g_first
      assign #(TAU) taps[0] = din;
    end else begin : g_next
      assign #(TAU) taps[i] = taps[i-1];
    end
  end

endmodule
