// dco: behavioural model of the ring digitally controlled oscillator.
//
// A ring oscillator is an analog circuit, so this is a timing model and not
// synthesizable logic. The period follows the published law
//   T = DT * W,   W = 2**(K+1) - DIN,
// with DIN the K-bit signed control word: a larger DIN gives a higher
// frequency. The model toggles clk every half period and re-reads DIN at every
// edge, so a new control word takes effect within half a period. With the
// defaults (K = 8, DT = 2 ps) DIN = 0 gives 976.6 MHz, DIN = 12 gives exactly
// 1 GHz, and the range is 781 MHz to 1.30 GHz. DT and K are this design's
// values. The oscillator runs from time zero; it has no reset of its own, its
// start frequency comes from the loop filter's reset value.
module dco #(
  parameter int unsigned K  = adpll_pkg::DCO_K,
  parameter realtime     DT = adpll_pkg::DCO_DT_PS
) (
  input  logic signed [K-1:0] din,
  output logic                clk
);
  timeunit 1ps;
  timeprecision 1fs;

  realtime half_period;

  function automatic realtime period_of(logic signed [K-1:0] d);
    int w;
    w = (1 << (K + 1)) - int'(d);
    return DT * w;
  endfunction

  initial begin
    clk = 1'b0;
    forever begin
      half_period = period_of(din) / 2.0;
      #(half_period) clk = !clk;
    end
  end

endmodule
