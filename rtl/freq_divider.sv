// freq_divider: divide-by-M counter in the PLL feedback path.
//
// A modulo-M counter clocked by the DCO output; the output is high for the
// first ceil(M/2) counts and low for the rest, so for even M it is a 50 %
// square wave. Output rising edges are registered on DCO rising edges. An
// asynchronous reset clears the counter and holds the output low. The division
// factor M = 4 is published (1 GHz DCO, 250 MHz comparison rate); the counter
// form is this design's.
module freq_divider #(
  parameter int unsigned M = adpll_pkg::DIV_M
) (
  input  logic clk,
  input  logic rst,
  output logic div
);
  timeunit 1ps;
  timeprecision 1fs;

  localparam int unsigned CW = (M > 1) ? $clog2(M) : 1;
  localparam int unsigned HI = (M + 1) / 2;

  logic [CW-1:0] cnt, cnt_nxt;

  assign cnt_nxt = (cnt == CW'(M - 1)) ? '0 : cnt + 1'b1;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      cnt <= CW'(M - 1);
      div <= 1'b0;
    end else begin
      cnt <= cnt_nxt;
      div <= (cnt_nxt < CW'(HI));
    end
  end

endmodule
