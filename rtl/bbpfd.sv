// bbpfd: bang-bang phase-frequency detector.
//
// It tells which of the two rising edges, ref or div, came first (SIGN) and
// how long the other one took to follow (MODE). Structure:
//   - input latches X1/X2: edge-triggered flags set by the rising edge of ref
//     and div, cleared asynchronously by the reset logic or by the global
//     reset (two separate clear inputs, so that the rising edge of either one
//     clears the flag whatever state the other is in);
//   - X9: MODE = ref_ev XOR div_ev, high from the first event to the second
//     (the "measure mode");
//   - arbiter X3/X4 with metastability filter (pfd_arbiter): decides which flag
//     rose first, random when they rise within one arbiter delay;
//   - save latch X10: holds SIGN (1 = ref leads, 0 = div leads) from the
//     arbiter decision until the next measure cycle, also during reset;
//   - reset logic X5-X8: a three-input C-element whose inputs are the two flags
//     and "X10 agrees with the arbiter". It raises the internal reset once both
//     events are seen and SIGN is stored, and keeps it until the flags, the
//     arbiter and the agreement signal have all returned low.
// State sequence: wait (MODE=0) -> one event -> measure (MODE=1) -> second
// event -> MODE=0, internal reset -> wait. An edge that arrives while the
// internal reset is active (about one arbiter delay after MODE falls) is lost.
//
// The block set and their roles follow the published schematic; the exact
// gate that checks "X10 agrees" and the global reset of X10 are this design's.
// The loop through the C-element and the asynchronous clears of X1/X2 is the
// self-timed reset of the circuit and is intended; it settles because the
// arbiter delay sits inside it.
module bbpfd (
  input  logic rst,      // global reset, active high, asynchronous
  input  logic ref_clk,  // reference clock
  input  logic div,      // divided local clock
  output logic sign,     // 1: ref led in the last measure cycle
  output logic mode      // 1: measure mode
);
  timeunit 1ps;
  timeprecision 1fs;

  logic ref_ev, div_ev;   // X1 / X2 outputs
  logic arb_q, arb_qn;    // arbiter decision: q = ref first, qn = div first
  logic agree;            // X10 holds the arbiter decision
  logic pfd_rst;          // C-element output

  // X1
  always_ff @(posedge ref_clk or posedge rst or posedge pfd_rst) begin
    if (rst)          ref_ev <= 1'b0;
    else if (pfd_rst) ref_ev <= 1'b0;
    else              ref_ev <= 1'b1;
  end

  // X2
  always_ff @(posedge div or posedge rst or posedge pfd_rst) begin
    if (rst)          div_ev <= 1'b0;
    else if (pfd_rst) div_ev <= 1'b0;
    else              div_ev <= 1'b1;
  end

  // X9
  assign mode = ref_ev ^ div_ev;

  // X3/X4 + metastability filter; the latches see active-low events.
  pfd_arbiter u_arb (
    .s_n (!div_ev),
    .r_n (!ref_ev),
    .q   (arb_q),
    .qn  (arb_qn)
  );

  // X10
  always_latch begin
    if (rst)                 sign = 1'b0;
    else if (arb_q | arb_qn) sign = arb_q;
  end

  assign agree = (arb_q & sign) | (arb_qn & !sign);

  // X5-X8
  c_element #(.WIDTH(3)) u_rst (
    .in  ({ref_ev, div_ev, agree}),
    .out (pfd_rst)
  );

endmodule
