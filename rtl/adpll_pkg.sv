// adpll_pkg: shared defaults of the all-digital PLL.
//
// The PLL locks a ring DCO to M times a reference clock. The phase-frequency
// detector (PFD) produces an (N+1)-bit signed code, the PI loop filter turns it
// into a K-bit signed DCO control word and a divide-by-M counter closes the loop.
// N = 4 and M = 4 are the published configuration (a 250 MHz reference and a
// 1 GHz DCO, a PFD code that saturates at +15); K and the analog time constants
// are choices of this design, set so that 1 GHz sits inside the DCO tuning range.
package adpll_pkg;
  timeunit 1ps;
  timeprecision 1fs;

  // Number of bits of the TDC output code; the TDC counts 0 .. 2**N-2.
  parameter int unsigned PFD_N = 4;
  // Feedback division factor.
  parameter int unsigned DIV_M = 4;
  // Width of the signed DCO control word.
  parameter int unsigned DCO_K = 8;

  // Analog timing of the behavioural parts, in picoseconds.
  parameter realtime TDC_TAU_PS   = 20.0;   // delay of one TDC buffer
  parameter realtime ARB_DELAY_PS = 10.0;   // arbiter propagation delay
  parameter realtime DCO_DT_PS    = 2.0;    // DCO period tuning step

  // Largest magnitude of the PFD output code, 2**N - 1.
  function automatic int pfd_code_max(int unsigned n);
    return (1 << n) - 1;
  endfunction

endpackage
