// pfd_arbiter: behavioural model of the mutual-exclusion arbiter of the
// bang-bang PFD (two cross-coupled RS latches followed by a metastability
// filter). It is an analog circuit at its core, so this is a timing model, not
// synthesizable logic.
//
// Inputs s_n and r_n are active low: each falls when the corresponding input
// latch has seen its event. Behaviour, every output change arriving DELAY after
// the input change that causes it, with inertial delay (an input change within
// DELAY cancels the pending output change, so the outputs never glitch):
//   s_n = r_n = 1           -> q = qn = 0 (idle, waiting for events)
//   only r_n low            -> q = 1, qn = 0
//   only s_n low            -> q = 0, qn = 1
//   both low, outputs held  -> keep the decision already taken
//   both low, q == qn       -> the two requests came within one DELAY of each
//                              other: the latches went metastable and the filter
//                              releases a random but clean decision.
// The random draw is how metastability resolution is modelled; the filter never
// lets both outputs rise together. Using the delayed outputs to detect the
// near-simultaneous case and the inertial delay follow the published model;
// the port names and the default DELAY are this design's.
module pfd_arbiter #(
  parameter realtime DELAY = adpll_pkg::ARB_DELAY_PS
) (
  input  logic s_n,
  input  logic r_n,
  output logic q,
  output logic qn
);
  timeunit 1ps;
  timeprecision 1fs;

  logic tq, tqn;       // decision the latches are heading for
  bit   settled;

  // Target outputs for the present inputs and outputs.
  function automatic void decide(output logic nq, output logic nqn);
    logic rnd;
    if (!s_n && !r_n && (q == qn)) begin
      rnd = 1'($urandom);
      nq  = rnd;
      nqn = !rnd;
    end else if (!s_n && !r_n) begin
      nq  = q;
      nqn = qn;
    end else if (s_n && r_n) begin
      nq  = 1'b0;
      nqn = 1'b0;
    end else if (s_n) begin
      nq  = 1'b1;
      nqn = 1'b0;
    end else begin
      nq  = 1'b0;
      nqn = 1'b1;
    end
  endfunction

  // Inertial delay: a target reaches the outputs only if the inputs stay
  // unchanged for DELAY; an input change inside that window replaces it.
  initial begin
    q  = 1'b0;
    qn = 1'b0;
    forever begin
      @(s_n or r_n);
      settled = 1'b0;
      while (!settled) begin
        decide(tq, tqn);
        settled = 1'b1;
        fork
          #(DELAY);
          begin
            @(s_n or r_n);
            settled = 1'b0;
          end
        join_any
        disable fork;
      end
      q  = tq;
      qn = tqn;
    end
  end

  // Mutual exclusion: the filter never grants both sides.
  always @(q or qn) begin
    assert (!(q && qn)) else $error("pfd_arbiter: both outputs high");
  end

endmodule
