// acs_unit: add-compare-select for the eight LTE trellis states (the BETA/ALPHA block).
//
// Forward (backward = 0): alpha'(s) = max over the two predecessors s' of
// alpha(s') + gamma(s', s).  Backward (backward = 1): beta'(s') = max over the
// two successors s of beta(s) + gamma(s', s).  In a termination step
// (tail = 1, backward only) each state has a single successor, the one reached
// with the input that clears the feedback, which runs the backward recursion
// through the three tail steps of the encoder.
//
// After the compare-select the eight results are normalised by subtracting
// their maximum, so the best state is always 0 and all metrics are <= 0;
// values below MET_FLOOR are clamped.  Normalisation shifts all states of a
// step by the same amount and so does not change any LLR.  The max-log
// approximation is used without a correction term.
//
// Interface: m_in / m_out are the eight packed metrics (state s at bits
// s*MET_W), g the four branch metrics from gamma_unit.  Purely combinational;
// the metric register sits in the SISO.
module acs_unit
  import td_pkg::*;
(
  input  smet_t m_in,
  input  gam4_t g,
  input  logic  backward,
  input  logic  tail,
  output smet_t m_out
);

  localparam int IW = MET_W + 2;
  typedef logic signed [IW-1:0] wide_t;

  // Candidate through predecessor {s[1], s[0], x} (forward): the input is
  // u = s[2] ^ s[0] ^ x.
  function automatic wide_t fwd_cand(input smet_t m, input gam4_t gg,
                                     input logic [2:0] s, input logic x);
    logic [2:0] sp;
    logic u;
    sp = {s[1], s[0], x};
    u  = s[2] ^ s[0] ^ x;
    return wide_t'(smet_get(m, int'(sp))) + wide_t'(gg[{u, tr_par(sp, u)}]);
  endfunction

  // Candidate through the successor reached with input u (backward).
  function automatic wide_t bwd_cand(input smet_t m, input gam4_t gg,
                                     input logic [2:0] s, input logic u);
    return wide_t'(smet_get(m, int'(tr_next(s, u)))) + wide_t'(gg[{u, tr_par(s, u)}]);
  endfunction

  wide_t best [NST];
  wide_t mx;
  wide_t c0 [NST], c1 [NST], d [NST];

  always_comb begin
    for (int s = 0; s < NST; s++) begin
      if (!backward) begin
        c0[s] = fwd_cand(m_in, g, 3'(s), 1'b0);
        c1[s] = fwd_cand(m_in, g, 3'(s), 1'b1);
      end else if (tail) begin
        // single successor: the input that clears the feedback
        c0[s] = bwd_cand(m_in, g, 3'(s), tr_tail_u(3'(s)));
        c1[s] = c0[s];
      end else begin
        c0[s] = bwd_cand(m_in, g, 3'(s), 1'b0);
        c1[s] = bwd_cand(m_in, g, 3'(s), 1'b1);
      end
      best[s] = (c1[s] > c0[s]) ? c1[s] : c0[s];
    end

    mx = best[0];
    for (int s = 1; s < NST; s++) if (best[s] > mx) mx = best[s];

    for (int s = 0; s < NST; s++) begin
      d[s] = best[s] - mx;
      if (d[s] < wide_t'(MET_FLOOR)) d[s] = wide_t'(MET_FLOOR);
      m_out[s*MET_W +: MET_W] = d[s][MET_W-1:0];
    end
  end

endmodule
