// gamma_unit: branch metrics of one trellis step (max-log-MAP, eq. gamma = ln p(y|s',s) + ln P(s|s')).
//
// Each of the 16 trellis branches (8 states x 2 inputs) carries a label
// (u, p): the information bit u and the parity bit p.  Its log-domain metric
// is u * (La + Ls) + p * Lp, so the 16 branch metrics take only four distinct
// values, which are all this unit produces; the state-metric and LLR units
// pick the right one for each branch.  In a termination step the a-priori
// value is not used (the tail input is fixed by the encoder state).
//
// Interface: ls, lp are the channel LLRs of the systematic and parity bit,
// la the a-priori LLR; g[{u,p}] the four metrics.  Purely combinational.
module gamma_unit
  import td_pkg::*;
(
  input  llr_t  ls,
  input  llr_t  lp,
  input  ext_t  la,
  input  logic  tail,
  output gam4_t g
);

  gam_t sys_term;

  always_comb begin
    sys_term = tail ? gam_t'(ls) : gam_t'(ls) + gam_t'(la);
    g[0] = '0;                       // u = 0, p = 0
    g[1] = gam_t'(lp);               // u = 0, p = 1
    g[2] = sys_term;                 // u = 1, p = 0
    g[3] = sys_term + gam_t'(lp);    // u = 1, p = 1
  end

endmodule
