// llr_unit: a-posteriori LLR, extrinsic value and hard decision of one bit.
//
// Lk = max over branches with u = 1 of alpha(s') + gamma(s', s) + beta(s)
//    - max over branches with u = 0 of the same sum,
// where alpha is the forward metric before the step and beta the stored
// backward metric after it.  The extrinsic value removes what the SISO was
// given: Le = 3/4 * (Lk - La - Ls), rounded toward minus infinity and
// saturated to EXT_W bits.  The 3/4 attenuation is this implementation's
// choice of scaling.  The hard decision is 1 when Lk > 0.
//
// Timing: one register stage; out is valid the cycle after valid.
module llr_unit
  import td_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      valid,
  input  smet_t     alpha,
  input  gam4_t     g,
  input  smet_t     beta,
  input  ext_t      la,
  input  llr_t      ls,
  input  addr_t     addr,
  input  bank_t     wbank,
  input  addr_t     waddr,
  output siso_out_t out
);

  localparam int IW = MET_W + 3;
  typedef logic signed [IW-1:0] wide_t;

  wide_t max1, max0, lk, le_full;
  logic signed [IW+1:0] le_x3;
  ext_t  le_sat;

  always_comb begin
    max1 = wide_t'(MET_FLOOR) * 3;
    max0 = wide_t'(MET_FLOOR) * 3;
    for (int s = 0; s < NST; s++) begin
      for (int u = 0; u < 2; u++) begin
        logic [2:0] sp, sn;
        logic p;
        wide_t m;
        sp = 3'(s);
        sn = tr_next(sp, u[0]);
        p  = tr_par(sp, u[0]);
        m  = wide_t'(smet_get(alpha, s)) + wide_t'(g[{u[0], p}]) + wide_t'(smet_get(beta, int'(sn)));
        if (u == 1) begin
          if (m > max1) max1 = m;
        end else begin
          if (m > max0) max0 = m;
        end
      end
    end
    lk      = max1 - max0;
    le_full = lk - wide_t'(la) - wide_t'(ls);
    le_x3   = (IW+2)'(le_full) * 3;
    le_x3   = le_x3 >>> 2;
    if (le_x3 > (IW+2)'(127))       le_sat = 8'sd127;
    else if (le_x3 < -(IW+2)'(127)) le_sat = -8'sd127;
    else                            le_sat = ext_t'(le_x3);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out <= '0;
    end else begin
      out.valid <= valid;
      if (valid) begin
        out.lk    <= lk_t'(lk);
        out.le    <= le_sat;
        out.hard  <= (lk > 0);
        out.addr  <= addr;
        out.wbank <= wbank;
        out.waddr <= waddr;
      end
    end
  end

endmodule
