// siso: soft-input soft-output max-log-MAP decoder for one window of the frame.
//
// The SISO is driven one trellis step per cycle by the controller and works in
// two passes over its window.  In the backward pass the gamma unit forms the
// branch metrics, the ACS unit runs the beta recursion from the end of the
// window to its start, and the beta entering each step is written to the
// internal beta memory.  In the forward pass the same inputs are read again in
// natural order, gamma is recomputed, the ACS unit runs the alpha recursion,
// and the LLR unit combines alpha, gamma and the stored beta into Lk, the
// extrinsic Le and the hard decision.  Before each pass the controller may run
// acquisition steps on the neighbouring window (overlap) starting from
// all-equal metrics, or termination steps on the tail bits starting from state
// 0; both only set up the metric register.
//
// Interface: in carries the command (siso_cmd_t) and the soft inputs of one
// step; cmd.addr is the local index used for the beta memory.  out is one
// result per forward step with cmd.out set; the write-back bank and address
// given in the command are returned with it.
// Timing: stage 0 registers the inputs and reads the beta memory, stage 1
// updates the metric register and feeds the LLR unit, whose registered result
// appears 2 cycles after the step entered (out.valid).  One step per cycle,
// no stalls.
module siso
  import td_pkg::*;
#(
  parameter int WDEPTH = WMAX          // beta memory depth (longest window)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  siso_in_t  in,
  output siso_out_t out
);

  siso_in_t s1;
  smet_t    m_reg, m_cur, m_next, m_init, beta_rd;
  gam4_t    g;

  // stage 0: register inputs, start the beta memory read
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) s1 <= '0;
    else        s1 <= in;
  end

  sdp_ram #(.DEPTH(WDEPTH), .WIDTH(NST*MET_W)) u_beta_mem (
    .clk   (clk),
    .we    (s1.cmd.valid && s1.cmd.store),
    .waddr (s1.cmd.addr[$clog2(WDEPTH)-1:0]),
    .wdata (m_cur),
    .re    (in.cmd.valid && in.cmd.out),
    .raddr (in.cmd.addr[$clog2(WDEPTH)-1:0]),
    .rdata (beta_rd)
  );

  // stage 1: branch metrics, recursion, LLR
  gamma_unit u_gamma (
    .ls   (s1.ls),
    .lp   (s1.lp),
    .la   (s1.la),
    .tail (s1.cmd.tail),
    .g    (g)
  );

  always_comb begin
    for (int s = 0; s < NST; s++)
      m_init[s*MET_W +: MET_W] = (s1.cmd.init_zero && s != 0) ? MET_NEG_INF : '0;
    m_cur = s1.cmd.init ? m_init : m_reg;
  end

  acs_unit u_acs (
    .m_in     (m_cur),
    .g        (g),
    .backward (s1.cmd.backward),
    .tail     (s1.cmd.tail),
    .m_out    (m_next)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)              m_reg <= '0;
    else if (s1.cmd.valid)   m_reg <= m_next;
    else if (s1.cmd.init)    m_reg <= m_init;
  end

  llr_unit u_llr (
    .clk   (clk),
    .rst_n (rst_n),
    .valid (s1.cmd.valid && s1.cmd.out),
    .alpha (m_cur),
    .g     (g),
    .beta  (beta_rd),
    .la    (s1.la),
    .ls    (s1.ls),
    .addr  (s1.cmd.addr),
    .wbank (s1.cmd.wbank),
    .waddr (s1.cmd.waddr),
    .out   (out)
  );

  // The beta memory holds one window: addresses stay below its depth.
  a_addr_range : assert property (@(posedge clk) disable iff (!rst_n)
    in.cmd.valid |-> (int'(in.cmd.addr) < WDEPTH));

endmodule
