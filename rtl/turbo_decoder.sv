// turbo_decoder: parallel sliding-window LTE turbo decoder (max-log-MAP, up to 8 SISOs).
//
// A frame of K bits (40 <= K <= 6144) arrives as K channel LLR triples
// (systematic, parity1, parity2) followed by 3 tail words.  The frame is split
// into N equal windows, N = 1, 2, 4 or 8 chosen from K, and window n is stored
// in bank n of the systematic, parity1 and parity2 memory blocks; a fourth
// block of 8 banks holds the extrinsic values.  N SISO decoders then share the
// work of both constituent decoders: in a SISO2 cycle they read the
// systematic and extrinsic values in QPP-interleaved order together with
// parity2, in a SISO1 cycle the systematic, extrinsic and parity1 values in
// natural order.  Each SISO writes its new extrinsic value back to the
// location it read the a-priori value from, so one extrinsic memory serves
// both decoders and nothing is ever de-interleaved explicitly.  Decoding starts
// with a SISO2 cycle and ends with a SISO1 cycle, whose hard decisions leave
// the decoder in natural order without an output memory.  Windows overlap by
// OVL bits: each SISO first runs its recursions over the edge of the
// neighbouring window to estimate its boundary metrics.
//
// Interface
//   start, k_in, f1_in, f2_in, iter_in   start a frame (held only in the start
//                                        cycle); f1, f2 are the QPP
//                                        coefficients of K from the LTE table
//   in_ready / in_valid, in_sys, in_par1, in_par2, in_sys2
//                                        K + 3 input words; for the 3 tail
//                                        words in_sys/in_par1 are encoder 1's
//                                        tail bits, in_sys2/in_par2 encoder 2's
//   out_valid, out_addr, out_bits        during the last half-iteration, bit
//                                        n*out_w + out_addr of the frame is
//                                        out_bits[n] for n < out_nsiso
//   busy, done                           done pulses when the frame is finished
// Timing: with a word offered in every cycle, done is high
// K + 5 + GAP + 2*iter*(2*(W + OVL) + GAP) cycles after start, W = K / N:
// K + 3 load cycles, then 2*iter half-iterations of 2*(W + OVL) steps each
// plus GAP drain cycles.  For K = 6144, 6 iterations: 25427 cycles.
//
// Which parts follow the decoder's published architecture and which are
// choices of this implementation is given in each submodule's header.
module turbo_decoder
  import td_pkg::*;
#(
  parameter int N = NSISO,
  parameter int WDEPTH = WMAX
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  kidx_t       k_in,
  input  kidx_t       f1_in,
  input  kidx_t       f2_in,
  input  logic [ITER_W-1:0] iter_in,
  output logic        busy,
  output logic        done,
  output logic        in_ready,
  input  logic        in_valid,
  input  llr_t        in_sys,
  input  llr_t        in_par1,
  input  llr_t        in_par2,
  input  llr_t        in_sys2,
  output logic        out_valid,
  output addr_t       out_addr,
  output logic [N-1:0] out_bits,
  output logic [3:0]  out_nsiso,
  output addr_t       out_w
);

  localparam int SW = (N > 1) ? $clog2(N) : 1;

  // ------------------------------------------------------------ control
  kidx_t      k, f1, f2;
  logic [3:0] nsiso;
  addr_t      w;
  logic       ld_we, ld_tail, gen_start, gen_busy, load_b, load_f;
  bank_t      ld_bank;
  addr_t      ld_addr;
  logic [1:0] ld_tidx, tidx;
  logic [N-1:0] step_b, step_f;
  phase_e     phase;
  logic       siso2, last_half;
  addr_t      nat_addr;
  bank_t      nat_bsel [N];
  siso_cmd_t  cmd [N];

  td_ctrl #(.N(N)) u_ctrl (
    .clk, .rst_n,
    .start, .k_in, .f1_in, .f2_in, .iter_in,
    .k, .f1, .f2, .nsiso, .w, .busy, .done,
    .in_ready, .in_valid,
    .ld_we, .ld_bank, .ld_addr, .ld_tail, .ld_tidx,
    .gen_start, .gen_busy, .load_b, .load_f, .step_b, .step_f,
    .phase, .siso2, .last_half, .nat_addr, .nat_bsel, .cmd, .tidx
  );

  assign out_nsiso = nsiso;
  assign out_w     = w;

  // ------------------------------------------------------------ interleaver
  kidx_t pi [N];
  bank_t int_bank [N];
  addr_t int_local [N];

  qpp_interleaver #(.N(N)) u_qpp (
    .clk, .rst_n,
    .k, .f1, .f2, .w, .nsiso,
    .gen_start, .gen_busy, .load_b, .load_f, .step_b, .step_f,
    .pi, .bank(int_bank), .local_addr(int_local)
  );

  // Common interleaved local address: taken from the first SISO that steps.
  addr_t int_addr;
  always_comb begin
    int_addr = int_local[0];
    for (int n = N - 1; n >= 0; n--)
      if (cmd[n].valid) int_addr = int_local[n];
  end

  // ------------------------------------------------------------ addressing
  addr_t sys_raddr, par_raddr;
  bank_t sys_rsel [N];
  assign sys_raddr = siso2 ? int_addr : nat_addr;   // also the extrinsic address
  assign par_raddr = nat_addr;
  always_comb
    for (int n = 0; n < N; n++) sys_rsel[n] = siso2 ? int_bank[n] : nat_bsel[n];

  // ------------------------------------------------------------ memories
  logic [N-1:0] ld_wen, ext_we, ext_xwe;
  addr_t        ld_waddr [N], ext_waddr [N], ext_xwaddr [N];
  logic [LLR_W-1:0] sys_wd [N], p1_wd [N], p2_wd [N];
  logic [EXT_W-1:0] ext_wd [N], ext_xwd [N];
  logic [LLR_W-1:0] sys_rd [N], p1_rd [N], p2_rd [N], par_rd [N];
  logic [EXT_W-1:0] ext_rd [N];

  always_comb begin
    for (int b = 0; b < N; b++) begin
      ld_wen[b]   = ld_we && (int'(ld_bank) == b);
      ld_waddr[b] = ld_addr;
      sys_wd[b]   = in_sys;
      p1_wd[b]    = in_par1;
      p2_wd[b]    = in_par2;
      // while loading, the extrinsic memory is cleared (no a-priori yet)
      ext_we[b]    = ld_wen[b] | ext_xwe[b];
      ext_waddr[b] = ld_wen[b] ? ld_addr : ext_xwaddr[b];
      ext_wd[b]    = ld_wen[b] ? '0 : ext_xwd[b];
    end
  end

  llr_bank_group #(.NB(N), .DEPTH(WDEPTH), .WIDTH(LLR_W)) u_sys_mem (
    .clk, .re(1'b1), .raddr(sys_raddr[$clog2(WDEPTH)-1:0]), .rdata(sys_rd),
    .we(ld_wen), .waddr(ld_waddr), .wdata(sys_wd));
  llr_bank_group #(.NB(N), .DEPTH(WDEPTH), .WIDTH(LLR_W)) u_par1_mem (
    .clk, .re(1'b1), .raddr(par_raddr[$clog2(WDEPTH)-1:0]), .rdata(p1_rd),
    .we(ld_wen), .waddr(ld_waddr), .wdata(p1_wd));
  llr_bank_group #(.NB(N), .DEPTH(WDEPTH), .WIDTH(LLR_W)) u_par2_mem (
    .clk, .re(1'b1), .raddr(par_raddr[$clog2(WDEPTH)-1:0]), .rdata(p2_rd),
    .we(ld_wen), .waddr(ld_waddr), .wdata(p2_wd));
  llr_bank_group #(.NB(N), .DEPTH(WDEPTH), .WIDTH(EXT_W)) u_ext_mem (
    .clk, .re(1'b1), .raddr(sys_raddr[$clog2(WDEPTH)-1:0]), .rdata(ext_rd),
    .we(ext_we), .waddr(ext_waddr), .wdata(ext_wd));

  // tail symbols: [0] encoder 1 systematic, [1] encoder 1 parity,
  // [2] encoder 2 systematic, [3] encoder 2 parity
  llr_t tail_r [4][NTAIL];
  always_ff @(posedge clk) begin
    if (ld_tail) begin
      tail_r[0][ld_tidx] <= in_sys;
      tail_r[1][ld_tidx] <= in_par1;
      tail_r[2][ld_tidx] <= in_sys2;
      tail_r[3][ld_tidx] <= in_par2;
    end
  end

  // ------------------------------------------------------------ memory latency
  siso_cmd_t  cmd_d [N];
  logic [SW-1:0] sys_rsel_d [N], par_rsel_d [N];
  logic       siso2_d;
  logic [1:0] tidx_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        cmd_d[n]      <= '0;
        sys_rsel_d[n] <= '0;
        par_rsel_d[n] <= '0;
      end
      siso2_d <= 1'b0;
      tidx_d  <= '0;
    end else begin
      for (int n = 0; n < N; n++) begin
        cmd_d[n]       <= cmd[n];
        cmd_d[n].wbank <= sys_rsel[n];
        cmd_d[n].waddr <= sys_raddr;
        sys_rsel_d[n]  <= SW'(sys_rsel[n]);
        par_rsel_d[n]  <= SW'(nat_bsel[n]);
      end
      siso2_d <= siso2;
      tidx_d  <= tidx;
    end
  end

  // ------------------------------------------------------------ crossbars
  logic [LLR_W-1:0] sys_x [N], par_x [N];
  logic [EXT_W-1:0] ext_x [N];
  siso_out_t        so [N];
  logic [N-1:0]     so_valid;
  logic [SW-1:0]    so_wsel [N];
  addr_t            so_waddr [N];
  logic [EXT_W-1:0] so_le [N];

  always_comb begin
    for (int n = 0; n < N; n++) begin
      par_rd[n]   = siso2_d ? p2_rd[n] : p1_rd[n];
      so_valid[n] = so[n].valid;
      so_wsel[n]  = SW'(so[n].wbank);
      so_waddr[n] = so[n].waddr;
      so_le[n]    = so[n].le;
    end
  end

  bank_xbar #(.N(N), .WIDTH(LLR_W)) u_sys_xbar (
    .bank_rdata(sys_rd), .rsel(sys_rsel_d), .siso_rdata(sys_x));
  bank_xbar #(.N(N), .WIDTH(LLR_W)) u_par_xbar (
    .bank_rdata(par_rd), .rsel(par_rsel_d), .siso_rdata(par_x));
  bank_xbar #(.N(N), .WIDTH(EXT_W)) u_ext_xbar (
    .bank_rdata(ext_rd), .rsel(sys_rsel_d), .siso_rdata(ext_x));
  bank_wr_xbar #(.N(N), .WIDTH(EXT_W), .AW(A_W)) u_ext_wr_xbar (
    .clk, .rst_n, .wvalid(so_valid), .wsel(so_wsel), .siso_waddr(so_waddr), .siso_wdata(so_le),
    .bank_we(ext_xwe), .bank_waddr(ext_xwaddr), .bank_wdata(ext_xwd));

  // ------------------------------------------------------------ SISOs
  for (genvar n = 0; n < N; n++) begin : g_siso
    siso_in_t si;
    always_comb begin
      si.cmd = cmd_d[n];
      if (cmd_d[n].tail) begin
        si.ls = siso2_d ? tail_r[2][tidx_d] : tail_r[0][tidx_d];
        si.lp = siso2_d ? tail_r[3][tidx_d] : tail_r[1][tidx_d];
        si.la = '0;
      end else begin
        si.ls = llr_t'(sys_x[n]);
        si.lp = llr_t'(par_x[n]);
        si.la = ext_t'(ext_x[n]);
      end
    end
    siso #(.WDEPTH(WDEPTH)) u_siso (.clk, .rst_n, .in(si), .out(so[n]));
  end

  // ------------------------------------------------------------ hard output
  logic out_en;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                  out_en <= 1'b0;
    else if (phase == PH_FMAIN)  out_en <= last_half;
    else if (phase == PH_BACQ)   out_en <= 1'b0;
  end

  always_comb begin
    out_valid = out_en && so[0].valid;
    out_addr  = so[0].addr;
    for (int n = 0; n < N; n++) out_bits[n] = so[n].hard && (n < int'(nsiso));
  end

endmodule
