// tb_modulation_fer: frame error rate of the decoder behind BPSK, QPSK, 16QAM
// and 64QAM channels, and over the block sizes at the SISO-count boundaries.
//
// Each frame is turbo encoded (tb_lte_pkg), the code bits are sent as
// systematic, parity1, parity2 of bit 0, then of bit 1, and so on, followed by
// the 12 tail bits, and grouped into Gray-mapped square-QAM symbols of unit
// average energy.  Complex white Gaussian noise of variance N0 = 10^(-SNR/10)
// per symbol is added.  A max-log demapper turns each symbol into bit LLRs,
// quantised to 6 bits.  The decoder runs 8 iterations.
//
// Checks: every frame is decoded in exactly the expected number of cycles; at
// the points where the published measurements show no frame errors (BPSK at
// 0 dB, QPSK at 3 dB, 16QAM at 8 dB) no frame may fail; at points where they
// show most frames failing (QPSK at -2.5 dB, 16QAM at -1 dB, 64QAM at 2 dB)
// more than half must fail here too, which shows the channel model is about
// as hard as the one measured.  The other points, and 64QAM at 8.4 dB over
// K = 40 ... 6144, are printed as measurements.  The SNR points and the
// modulations follow the published table; the block size of that sweep (1024),
// the frame counts (20 per point, 4 per size), the Gray mapping and the
// demapper scaling are this testbench's own choices.
module tb_modulation_fer;
  import td_pkg::*;
  import tb_lte_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, in_valid = 0;
  kidx_t k_in, f1_in, f2_in;
  logic [ITER_W-1:0] iter_in;
  logic busy, done, in_ready, out_valid;
  llr_t in_sys, in_par1, in_par2, in_sys2;
  addr_t out_addr, out_w;
  logic [NSISO-1:0] out_bits;
  logic [3:0] out_nsiso;

  turbo_decoder dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int CMAX = 3 * KMAX + 12;
  logic c_bits [KMAX];
  logic dec [KMAX];
  logic cw [CMAX + 6];
  llr_t lq [CMAX + 6];
  int sizes [8] = '{40, 768, 784, 1536, 1568, 3072, 3136, 6144};
  string mname [4] = '{"BPSK", "QPSK", "16QAM", "64QAM"};

  function automatic real pam_level(input int j, input int m, input real norm);
    return real'(2 * j - (m - 1)) * norm;
  endfunction

  // Max-log demapping of one axis with nb Gray-labelled bits; LLRs to lq[base..].
  task automatic demap_axis(input real y, input int nb, input real norm, input real c, input int base);
    int m;
    m = 1 << nb;
    for (int bit_i = 0; bit_i < nb; bit_i++) begin
      real d0, d1, q;
      int qi;
      d0 = 1.0e30;
      d1 = 1.0e30;
      for (int j = 0; j < m; j++) begin
        int g;
        real d;
        g = j ^ (j >> 1);
        d = (y - pam_level(j, m, norm)) * (y - pam_level(j, m, norm));
        if (((g >> (nb - 1 - bit_i)) & 1) == 1) begin
          if (d < d1) d1 = d;
        end else begin
          if (d < d0) d0 = d;
        end
      end
      q = c * (d0 - d1);
      qi = int'(q);
      if (qi > 31) qi = 31;
      if (qi < -31) qi = -31;
      lq[base + bit_i] = llr_t'(qi);
    end
  endtask

  // mod_bits: 0 BPSK (real axis only), 1 QPSK, 2 16QAM, 3 64QAM (bits per axis).
  task automatic channel(input int ncw, input int mod_bits, input real snr_db);
    real n0, sig, norm, c;
    int nb, per_sym;
    n0 = 10.0 ** (-snr_db / 10.0);
    sig = $sqrt(n0 / 2.0);
    if (mod_bits == 0) begin
      nb = 1; per_sym = 1; norm = 1.0;
    end else begin
      nb = mod_bits; per_sym = 2 * nb;
      norm = $sqrt(3.0 / (2.0 * real'((1 << (2 * nb)) - 1)));
    end
    c = 2.0 / (norm * norm);
    for (int s = 0; s * per_sym < ncw; s++) begin
      for (int ax = 0; ax < per_sym / nb; ax++) begin
        int j, g;
        real y;
        g = 0;
        for (int b = 0; b < nb; b++) g = (g << 1) | int'(cw[s * per_sym + ax * nb + b]);
        j = g;                                  // Gray label -> level index
        for (int sh = 1; sh < nb; sh++) j = j ^ (g >> sh);
        y = pam_level(j, 1 << nb, norm) + sig * gauss();
        demap_axis(y, nb, norm, c, s * per_sym + ax * nb);
      end
    end
  endtask

  task automatic run_frame(input int k, input int seed, input int mod_bits, input real snr_db,
                           output bit frame_err);
    int f1, f2, w, ns, t0, exp_lat, dec_err, iters;
    logic [2:0] s1, s2;
    logic z, u;
    iters = 8;
    qpp_coeffs(k, seed, f1, f2);
    s1 = 0;
    s2 = 0;
    for (int i = 0; i < k; i++) c_bits[i] = 1'($urandom());
    for (int i = 0; i < k; i++) begin
      cw[3*i] = c_bits[i];
      rsc_step(c_bits[i], s1, z);
      cw[3*i+1] = z;
    end
    for (int i = 0; i < k; i++) begin
      rsc_step(c_bits[qpp(i, k, f1, f2)], s2, z);
      cw[3*i+2] = z;
    end
    // tail: (x, z) of encoder 1 for 3 steps, then of encoder 2
    for (int t = 0; t < 3; t++) begin
      u = s1[1] ^ s1[0];
      cw[3*k + 2*t] = u;
      rsc_step(u, s1, z);
      cw[3*k + 2*t + 1] = z;
      u = s2[1] ^ s2[0];
      cw[3*k + 6 + 2*t] = u;
      rsc_step(u, s2, z);
      cw[3*k + 6 + 2*t + 1] = z;
    end
    for (int i = 3*k + 12; i < 3*k + 18; i++) cw[i] = 0;
    channel(3*k + 12, mod_bits, snr_db);

    @(negedge clk);
    k_in = kidx_t'(k); f1_in = kidx_t'(f1); f2_in = kidx_t'(f2); iter_in = ITER_W'(iters);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    for (int i = 0; i < k + 3; i++) begin
      in_valid = 1;
      if (i < k) begin
        in_sys = lq[3*i]; in_par1 = lq[3*i+1]; in_par2 = lq[3*i+2]; in_sys2 = '0;
      end else begin
        int t;
        t = i - k;
        in_sys  = lq[3*k + 2*t];
        in_par1 = lq[3*k + 2*t + 1];
        in_sys2 = lq[3*k + 6 + 2*t];
        in_par2 = lq[3*k + 6 + 2*t + 1];
      end
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;
    ns = int'(out_nsiso);
    w  = int'(out_w);
    while (1) begin
      @(posedge clk);
      if (out_valid)
        for (int n = 0; n < ns; n++) dec[n*w + int'(out_addr)] = out_bits[n];
      if (done) break;
    end
    exp_lat = (k + 3) + 2 + GAP + 2 * iters * (2 * (w + OVL) + GAP);
    checks++;
    if (cyc - t0 != exp_lat) begin
      failures++;
      $display("K=%0d: %0d cycles, expected %0d", k, cyc - t0, exp_lat);
    end
    dec_err = 0;
    for (int i = 0; i < k; i++) if (dec[i] != c_bits[i]) dec_err++;
    frame_err = (dec_err != 0);
  endtask

  // expect_kind: 0 = print only, 1 = no frame may fail, 2 = most frames must fail
  task automatic point(input int mod_bits, input real snr_db, input int k, input int frames,
                       input int expect_kind);
    int fe;
    bit e;
    fe = 0;
    for (int f = 0; f < frames; f++) begin
      run_frame(k, f + 11 * mod_bits, mod_bits, snr_db, e);
      if (e) fe++;
    end
    $display("%-6s SNR %5.1f dB  K=%4d  frames %0d  frame errors %0d  FER %0.1f%%",
             mname[mod_bits], snr_db, k, frames, fe, 100.0 * fe / frames);
    if (expect_kind == 1) begin
      checks++;
      if (fe != 0) begin
        failures++;
        $display("  expected no frame errors here");
      end
    end else if (expect_kind == 2) begin
      checks++;
      if (2 * fe <= frames) begin
        failures++;
        $display("  expected most frames to fail here");
      end
    end
  endtask

  initial begin
    in_sys = '0; in_par1 = '0; in_par2 = '0; in_sys2 = '0;
    k_in = '0; f1_in = '0; f2_in = '0; iter_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // FER against modulation and SNR
    point(0, -2.5, 1024, 20, 0);
    point(0, -2.0, 1024, 20, 0);
    point(0,  0.0, 1024, 20, 1);
    point(1, -2.5, 1024, 20, 2);
    point(1, -1.0, 1024, 20, 0);
    point(1,  0.0, 1024, 20, 0);
    point(1,  1.0, 1024, 20, 0);
    point(1,  3.0, 1024, 20, 1);
    point(2, -1.0, 1024, 20, 2);
    point(2,  2.0, 1024, 20, 0);
    point(2,  3.0, 1024, 20, 0);
    point(2,  4.0, 1024, 20, 0);
    point(2,  6.0, 1024, 20, 0);
    point(2,  8.0, 1024, 20, 1);
    point(3,  2.0, 1024, 20, 2);
    point(3,  4.0, 1024, 20, 0);
    point(3,  6.0, 1024, 20, 0);
    point(3,  8.0, 1024, 20, 0);
    point(3,  9.0, 1024, 20, 0);
    // FER against block size, 64QAM at 8.4 dB
    foreach (sizes[i]) point(3, 8.4, sizes[i], 4, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
