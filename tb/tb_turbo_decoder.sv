// tb_turbo_decoder: end-to-end test of the turbo decoder at its default sizes.
//
// Random frames are turbo encoded by the reference encoder of tb_lte_pkg,
// sent through a BPSK/AWGN channel, loaded into the decoder and decoded.  The
// decoded bits must equal the transmitted ones.  Frames cover all four SISO
// counts of the size table, a noise-free frame, and noisy frames whose raw hard decisions contain errors that the decoder must
// correct.  The sizes are the smallest and largest K of each SISO count
// (40, 768, 784, 1536, 1568, 3072, 3136, 6144) with 8 iterations, and
// K = 6144 with 6 iterations.  The cycle count from start to done is checked against
// K + 5 + GAP + 2*iter*(2*(W + OVL) + GAP), from the cycle start is driven to
// the cycle done is seen.  Each mechanism (1/2/4/8 SISO
// mode, window overlap steps, tail steps, interleaved SISO2 cycles,
// corrected channel errors) is counted and must occur.
module tb_turbo_decoder;
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

  // watchdog
  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_mode [9];
  int n_acq = 0, n_tail = 0, n_siso2_steps = 0, n_corrected = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ctrl.phase == PH_BACQ && dut.cmd[0].valid && !dut.cmd[0].tail) n_acq++;
      for (int n = 0; n < NSISO; n++) if (dut.cmd[n].valid && dut.cmd[n].tail) n_tail++;
      if (dut.u_ctrl.phase == PH_FMAIN && dut.siso2) n_siso2_steps++;
    end
  end

  logic c_bits [KMAX];
  logic dec [KMAX];
  int   got [KMAX];
  llr_t ys [KMAX+3], yp1 [KMAX+3], yp2 [KMAX+3], ys2 [3];

  task automatic run_frame(input int k, input int seed, input int iters, input real sigma);
    int f1, f2, w, ns, t0, lat, exp_lat, raw_err, dec_err, nout;
    logic [2:0] s1, s2;
    logic z, u;
    logic perm_seen [KMAX];
    bit perm_ok;

    qpp_coeffs(k, seed, f1, f2);
    perm_ok = 1;
    for (int i = 0; i < k; i++) perm_seen[i] = 0;
    for (int i = 0; i < k; i++) begin
      int p;
      p = qpp(i, k, f1, f2);
      if (perm_seen[p]) perm_ok = 0;
      perm_seen[p] = 1;
    end
    checks++;
    if (!perm_ok) begin
      failures++;
      $display("K=%0d: coefficients f1=%0d f2=%0d are not a permutation", k, f1, f2);
    end

    // encode
    s1 = 0;
    s2 = 0;
    raw_err = 0;
    for (int i = 0; i < k; i++) c_bits[i] = 1'($urandom());
    for (int i = 0; i < k; i++) begin
      rsc_step(c_bits[i], s1, z);
      ys[i]  = chan(c_bits[i], 8.0, sigma);
      yp1[i] = chan(z, 8.0, sigma);
      if ((ys[i] > 0) != c_bits[i]) raw_err++;
    end
    for (int i = 0; i < k; i++) begin
      rsc_step(c_bits[qpp(i, k, f1, f2)], s2, z);
      yp2[i] = chan(z, 8.0, sigma);
    end
    for (int t = 0; t < 3; t++) begin
      u = s1[1] ^ s1[0];
      ys[k+t] = chan(u, 8.0, sigma);
      rsc_step(u, s1, z);
      yp1[k+t] = chan(z, 8.0, sigma);
      u = s2[1] ^ s2[0];
      ys2[t] = chan(u, 8.0, sigma);
      rsc_step(u, s2, z);
      yp2[k+t] = chan(z, 8.0, sigma);
    end
    checks++;
    if (s1 != 0 || s2 != 0) begin
      failures++;
      $display("reference encoder not terminated");
    end

    for (int i = 0; i < k; i++) got[i] = 0;

    // start
    @(negedge clk);
    k_in = kidx_t'(k);
    f1_in = kidx_t'(f1);
    f2_in = kidx_t'(f2);
    iter_in = ITER_W'(iters);
    start = 1;
    t0 = cyc;
    @(negedge clk);
    start = 0;
    // load K + 3 words
    for (int i = 0; i < k + 3; i++) begin
      in_valid = 1;
      in_sys  = ys[i];
      in_par1 = yp1[i];
      in_par2 = yp2[i];
      in_sys2 = (i >= k) ? ys2[i-k] : '0;
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      @(negedge clk);
    end
    in_valid = 0;

    // collect decisions until done
    nout = 0;
    ns = int'(out_nsiso);
    w  = int'(out_w);
    while (1) begin
      @(posedge clk);
      if (out_valid) begin
        for (int n = 0; n < ns; n++) begin
          dec[n*w + int'(out_addr)] = out_bits[n];
          got[n*w + int'(out_addr)]++;
        end
        nout++;
      end
      if (done) break;
    end
    lat = cyc - t0;
    exp_lat = (k + 3) + 2 + GAP + 2 * iters * (2 * (w + OVL) + GAP);

    // table 1
    checks++;
    if (ns != (k < 784 ? 1 : k < 1568 ? 2 : k < 3136 ? 4 : 8) || ns * w != k) begin
      failures++;
      $display("K=%0d: wrong SISO count %0d / window %0d", k, ns, w);
    end
    n_mode[ns]++;

    dec_err = 0;
    for (int i = 0; i < k; i++) begin
      if (got[i] != 1) dec_err++;
      else if (dec[i] != c_bits[i]) dec_err++;
    end
    checks++;
    if (dec_err != 0) begin
      failures++;
      $display("K=%0d sigma=%0.2f: %0d bit errors after decoding (raw %0d)", k, sigma, dec_err, raw_err);
    end
    if (raw_err > 0 && dec_err == 0) n_corrected++;
    checks++;
    if (lat != exp_lat) begin
      failures++;
      $display("K=%0d: latency %0d cycles, expected %0d", k, lat, exp_lat);
    end
    $display("K=%0d N=%0d W=%0d f1=%0d f2=%0d iter=%0d sigma=%0.2f raw_err=%0d dec_err=%0d cycles=%0d",
             k, ns, w, f1, f2, iters, sigma, raw_err, dec_err, lat);
  endtask

  initial begin
    in_sys = '0; in_par1 = '0; in_par2 = '0; in_sys2 = '0;
    k_in = '0; f1_in = '0; f2_in = '0; iter_in = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    // noise-free one-SISO frame
    run_frame(40, 0, 6, 0.0);
    // the block sizes of the frame-error-rate table, 8 iterations: the
    // smallest and largest K of each SISO count
    run_frame(40, 1, 8, 0.6);
    run_frame(768, 2, 8, 0.6);
    run_frame(784, 3, 8, 0.6);
    run_frame(1536, 4, 8, 0.6);
    run_frame(1568, 5, 8, 0.6);
    run_frame(3072, 6, 8, 0.6);
    run_frame(3136, 7, 8, 0.6);
    run_frame(6144, 8, 8, 0.6);
    // the largest frame with 6 iterations, the throughput configuration
    run_frame(6144, 9, 6, 0.65);

    checks++;
    if (n_mode[1] == 0 || n_mode[2] == 0 || n_mode[4] == 0 || n_mode[8] == 0) begin
      failures++;
      $display("not every SISO count was used");
    end
    checks++;
    if (n_acq == 0 || n_tail == 0 || n_siso2_steps == 0 || n_corrected == 0) begin
      failures++;
      $display("mechanism missing: acq=%0d tail=%0d siso2=%0d corrected=%0d",
               n_acq, n_tail, n_siso2_steps, n_corrected);
    end
    $display("mechanisms: modes 1/2/4/8 = %0d/%0d/%0d/%0d, overlap steps=%0d, tail steps=%0d, SISO2 steps=%0d, frames corrected=%0d",
             n_mode[1], n_mode[2], n_mode[4], n_mode[8], n_acq, n_tail, n_siso2_steps, n_corrected);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
