// tb_td_ctrl: runs the controller through whole frames (K = 40, 1024 and
// 6144; 1, 2 and 8 SISOs) with a simple model of the interleaver's busy flag.
// Checks the SISO count and window length, the bank/address of every loaded
// word and the tail indices, the phase sequence and the length of each phase,
// the alternation of SISO2 and SISO1 cycles (first SISO2, last SISO1), the
// natural addresses and bank selects, the SISO commands of every phase
// (overlap steps, tail steps, stores, outputs), the interleaver load pulses
// and the total cycle count.
module tb_td_ctrl;
  import td_pkg::*;

  localparam int N = NSISO;
  logic clk = 0, rst_n = 0;
  logic start = 0, in_valid = 0;
  kidx_t k_in, f1_in, f2_in, k, f1, f2;
  logic [ITER_W-1:0] iter_in;
  logic [3:0] nsiso;
  addr_t w, ld_addr, nat_addr;
  logic busy, done, in_ready, ld_we, ld_tail, gen_start, gen_busy, load_b, load_f;
  bank_t ld_bank;
  logic [1:0] ld_tidx, tidx;
  logic [N-1:0] step_b, step_f;
  phase_e phase;
  logic siso2, last_half;
  bank_t nat_bsel [N];
  siso_cmd_t cmd [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  td_ctrl #(.N(N)) dut (.*);

  // interleaver generator model: busy for K cycles after gen_start
  int gcnt = 0;
  always @(posedge clk) begin
    if (gen_start) gcnt <= int'(k_in);
    else if (gcnt > 0) gcnt <= gcnt - 1;
  end
  assign gen_busy = (gcnt > 0);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string msg);
    failures++;
    if (failures < 15) $display("%s", msg);
  endtask

  task automatic run(input int kk, input int iters);
    int ns, ww, nld, ntl, cyc, c, half, nlb, nlf;
    phase_e exp_ph, prev_ph;
    ns = (kk < 784) ? 1 : (kk < 1568) ? 2 : (kk < 3136) ? 4 : 8;
    ww = kk / ns;
    @(negedge clk);
    k_in = kidx_t'(kk); f1_in = '0; f2_in = '0; iter_in = ITER_W'(iters);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (int'(nsiso) != ns || int'(w) != ww) fail($sformatf("K=%0d: nsiso %0d w %0d", kk, nsiso, w));
    // load
    nld = 0;
    ntl = 0;
    in_valid = 1;
    while (nld + ntl < kk + 3) begin
      #1;
      if (ld_we) begin
        checks++;
        if (int'(ld_bank) != nld / ww || int'(ld_addr) != nld % ww)
          fail($sformatf("load %0d at bank %0d addr %0d", nld, ld_bank, ld_addr));
        nld++;
      end else if (ld_tail) begin
        checks++;
        if (int'(ld_tidx) != ntl) fail("tail index");
        ntl++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    // decoding: follow the phases
    cyc = 0;
    c = 0;
    half = 0;
    nlb = 0;
    nlf = 0;
    prev_ph = PH_IDLE;
    while (!done) begin
      #1;
      if (load_b) nlb++;
      if (load_f) nlf++;
      if (phase != PH_IDLE) begin
        if (phase != prev_ph) begin
          // check the length of the phase that just ended
          if (prev_ph != PH_IDLE) begin
            int exp_len;
            exp_len = (prev_ph == PH_BMAIN || prev_ph == PH_FMAIN) ? ww :
                      (prev_ph == PH_GAP) ? GAP : OVL;
            checks++;
            if (c != exp_len) fail($sformatf("phase %s lasted %0d", prev_ph.name(), c));
          end
          exp_ph = (prev_ph == PH_IDLE || prev_ph == PH_GAP) ? PH_BACQ :
                   (prev_ph == PH_BACQ) ? PH_BMAIN : (prev_ph == PH_BMAIN) ? PH_FACQ :
                   (prev_ph == PH_FACQ) ? PH_FMAIN : PH_GAP;
          if (prev_ph == PH_IDLE) exp_ph = PH_GAP;
          checks++;
          if (phase != exp_ph) fail($sformatf("phase %s after %s", phase.name(), prev_ph.name()));
          if (prev_ph == PH_FMAIN) half++;
          c = 0;
          prev_ph = phase;
        end
        // per-cycle command checks
        if (phase != PH_GAP) begin
          checks++;
          if (siso2 != (half % 2 == 0) || last_half != (half == 2 * iters - 1))
            fail("half-iteration order");
        end
        for (int n = 0; n < ns; n++) begin
          bit ev, et, ei, ez, es, eo;
          int ea, eb;
          ev = 0; et = 0; ei = 0; ez = 0; es = 0; eo = 0; ea = c; eb = n;
          unique case (phase)
            PH_BACQ: begin
              ea = OVL - 1 - c; eb = n + 1;
              if (n == ns - 1) begin ev = (c < 3); et = 1; ei = (c == 0); ez = 1; end
              else begin ev = 1; ei = (c == 0); end
            end
            PH_BMAIN: begin ea = ww - 1 - c; ev = 1; es = 1; end
            PH_FACQ: begin
              ea = ww - OVL + c; eb = n - 1;
              ev = (n != 0); ei = (c == 0); ez = (n == 0);
            end
            PH_FMAIN: begin ev = 1; eo = 1; end
            default: ;
          endcase
          if (phase != PH_GAP) begin
            checks++;
            if (cmd[n].valid != ev || cmd[n].tail != et || cmd[n].init != ei ||
                (ei && cmd[n].init_zero != ez) || cmd[n].store != es || cmd[n].out != eo ||
                cmd[n].backward != (phase == PH_BACQ || phase == PH_BMAIN) ||
                int'(nat_addr) != ea || int'(nat_bsel[n]) != (eb & 7) ||
                (et && ev && int'(tidx) != 2 - c))
              fail($sformatf("K=%0d %s c=%0d siso %0d: cmd %p addr %0d", kk, phase.name(), c, n, cmd[n], nat_addr));
          end
        end
        c++;
      end
      cyc++;
      @(negedge clk);
    end
    checks++;
    if (half != 2 * iters || nlb != 2 * iters || nlf != 2 * iters)
      fail($sformatf("halves %0d load_b %0d load_f %0d", half, nlb, nlf));
    checks++;
    if (cyc != 1 + GAP + 2 * iters * (2 * (ww + OVL) + GAP))
      fail($sformatf("decode took %0d cycles", cyc));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(40, 2);
    run(1024, 2);
    run(6144, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
