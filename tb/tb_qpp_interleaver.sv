// tb_qpp_interleaver: runs the generator and the per-SISO steppers through
// one backward and one forward pass, exactly as a half-iteration does, for
// K = 40, 1024, 2048 and 6144 (1, 2, 4 and 8 SISOs).  Every address is compared
// with the direct formula (f1*i + f2*i^2) mod K, the bank with pi div W and
// the local address with pi mod W; in the main phases all SISOs must see the
// same local address and different banks.  The generator must take K cycles.
module tb_qpp_interleaver;
  import td_pkg::*;
  import tb_lte_pkg::*;

  localparam int N = NSISO;
  logic clk = 0, rst_n = 0;
  kidx_t k, f1, f2;
  addr_t w;
  logic [3:0] nsiso;
  logic gen_start = 0, gen_busy, load_b = 0, load_f = 0;
  logic [N-1:0] step_b = '0, step_f = '0;
  kidx_t pi [N];
  bank_t bank [N];
  addr_t local_addr [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  qpp_interleaver #(.N(N)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int n, input int i, input int kk, input int ff1, input int ff2, input int ww);
    int p;
    p = qpp(i, kk, ff1, ff2);
    checks++;
    if (int'(pi[n]) != p || int'(bank[n]) != p / ww || int'(local_addr[n]) != p % ww) begin
      failures++;
      if (failures < 10) $display("K=%0d siso %0d i=%0d: pi=%0d bank=%0d local=%0d expected %0d",
                                  kk, n, i, pi[n], bank[n], local_addr[n], p);
    end
  endtask

  task automatic run(input int kk, input int ff1, input int ff2);
    int ns, ww, cnt;
    ns = (kk < 784) ? 1 : (kk < 1568) ? 2 : (kk < 3136) ? 4 : 8;
    ww = kk / ns;
    @(negedge clk);
    k = kidx_t'(kk); f1 = kidx_t'(ff1); f2 = kidx_t'(ff2); w = addr_t'(ww); nsiso = 4'(ns);
    gen_start = 1;
    @(negedge clk);
    gen_start = 0;
    cnt = 0;
    while (gen_busy) begin
      @(negedge clk);
      cnt++;
    end
    checks++;
    if (cnt != kk) begin
      failures++;
      $display("generator took %0d cycles for K=%0d", cnt, kk);
    end
    // backward pass
    load_b = 1;
    @(negedge clk);
    load_b = 0;
    for (int c = 0; c < OVL + ww; c++) begin
      for (int n = 0; n < ns; n++) begin
        if (n < ns - 1) check(n, (n + 1) * ww + OVL - 1 - c, kk, ff1, ff2, ww);
        else if (c >= OVL) check(n, kk - 1 - (c - OVL), kk, ff1, ff2, ww);
        step_b[n] = (n < ns - 1) || (c >= OVL);
      end
      if (c >= OVL) begin
        checks++;
        for (int n = 1; n < ns; n++)
          if (local_addr[n] != local_addr[0] || bank[n] == bank[0]) begin
            failures++;
            break;
          end
      end
      @(negedge clk);
      step_b = '0;
    end
    // forward pass
    load_f = 1;
    @(negedge clk);
    load_f = 0;
    for (int c = 0; c < OVL + ww; c++) begin
      for (int n = 0; n < ns; n++) begin
        if (n > 0) check(n, n * ww - OVL + c, kk, ff1, ff2, ww);
        else if (c >= OVL) check(n, c - OVL, kk, ff1, ff2, ww);
        step_f[n] = (n > 0) || (c >= OVL);
      end
      @(negedge clk);
      step_f = '0;
    end
  endtask

  initial begin
    int a, b;
    repeat (2) @(posedge clk);
    rst_n = 1;
    run(40, 3, 10);
    qpp_coeffs(1024, 2, a, b);
    run(1024, a, b);
    qpp_coeffs(2048, 3, a, b);
    run(2048, a, b);
    run(6144, 263, 480);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
