// tb_llr_unit: checks Lk, the scaled extrinsic value and the hard decision
// against a branch enumeration with the reference RSC encoder, and checks the
// one-cycle latency and that the tags ride along.
module tb_llr_unit;
  import td_pkg::*;
  import tb_lte_pkg::*;

  logic clk = 0, rst_n = 0, valid = 0;
  smet_t alpha, beta;
  gam4_t g;
  ext_t  la;
  llr_t  ls;
  addr_t addr, waddr;
  bank_t wbank;
  siso_out_t out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  llr_unit dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [8], b [8], m1, m0, lk, le;
    lk_t olk;
    ext_t ole;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      for (int s = 0; s < 8; s++) begin
        a[s] = -int'($urandom_range(0, 700));
        b[s] = -int'($urandom_range(0, 700));
        alpha[s*MET_W +: MET_W] = MET_W'(a[s]);
        beta[s*MET_W +: MET_W]  = MET_W'(b[s]);
      end
      for (int j = 1; j < 4; j++) g[j] = gam_t'(int'($urandom_range(0, 300)) - 150);
      g[0] = '0;
      la = ext_t'($urandom());
      ls = llr_t'($urandom());
      addr = addr_t'($urandom());
      waddr = addr_t'($urandom());
      wbank = bank_t'($urandom());
      valid = 1;
      m1 = -100000;
      m0 = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          logic [2:0] st;
          logic z;
          int m;
          st = 3'(s);
          rsc_step(u[0], st, z);
          m = a[s] + int'(g[2*u + int'(z)]) + b[int'(st)];
          if (u == 1 && m > m1) m1 = m;
          if (u == 0 && m > m0) m0 = m;
        end
      lk = m1 - m0;
      le = lk - int'(la) - int'(ls);
      le = (3 * le) >>> 2;
      if (le > 127) le = 127;
      if (le < -127) le = -127;
      @(posedge clk);
      #1;
      valid = 0;
      olk = out.lk;
      ole = out.le;
      checks++;
      if (!out.valid || int'(olk) != lk || int'(ole) != le || out.hard != (lk > 0)
          || out.addr != addr || out.waddr != waddr || out.wbank != wbank) begin
        failures++;
        if (failures < 10) $display("t=%0d lk=%0d/%0d le=%0d/%0d hard=%0d valid=%0d",
                                    t, olk, lk, ole, le, out.hard, out.valid);
      end
    end
    @(posedge clk);
    #1;
    checks++;
    if (out.valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
