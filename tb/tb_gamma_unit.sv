// tb_gamma_unit: checks the four branch metrics against u*(La+Ls) + p*Lp for
// random inputs, with and without the termination flag (which drops La).
module tb_gamma_unit;
  import td_pkg::*;

  llr_t  ls, lp;
  ext_t  la;
  logic  tail;
  gam4_t g;
  int checks = 0, failures = 0;

  gamma_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int e [4];
      ls   = llr_t'($urandom());
      lp   = llr_t'($urandom());
      la   = ext_t'($urandom());
      tail = (t % 5 == 0);
      #1;
      for (int u = 0; u < 2; u++)
        for (int p = 0; p < 2; p++) begin
          e[2*u+p] = u * (int'(ls) + (tail ? 0 : int'(la))) + p * int'(lp);
          checks++;
          if (int'(g[2*u+p]) != e[2*u+p]) begin
            failures++;
            if (failures < 10) $display("ls=%0d lp=%0d la=%0d tail=%0d g[%0d]=%0d expected %0d",
                                        ls, lp, la, tail, 2*u+p, g[2*u+p], e[2*u+p]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
