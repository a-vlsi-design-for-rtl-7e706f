// tb_acs_unit: checks the forward, backward and termination recursions of the
// ACS unit against a trellis model built from the reference RSC encoder:
// every branch (state, input) is enumerated, the best candidate per state is
// taken, the maximum is subtracted and the result clamped at MET_FLOOR.
module tb_acs_unit;
  import td_pkg::*;
  import tb_lte_pkg::*;

  smet_t m_in, m_out;
  gam4_t g;
  logic  backward, tail;
  int checks = 0, failures = 0;

  acs_unit dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int mi [8], best [8], mx, mode;
    for (int t = 0; t < 3000; t++) begin
      mode = t % 3;
      backward = (mode != 0);
      tail     = (mode == 2);
      for (int s = 0; s < 8; s++) begin
        mi[s] = (t % 50 == 7) ? -2048 + int'($urandom_range(0, 40)) : -int'($urandom_range(0, 600));
        m_in[s*MET_W +: MET_W] = MET_W'(mi[s]);
      end
      for (int j = 0; j < 4; j++) g[j] = gam_t'(int'($urandom_range(0, 400)) - 200);
      g[0] = '0;
      for (int s = 0; s < 8; s++) best[s] = -100000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          logic [2:0] st;
          logic z;
          int c;
          st = 3'(s);
          if (tail && u != int'(st[1] ^ st[0])) continue;
          rsc_step(u[0], st, z);      // st becomes the successor
          if (!backward) begin
            c = mi[s] + int'(g[2*u + int'(z)]);
            if (c > best[int'(st)]) best[int'(st)] = c;
          end else begin
            c = mi[int'(st)] + int'(g[2*u + int'(z)]);
            if (c > best[s]) best[s] = c;
          end
        end
      mx = best[0];
      for (int s = 1; s < 8; s++) if (best[s] > mx) mx = best[s];
      #1;
      for (int s = 0; s < 8; s++) begin
        int e;
        e = best[s] - mx;
        if (e < -2048) e = -2048;
        checks++;
        if (int'(smet_get(m_out, s)) != e) begin
          failures++;
          if (failures < 10) $display("t=%0d mode=%0d state %0d: got %0d expected %0d",
                                      t, mode, s, smet_get(m_out, s), e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
