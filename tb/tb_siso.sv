// tb_siso: drives one SISO through complete windows and compares every
// output with an independent max-log-MAP computation (un-normalised integer
// metrics, branches from the reference RSC encoder).
//   case 1: a whole 40-bit frame: 3 tail steps from state 0, backward pass,
//           forward pass from state 0 (a one-SISO frame)
//   case 2: a 64-bit window inside a 200-bit stream with 32 overlap steps on
//           both sides started from all-equal metrics (a middle window)
// Checks Lk, Le, the hard decision, the tags, and the latency: the result of
// a step driven before rising edge 1 is registered at edge 2 and seen by the
// monitor at edge 3.
module tb_siso;
  import td_pkg::*;
  import tb_lte_pkg::*;

  logic clk = 0, rst_n = 0;
  siso_in_t in;
  siso_out_t out;
  int checks = 0, failures = 0;
  int cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  siso dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int L = 203;
  int xs [L], xp [L], xa [L];
  int exp_lk [L], exp_le [L];
  int issue_cyc [L];

  function automatic int gam(input int u, input int p, input int i, input bit tl);
    return u * (xs[i] + (tl ? 0 : xa[i])) + p * xp[i];
  endfunction

  // Reference: alpha from node a0 (zero start or uniform), beta from node b0
  // (tail from state 0 over tail positions, or uniform).
  task automatic reference(input int a0, input bit a_zero, input int lo, input int hi,
                           input int b0, input bit b_tail, input int ntail);
    int al [8], be [8][L+1], nb [8], na [8];
    for (int s = 0; s < 8; s++) be[s][b0 + ntail] = (b_tail && s != 0) ? -1024 : 0;
    for (int i = b0 + ntail - 1; i >= lo; i--) begin
      for (int s = 0; s < 8; s++) begin
        nb[s] = -1000000;
        for (int u = 0; u < 2; u++) begin
          logic [2:0] st;
          logic z;
          int c;
          st = 3'(s);
          if (i >= b0 && u != int'({31'b0, st[1] ^ st[0]})) continue;
          rsc_step(u[0], st, z);
          c = be[int'(st)][i+1] + gam(u, int'(z), i, i >= b0);
          if (c > nb[s]) nb[s] = c;
        end
      end
      for (int s = 0; s < 8; s++) be[s][i] = nb[s];
    end
    for (int s = 0; s < 8; s++) al[s] = (a_zero && s != 0) ? -1024 : 0;
    for (int i = a0; i < hi; i++) begin
      int m1, m0;
      m1 = -1000000; m0 = -1000000;
      for (int s = 0; s < 8; s++) na[s] = -1000000;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          logic [2:0] st;
          logic z;
          int c;
          st = 3'(s);
          rsc_step(u[0], st, z);
          c = al[s] + gam(u, int'(z), i, 0);
          if (c > na[int'(st)]) na[int'(st)] = c;
          c = c + be[int'(st)][i+1];
          if (u == 1 && c > m1) m1 = c;
          if (u == 0 && c > m0) m0 = c;
        end
      if (i >= lo) begin
        exp_lk[i] = m1 - m0;
        exp_le[i] = ((exp_lk[i] - xa[i] - xs[i]) * 3) >>> 2;
        if (exp_le[i] > 127) exp_le[i] = 127;
        if (exp_le[i] < -127) exp_le[i] = -127;
      end
      for (int s = 0; s < 8; s++) al[s] = na[s];
    end
  endtask

  task automatic step(input siso_cmd_t c, input int i);
    @(negedge clk);
    in.cmd = c;
    in.ls = llr_t'(xs[i]);
    in.lp = llr_t'(xp[i]);
    in.la = c.tail ? '0 : ext_t'(xa[i]);
  endtask

  // Drive one window lo..hi-1 with ovb/ovf overlap steps or tail.
  task automatic run(input int lo, input int hi, input int ovb, input int ovf, input bit tail_end);
    siso_cmd_t c;
    int nout;
    // backward acquisition or tail
    if (tail_end) begin
      for (int t = 2; t >= 0; t--) begin
        c = '0; c.valid = 1; c.backward = 1; c.tail = 1; c.init = (t == 2); c.init_zero = 1;
        step(c, hi + t);
      end
    end else begin
      for (int i = hi + ovb - 1; i >= hi; i--) begin
        c = '0; c.valid = 1; c.backward = 1; c.init = (i == hi + ovb - 1);
        step(c, i);
      end
    end
    for (int i = hi - 1; i >= lo; i--) begin
      c = '0; c.valid = 1; c.backward = 1; c.store = 1; c.addr = addr_t'(i - lo);
      step(c, i);
    end
    // forward acquisition
    if (ovf == 0) begin
      c = '0; c.init = 1; c.init_zero = 1;
      step(c, lo);
    end else begin
      for (int i = lo - ovf; i < lo; i++) begin
        c = '0; c.valid = 1; c.init = (i == lo - ovf);
        step(c, i);
      end
    end
    for (int i = lo; i < hi; i++) begin
      c = '0; c.valid = 1; c.out = 1; c.addr = addr_t'(i - lo);
      c.wbank = bank_t'(i); c.waddr = addr_t'(i * 3);
      step(c, i);
      issue_cyc[i] = cyc;
    end
    @(negedge clk);
    in = '0;
    repeat (6) @(negedge clk);
  endtask

  // output monitor
  int seen = 0, base = 0;
  always @(posedge clk) begin
    if (rst_n && out.valid) begin
      int i;
      lk_t olk;
      ext_t ole;
      olk = out.lk;
      ole = out.le;
      i = base + int'(out.addr);
      seen++;
      checks++;
      if (int'(olk) != exp_lk[i] || int'(ole) != exp_le[i] || out.hard != (exp_lk[i] > 0)
          || out.wbank != bank_t'(i) || out.waddr != addr_t'(i * 3) || cyc - issue_cyc[i] != 3) begin
        failures++;
        if (failures < 10) $display("bit %0d: lk %0d/%0d le %0d/%0d latency %0d",
                                    i, olk, exp_lk[i], ole, exp_le[i], cyc - issue_cyc[i]);
      end
    end
  end

  task automatic make_stream(input int n, input real sigma, input bit terminate);
    logic [2:0] s;
    logic z, u;
    s = 0;
    for (int i = 0; i < n; i++) begin
      u = 1'($urandom());
      rsc_step(u, s, z);
      xs[i] = int'(chan(u, 8.0, sigma));
      xp[i] = int'(chan(z, 8.0, sigma));
      xa[i] = int'($urandom_range(0, 80)) - 40;
    end
    if (terminate)
      for (int t = 0; t < 3; t++) begin
        u = s[1] ^ s[0];
        rsc_step(u, s, z);
        xs[n+t] = int'(chan(u, 8.0, sigma));
        xp[n+t] = int'(chan(z, 8.0, sigma));
        xa[n+t] = 0;
      end
  endtask

  initial begin
    in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // case 1: 40-bit frame with tail
    make_stream(40, 0.7, 1);
    reference(0, 1, 0, 40, 40, 1, 3);
    base = 0;
    seen = 0;
    run(0, 40, 0, 0, 1);
    checks++;
    if (seen != 40) begin failures++; $display("case 1: %0d outputs", seen); end
    // case 2: middle window 64..127 with 32 overlap steps
    make_stream(200, 0.7, 0);
    reference(32, 0, 64, 128, 160, 0, 0);
    base = 64;
    seen = 0;
    run(64, 128, 32, 32, 0);
    checks++;
    if (seen != 64) begin failures++; $display("case 2: %0d outputs", seen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
