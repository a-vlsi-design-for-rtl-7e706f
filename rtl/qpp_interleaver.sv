// qpp_interleaver: QPP address generator, pi(i) = (f1*i + f2*i^2) mod K, with adders only.
//
// The square and the modulo are never computed.  With delta(i) =
// pi(i+1) - pi(i) mod K = (f1 + f2 + 2*f2*i) mod K, stepping forward is
//   pi(i+1) = pi(i) + delta(i),       delta(i+1) = delta(i) + (2*f2 mod K)
// and stepping backward is
//   delta(i-1) = delta(i) - (2*f2 mod K),   pi(i-1) = pi(i) - delta(i-1),
// each sum reduced mod K by one conditional add or subtract.
//
// While a frame is being loaded a generator walks i = 0 .. K-1 (gen_start,
// one index per cycle, gen_busy while running) and captures (pi, delta) at the
// start index of every SISO's backward and forward pass.  During decoding each
// SISO n has its own stepper: load_b / load_f set it to the captured backward /
// forward start, step_b[n] / step_f[n] move it one index down / up.
//
// Outputs per SISO: pi[n], and its split into the bank (window) number
// pi div W and the local address pi mod W.  The split uses comparisons with
// the multiples of W.  Because K is a multiple of the SISO count N and QPP is
// contention free, the N SISOs always see different banks and the same local
// address (checked by an assertion).
//
// Start indices (window n covers n*W .. n*W+W-1, OVL overlap steps):
//   backward start  (n+1)*W + OVL - 1,  or K-1 for the last window
//   forward start   n*W - OVL,          or 0 for the first window
module qpp_interleaver
  import td_pkg::*;
#(
  parameter int N = NSISO
) (
  input  logic   clk,
  input  logic   rst_n,
  input  kidx_t  k,          // block size, held during the frame
  input  kidx_t  f1,         // QPP coefficients, f1, f2 < K
  input  kidx_t  f2,
  input  addr_t  w,          // window length K / nsiso
  input  logic [3:0] nsiso,  // SISOs in use (1, 2, 4 or 8)
  input  logic   gen_start,
  output logic   gen_busy,
  input  logic   load_b,
  input  logic   load_f,
  input  logic [N-1:0] step_b,
  input  logic [N-1:0] step_f,
  output kidx_t  pi    [N],
  output bank_t  bank  [N],
  output addr_t  local_addr [N]
);

  function automatic kidx_t mod_add(input kidx_t a, input kidx_t b, input kidx_t m);
    logic [K_W:0] s;
    s = {1'b0, a} + {1'b0, b};
    if (s >= {1'b0, m}) s = s - {1'b0, m};
    return s[K_W-1:0];
  endfunction

  function automatic kidx_t mod_sub(input kidx_t a, input kidx_t b, input kidx_t m);
    if (a >= b) return a - b;
    else        return a + (m - b);
  endfunction

  kidx_t f12, f2x2;
  kidx_t mw [N+1];                 // multiples of the window length
  kidx_t bs [N], fs [N];           // backward and forward start indices

  always_comb begin
    f12  = mod_add(f1, f2, k);
    f2x2 = mod_add(f2, f2, k);
    for (int m = 0; m <= N; m++) mw[m] = kidx_t'(m) * kidx_t'(w);
    for (int n = 0; n < N; n++) begin
      bs[n] = (n + 1 >= int'(nsiso)) ? k - 1'b1 : mw[n+1] + kidx_t'(OVL - 1);
      fs[n] = (n == 0) ? '0 : mw[n] - kidx_t'(OVL);
    end
  end

  // ---------------------------------------------------------- generator
  kidx_t gi, gpi, gd;
  kidx_t cap_b_pi [N], cap_b_d [N], cap_f_pi [N], cap_f_d [N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      gen_busy <= 1'b0;
      gi  <= '0;
      gpi <= '0;
      gd  <= '0;
    end else if (gen_start) begin
      gen_busy <= 1'b1;
      gi  <= '0;
      gpi <= '0;
      gd  <= f12;
    end else if (gen_busy) begin
      gi  <= gi + 1'b1;
      gpi <= mod_add(gpi, gd, k);
      gd  <= mod_add(gd, f2x2, k);
      if (gi == k - 1'b1) gen_busy <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (gen_busy) begin
      for (int n = 0; n < N; n++) begin
        if (gi == bs[n]) begin
          cap_b_pi[n] <= gpi;
          cap_b_d[n]  <= gd;
        end
        if (gi == fs[n]) begin
          cap_f_pi[n] <= gpi;
          cap_f_d[n]  <= gd;
        end
      end
    end
  end

  // ---------------------------------------------------------- steppers
  kidx_t cur_d [N];
  kidx_t d_prev [N];               // delta(i-1) for a backward step

  always_comb
    for (int n = 0; n < N; n++) d_prev[n] = mod_sub(cur_d[n], f2x2, k);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int n = 0; n < N; n++) begin
        pi[n]    <= '0;
        cur_d[n] <= '0;
      end
    end else begin
      for (int n = 0; n < N; n++) begin
        if (load_b) begin
          pi[n]    <= cap_b_pi[n];
          cur_d[n] <= cap_b_d[n];
        end else if (load_f) begin
          pi[n]    <= cap_f_pi[n];
          cur_d[n] <= cap_f_d[n];
        end else if (step_f[n]) begin
          pi[n]    <= mod_add(pi[n], cur_d[n], k);
          cur_d[n] <= mod_add(cur_d[n], f2x2, k);
        end else if (step_b[n]) begin
          cur_d[n] <= d_prev[n];
          pi[n]    <= mod_sub(pi[n], d_prev[n], k);
        end
      end
    end
  end

  // ---------------------------------------------------------- bank split
  always_comb begin
    for (int n = 0; n < N; n++) begin
      bank_t b;
      b = '0;
      for (int m = 1; m < N; m++)
        if (m < int'(nsiso) && pi[n] >= mw[m]) b = bank_t'(m);
      bank[n]       = b;
      local_addr[n] = addr_t'(pi[n] - mw[int'(b)]);
    end
  end

endmodule
