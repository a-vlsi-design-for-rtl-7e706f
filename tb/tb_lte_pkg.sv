// tb_lte_pkg: transmitter-side models shared by the testbenches.
//
// Holds an LTE turbo encoder (two 8-state RSC encoders, g0 = 1+D^2+D^3,
// g1 = 1+D+D^3, joined by a QPP interleaver, each terminated with 3 tail
// steps), a direct QPP formula, a search for valid QPP coefficients, and a
// BPSK + AWGN channel that turns code bits into 6-bit LLRs (positive = bit 1).
// These are written independently of the RTL and serve as the reference.
package tb_lte_pkg;

  // pi(i) = (f1*i + f2*i^2) mod K, computed directly.
  function automatic int qpp(input int i, input int k, input int f1, input int f2);
    longint t;
    t = (longint'(f1) * i + longint'(f2) * i * i) % longint'(k);
    return int'(t);
  endfunction

  function automatic int gcd(input int a, input int b);
    while (b != 0) begin
      int t;
      t = a % b;
      a = b;
      b = t;
    end
    return a;
  endfunction

  // Product of the distinct primes of k.
  function automatic int radical(input int k);
    int r, p, m;
    r = 1;
    m = k;
    p = 2;
    while (m > 1) begin
      if (m % p == 0) begin
        r = r * p;
        while (m % p == 0) m = m / p;
      end
      p++;
    end
    return r;
  endfunction

  // QPP coefficients that give a permutation: f1 coprime with k, f2 a
  // multiple of every prime of k.  seed varies the choice.
  function automatic void qpp_coeffs(input int k, input int seed, output int f1, output int f2);
    int r;
    f1 = 3 + 2 * (seed % 40);
    while (gcd(f1, k) != 1) f1 += 2;
    r  = radical(k);
    f2 = r * (1 + (seed % 7));
    while (f2 >= k) f2 -= r;
  endfunction

  // One RSC encoder step; state {s1,s2,s3} = s[2:0].
  function automatic void rsc_step(input logic u, inout logic [2:0] s, output logic z);
    logic a;
    a = u ^ s[1] ^ s[0];
    z = a ^ s[2] ^ s[0];
    s = {a, s[2], s[1]};
  endfunction

  // Approximately Gaussian sample, zero mean, unit variance (Irwin-Hall).
  function automatic real gauss();
    real acc;
    acc = 0.0;
    for (int j = 0; j < 12; j++) acc += real'($urandom_range(0, 1000000)) / 1000000.0;
    return acc - 6.0;
  endfunction

  // BPSK symbol for bit b with amplitude amp, noise sigma (relative to 1),
  // quantised to a signed 6-bit LLR.
  function automatic logic signed [5:0] chan(input logic b, input real amp, input real sigma);
    real y;
    int q;
    y = (b ? 1.0 : -1.0) + sigma * gauss();
    q = int'(y * amp);
    if (q > 31)  q = 31;
    if (q < -31) q = -31;
    return 6'(q);
  endfunction

endpackage
