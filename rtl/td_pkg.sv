// td_pkg: sizes, types and trellis functions shared by the LTE turbo decoder.
//
// The LTE constituent code is the 8-state recursive systematic code with
// feedback polynomial g0 = 1 + D^2 + D^3 and parity polynomial g1 = 1 + D + D^3.
// A state is written {s1, s2, s3}, s1 being the register nearest the input:
// s[2] = s1, s[1] = s2, s[0] = s3.  Feedback a = u ^ s2 ^ s3, parity
// z = a ^ s1 ^ s3, next state {a, s1, s2}.  During trellis termination the
// encoder input is chosen so that a = 0, i.e. u = s2 ^ s3.
//
// Sign convention for all soft values: a positive LLR favours bit 1.  Branch
// metrics are gamma(u, p) = u * (La + Ls) + p * Lp, which differs from the
// symmetric form only by a per-step constant that cancels in max-log-MAP.
//
// Sizes: frames of up to 6144 bits split over up to 8 SISOs (768 bits each)
// follow the decoder's design.  The word widths (6-bit channel LLRs, 8-bit
// extrinsic values, 12-bit state metrics), the 32-step window overlap and the
// 3/4 extrinsic scaling are this implementation's choices.
package td_pkg;

  localparam int KMAX   = 6144;            // largest LTE block size
  localparam int NSISO  = 8;               // SISO decoders working in parallel
  localparam int WMAX   = KMAX / NSISO;    // longest window per SISO (768)
  localparam int K_W    = 13;              // width of a bit index 0..KMAX-1
  localparam int A_W    = 10;              // width of a local (in-bank) address
  localparam int B_W    = 3;               // width of a bank number
  localparam int LLR_W  = 6;               // channel LLR width
  localparam int EXT_W  = 8;               // extrinsic / a-priori LLR width
  localparam int MET_W  = 12;              // state metric width
  localparam int G_W    = 10;              // branch metric width
  localparam int LK_W   = MET_W + 3;       // a-posteriori LLR width
  localparam int NST    = 8;               // trellis states
  localparam int NTAIL  = 3;               // termination steps per encoder
  localparam int OVL    = 32;              // window overlap (acquisition steps)
  localparam int GAP    = 6;               // idle cycles between half-iterations
  localparam int ITER_W = 4;               // width of the iteration count

  // "Minus infinity" for unreachable states and the saturation floor of a
  // normalised metric.
  localparam logic signed [MET_W-1:0] MET_NEG_INF = -(1 <<< (MET_W - 2));
  localparam logic signed [MET_W-1:0] MET_FLOOR   = -(1 <<< (MET_W - 1));

  typedef logic signed [LLR_W-1:0] llr_t;
  typedef logic signed [EXT_W-1:0] ext_t;
  typedef logic signed [MET_W-1:0] met_t;
  typedef logic signed [G_W-1:0]   gam_t;
  typedef logic signed [LK_W-1:0]  lk_t;
  typedef logic [A_W-1:0]          addr_t;
  typedef logic [B_W-1:0]          bank_t;
  typedef logic [K_W-1:0]          kidx_t;

  // Eight state metrics, packed so that they can be stored in one memory word.
  typedef logic [NST*MET_W-1:0]    smet_t;

  // Branch metrics of one trellis step, indexed {u, p}.
  typedef gam_t gam4_t [4];

  // Phases of one half-iteration.
  typedef enum logic [2:0] {
    PH_IDLE  = 3'd0,
    PH_BACQ  = 3'd1,   // backward acquisition in the next window / tail
    PH_BMAIN = 3'd2,   // backward recursion over the own window, betas stored
    PH_FACQ  = 3'd3,   // forward acquisition in the previous window
    PH_FMAIN = 3'd4,   // forward recursion, LLR and extrinsic output
    PH_GAP   = 3'd5    // pipeline drain between half-iterations
  } phase_e;

  // Command that travels with one trellis step into a SISO.
  typedef struct packed {
    logic         valid;      // perform a trellis step with the data of this cycle
    logic         backward;   // 1: beta recursion, 0: alpha recursion
    logic         init;       // reset the metric register before the step
    logic         init_zero;  // init to "state 0 known" instead of all-equal
    logic         tail;       // termination step (no a-priori, fixed input)
    logic         store;      // write the current beta into the beta memory
    logic         out;        // compute Lk / Le for this step
    addr_t        addr;       // local index inside the window (beta memory)
    bank_t        wbank;      // extrinsic write-back bank (rides along)
    addr_t        waddr;      // extrinsic write-back address (rides along)
  } siso_cmd_t;

  // One trellis step into a SISO: command plus soft inputs.
  typedef struct packed {
    siso_cmd_t cmd;
    llr_t      ls;            // systematic
    llr_t      lp;            // parity
    ext_t      la;            // a-priori
  } siso_in_t;

  // One SISO result.
  typedef struct packed {
    logic  valid;
    ext_t  le;                // extrinsic (scaled, saturated)
    lk_t   lk;                // a-posteriori LLR
    logic  hard;              // hard decision, 1 when lk > 0
    addr_t addr;              // local index of the bit
    bank_t wbank;
    addr_t waddr;
  } siso_out_t;

  // ---------------------------------------------------------------- trellis
  function automatic logic [2:0] tr_next(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return {a, s[2], s[1]};
  endfunction

  function automatic logic tr_par(input logic [2:0] s, input logic u);
    logic a;
    a = u ^ s[1] ^ s[0];
    return a ^ s[2] ^ s[0];
  endfunction

  // Input that drives the feedback to zero (trellis termination).
  function automatic logic tr_tail_u(input logic [2:0] s);
    return s[1] ^ s[0];
  endfunction

  // Table 1: number of SISOs used for a block of k bits.
  function automatic logic [3:0] siso_count(input kidx_t k);
    if (k < 13'd784)       return 4'd1;
    else if (k < 13'd1568) return 4'd2;
    else if (k < 13'd3136) return 4'd4;
    else                   return 4'd8;
  endfunction

  function automatic logic [1:0] siso_log2(input kidx_t k);
    if (k < 13'd784)       return 2'd0;
    else if (k < 13'd1568) return 2'd1;
    else if (k < 13'd3136) return 2'd2;
    else                   return 2'd3;
  endfunction

  function automatic met_t smet_get(input smet_t m, input int s);
    return met_t'(m[s*MET_W +: MET_W]);
  endfunction

endpackage
