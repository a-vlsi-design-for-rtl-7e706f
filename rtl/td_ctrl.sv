// td_ctrl: control unit (CTRL) of the turbo decoder.
//
// On start it latches the block size K, the QPP coefficients and the number of
// iterations, and picks the number of SISOs from K (1 below 784, 2 below 1568,
// 4 below 3136, else 8) and the window length W = K / N.  It then accepts
// K + 3 input words: the first K go to bank k div W, address k mod W of the
// systematic / parity memories (and clear the extrinsic memory), the last 3
// are the termination (tail) symbols.  Meanwhile it starts the interleaver's
// generator.
//
// Decoding is a sequence of 2 * n_iter half-iterations, SISO2 cycles
// (interleaved order, parity2) alternating with SISO1 cycles (natural order,
// parity1); the first is a SISO2 cycle and the last a SISO1 cycle, so the
// final hard decisions come out in natural order.  Every half-iteration has
// the phases
//   BACQ   OVL cycles: SISO n runs the beta recursion over the first OVL bits
//          of window n+1 from all-equal metrics; the last SISO instead runs
//          the 3 tail steps from state 0
//   BMAIN  W cycles: beta recursion over the own window, last bit first
//   FACQ   OVL cycles: SISO n runs the alpha recursion over the last OVL bits
//          of window n-1; the first SISO starts from state 0
//   FMAIN  W cycles: alpha recursion and LLR output, first bit first
//   GAP    GAP cycles to drain the pipeline before the next half-iteration
// All SISOs step in lockstep at one common local address, natural order
// (nat_addr) or interleaved (from the interleaver).  A frame therefore takes
// K + 3 load cycles plus 2 * n_iter * (2 * (W + OVL) + GAP) + GAP cycles.
//
// Interface: cmd[n] is the command for SISO n in the cycle the memories are
// addressed (the top delays it by the memory latency); nat_bsel[n] is the bank
// SISO n reads in natural order.  done pulses for one cycle at the end.
module td_ctrl
  import td_pkg::*;
#(
  parameter int N = NSISO
) (
  input  logic        clk,
  input  logic        rst_n,
  // configuration
  input  logic        start,
  input  kidx_t       k_in,
  input  kidx_t       f1_in,
  input  kidx_t       f2_in,
  input  logic [ITER_W-1:0] iter_in,
  output kidx_t       k,
  output kidx_t       f1,
  output kidx_t       f2,
  output logic [3:0]  nsiso,
  output addr_t       w,
  output logic        busy,
  output logic        done,
  // loading
  output logic        in_ready,
  input  logic        in_valid,
  output logic        ld_we,      // store a frame bit
  output bank_t       ld_bank,
  output addr_t       ld_addr,
  output logic        ld_tail,    // store a tail symbol
  output logic [1:0]  ld_tidx,
  // interleaver
  output logic        gen_start,
  input  logic        gen_busy,
  output logic        load_b,
  output logic        load_f,
  output logic [N-1:0] step_b,
  output logic [N-1:0] step_f,
  // decoding
  output phase_e      phase,
  output logic        siso2,      // 1: SISO2 cycle (interleaved)
  output logic        last_half,  // the final SISO1 cycle
  output addr_t       nat_addr,
  output bank_t       nat_bsel [N],
  output siso_cmd_t   cmd      [N],
  output logic [1:0]  tidx       // tail symbol for the last SISO
);

  typedef enum logic [1:0] {S_IDLE, S_LOAD, S_WAIT, S_RUN} state_e;

  state_e         state;
  logic [ITER_W-1:0] iters;
  kidx_t          ld_cnt;
  addr_t          c;          // cycle within the phase
  logic [ITER_W:0] h;         // half-iteration number

  addr_t          ph_len;

  always_comb begin
    unique case (phase)
      PH_BACQ, PH_FACQ:   ph_len = addr_t'(OVL);
      PH_BMAIN, PH_FMAIN: ph_len = w;
      PH_GAP:             ph_len = addr_t'(GAP);
      default:            ph_len = addr_t'(1);
    endcase
  end

  assign busy      = (state != S_IDLE);
  assign in_ready  = (state == S_LOAD);
  assign siso2     = ~h[0];
  assign last_half = (h == {iters, 1'b0} - 1'b1);

  // ------------------------------------------------------------ sequencing
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      phase   <= PH_IDLE;
      k       <= '0;
      f1      <= '0;
      f2      <= '0;
      iters   <= '0;
      nsiso   <= 4'd1;
      w       <= '0;
      ld_cnt  <= '0;
      ld_bank <= '0;
      ld_addr <= '0;
      c       <= '0;
      h       <= '0;
      done    <= 1'b0;
      gen_start <= 1'b0;
    end else begin
      done      <= 1'b0;
      gen_start <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          k       <= k_in;
          f1      <= f1_in;
          f2      <= f2_in;
          iters   <= (iter_in == '0) ? ITER_W'(1) : iter_in;
          nsiso   <= siso_count(k_in);
          w       <= addr_t'(k_in >> siso_log2(k_in));
          ld_cnt  <= '0;
          ld_bank <= '0;
          ld_addr <= '0;
          gen_start <= 1'b1;
          state   <= S_LOAD;
        end
        S_LOAD: if (in_valid) begin
          ld_cnt <= ld_cnt + 1'b1;
          if (ld_addr == w - 1'b1) begin
            ld_addr <= '0;
            ld_bank <= ld_bank + 1'b1;
          end else begin
            ld_addr <= ld_addr + 1'b1;
          end
          if (ld_cnt == k + 13'd2) state <= S_WAIT;
        end
        S_WAIT: if (!gen_busy && !gen_start) begin
          state <= S_RUN;
          phase <= PH_GAP;
          c     <= '0;
          h     <= '0;
        end
        S_RUN: begin
          if (c == ph_len - 1'b1) begin
            c <= '0;
            unique case (phase)
              PH_BACQ:  phase <= PH_BMAIN;
              PH_BMAIN: phase <= PH_FACQ;
              PH_FACQ:  phase <= PH_FMAIN;
              PH_FMAIN: begin
                phase <= PH_GAP;
                h     <= h + 1'b1;
              end
              default: begin
                if (h == {iters, 1'b0}) begin
                  phase <= PH_IDLE;
                  state <= S_IDLE;
                  done  <= 1'b1;
                end else begin
                  phase <= PH_BACQ;
                end
              end
            endcase
          end else begin
            c <= c + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ld_we   = (state == S_LOAD) && in_valid && (ld_cnt < k);
  assign ld_tail = (state == S_LOAD) && in_valid && (ld_cnt >= k);
  assign ld_tidx = 2'(ld_cnt - k);

  // ------------------------------------------------------------ interleaver
  always_comb begin
    load_b = (state == S_RUN) && (phase == PH_GAP) && (c == ph_len - 1'b1)
             && (h != {iters, 1'b0});
    load_f = (state == S_RUN) && (phase == PH_BMAIN) && (c == ph_len - 1'b1);
    for (int n = 0; n < N; n++) begin
      step_b[n] = ((phase == PH_BACQ) && (n + 1 < int'(nsiso))) || (phase == PH_BMAIN);
      step_f[n] = ((phase == PH_FACQ) && (n > 0)) || (phase == PH_FMAIN);
    end
  end

  // ------------------------------------------------------------ SISO commands
  always_comb begin
    unique case (phase)
      PH_BACQ:  nat_addr = addr_t'(OVL - 1) - c;
      PH_BMAIN: nat_addr = w - 1'b1 - c;
      PH_FACQ:  nat_addr = w - addr_t'(OVL) + c;
      default:  nat_addr = c;
    endcase
    tidx = 2'd2 - c[1:0];

    for (int n = 0; n < N; n++) begin
      logic act, lastn;
      act   = (n < int'(nsiso));
      lastn = (n + 1 == int'(nsiso));
      cmd[n] = '0;
      cmd[n].addr = nat_addr;
      unique case (phase)
        PH_BACQ:  nat_bsel[n] = bank_t'(n + 1);
        PH_FACQ:  nat_bsel[n] = bank_t'(n - 1);
        default:  nat_bsel[n] = bank_t'(n);
      endcase
      if (act && state == S_RUN) begin
        unique case (phase)
          PH_BACQ: begin
            cmd[n].backward = 1'b1;
            if (lastn) begin
              cmd[n].valid     = (c < addr_t'(NTAIL));
              cmd[n].tail      = 1'b1;
              cmd[n].init      = (c == '0);
              cmd[n].init_zero = 1'b1;
            end else begin
              cmd[n].valid = 1'b1;
              cmd[n].init  = (c == '0);
            end
          end
          PH_BMAIN: begin
            cmd[n].valid    = 1'b1;
            cmd[n].backward = 1'b1;
            cmd[n].store    = 1'b1;
          end
          PH_FACQ: begin
            cmd[n].valid     = (n != 0);
            cmd[n].init      = (c == '0);
            cmd[n].init_zero = (n == 0);
          end
          PH_FMAIN: begin
            cmd[n].valid = 1'b1;
            cmd[n].out   = 1'b1;
          end
          default: ;
        endcase
      end
    end
  end

  // The window overlap must fit in a window when several SISOs work.
  a_ovl_fits : assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && nsiso > 4'd1) |-> (int'(w) >= OVL));

endmodule
