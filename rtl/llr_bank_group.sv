// llr_bank_group: one memory block made of NB independent banks.
//
// The decoder stores systematic, parity1, parity2 and extrinsic values in four
// such blocks of eight banks each; bank b holds the window of bits
// b*W .. b*W+W-1 of the frame at local addresses 0 .. W-1.  Because the QPP
// interleaver is contention free, all SISOs read the same local address in the
// same cycle, each from a different bank, so the block has a single read
// address shared by all banks.  Each bank has its own write port: during
// loading one bank is written per cycle, during decoding every SISO writes its
// extrinsic value into the bank selected by the write crossbar.
//
// Timing: rdata[b] is the word at raddr of bank b one cycle after raddr.
module llr_bank_group #(
  parameter int NB    = 8,
  parameter int DEPTH = 768,
  parameter int WIDTH = 8,
  localparam int AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata [NB],
  input  logic [NB-1:0]    we,
  input  logic [AW-1:0]    waddr [NB],
  input  logic [WIDTH-1:0] wdata [NB]
);

  for (genvar b = 0; b < NB; b++) begin : g_bank
    sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) u_ram (
      .clk   (clk),
      .we    (we[b]),
      .waddr (waddr[b]),
      .wdata (wdata[b]),
      .re    (re),
      .raddr (raddr),
      .rdata (rdata[b])
    );
  end

endmodule
