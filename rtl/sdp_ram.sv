// sdp_ram: simple dual-port memory, one write port and one registered read port.
//
// Used for every memory of the decoder: each bank of the systematic, parity,
// parity2 and extrinsic memory blocks, and the beta (backward metric) store
// inside each SISO.  The array is written as plain SystemVerilog so that a
// memory compiler macro can be mapped in by synthesis; the decoder itself
// only needs one read and one write per cycle.
//
// Timing: a write happens at the rising edge when we = 1.  rdata shows the word
// at raddr one cycle after raddr is presented (when re = 1; otherwise rdata
// holds).  A read and a write to the same address in one cycle return the old
// word.  Contents are not reset.
module sdp_ram #(
  parameter int DEPTH = 768,
  parameter int WIDTH = 8,
  localparam int AW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
