// bank_xbar: read crossbar between the banks of a memory block and the SISOs.
//
// SISO n receives the word of bank rsel[n].  In natural order rsel[n] is n (or
// the neighbouring window's bank during the overlap steps); in interleaved
// order it is the bank of the QPP address pi(i) that SISO n needs.  The
// interleaver guarantees that active SISOs never select the same bank, so
// every bank needs only one read port.  Purely combinational.
module bank_xbar #(
  parameter int N     = 8,
  parameter int WIDTH = 8,
  localparam int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic [WIDTH-1:0] bank_rdata [N],
  input  logic [SW-1:0]    rsel       [N],
  output logic [WIDTH-1:0] siso_rdata [N]
);

  always_comb begin
    for (int n = 0; n < N; n++) siso_rdata[n] = bank_rdata[rsel[n]];
  end

endmodule
