// bank_wr_xbar: write crossbar from the SISOs to the banks of the extrinsic memory.
//
// Each SISO returns its extrinsic value to the location it read the a-priori
// value from: bank wsel[n], address waddr[n].  Bank b is written by the SISO
// whose wvalid is set and whose wsel equals b.  The QPP interleaver is
// contention free, so no two SISOs address the same bank in one cycle; an
// assertion checks this rule.  Purely combinational (clk and rst_n only
// serve the assertion).
module bank_wr_xbar #(
  parameter int N     = 8,
  parameter int WIDTH = 8,
  parameter int AW    = 10,
  localparam int SW   = (N > 1) ? $clog2(N) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [N-1:0]     wvalid,
  input  logic [SW-1:0]    wsel       [N],
  input  logic [AW-1:0]    siso_waddr [N],
  input  logic [WIDTH-1:0] siso_wdata [N],
  output logic [N-1:0]     bank_we,
  output logic [AW-1:0]    bank_waddr [N],
  output logic [WIDTH-1:0] bank_wdata [N]
);

  always_comb begin
    for (int b = 0; b < N; b++) begin
      bank_we[b]    = 1'b0;
      bank_waddr[b] = '0;
      bank_wdata[b] = '0;
      for (int n = 0; n < N; n++) begin
        if (wvalid[n] && (int'(wsel[n]) == b)) begin
          bank_we[b]    = 1'b1;
          bank_waddr[b] = siso_waddr[n];
          bank_wdata[b] = siso_wdata[n];
        end
      end
    end
  end

  for (genvar a = 0; a < N; a++) begin : g_chk_a
    for (genvar c = a + 1; c < N; c++) begin : g_chk_c
      a_no_conflict : assert property (@(posedge clk) disable iff (!rst_n)
        !(wvalid[a] && wvalid[c] && (wsel[a] == wsel[c])));
    end
  end

endmodule
