// tb_bank_wr_xbar: random permutations of banks over SISOs with random valid
// flags; each bank must be written exactly by its SISO with that SISO's
// address and data, and banks nobody selects must stay idle.
module tb_bank_wr_xbar;
  localparam int N = 8, WIDTH = 8, AW = 10;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] wvalid, bank_we;
  logic [2:0] wsel [N];
  logic [AW-1:0] siso_waddr [N], bank_waddr [N];
  logic [WIDTH-1:0] siso_wdata [N], bank_wdata [N];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  bank_wr_xbar #(.N(N), .WIDTH(WIDTH), .AW(AW)) dut (.*);

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int perm [N], owner [N];
    wvalid = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      for (int n = 0; n < N; n++) perm[n] = n;
      for (int n = N - 1; n > 0; n--) begin
        int j, x;
        j = $urandom_range(0, n);
        x = perm[n]; perm[n] = perm[j]; perm[j] = x;
      end
      for (int b = 0; b < N; b++) owner[b] = -1;
      for (int n = 0; n < N; n++) begin
        wvalid[n] = 1'($urandom());
        wsel[n] = 3'(perm[n]);
        siso_waddr[n] = AW'($urandom());
        siso_wdata[n] = WIDTH'($urandom());
        if (wvalid[n]) owner[perm[n]] = n;
      end
      #1;
      for (int b = 0; b < N; b++) begin
        checks++;
        if (owner[b] < 0) begin
          if (bank_we[b]) failures++;
        end else if (!bank_we[b] || bank_waddr[b] != siso_waddr[owner[b]]
                     || bank_wdata[b] != siso_wdata[owner[b]]) begin
          failures++;
          if (failures < 10) $display("bank %0d owner %0d wrong write", b, owner[b]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
