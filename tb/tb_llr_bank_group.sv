// tb_llr_bank_group: loads 8 banks through their own write ports, then reads
// them all with one common address and checks every bank's word; also writes
// several banks in one cycle at different addresses.
module tb_llr_bank_group;
  localparam int NB = 8, DEPTH = 768, WIDTH = 6;
  logic clk = 0, re = 0;
  logic [9:0] raddr;
  logic [WIDTH-1:0] rdata [NB];
  logic [NB-1:0] we = '0;
  logic [9:0] waddr [NB];
  logic [WIDTH-1:0] wdata [NB];
  logic [WIDTH-1:0] shadow [NB][DEPTH];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  llr_bank_group #(.NB(NB), .DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_all();
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk);
      re = 1;
      raddr = 10'(a);
      @(posedge clk);
      #1;
      for (int b = 0; b < NB; b++) begin
        checks++;
        if (rdata[b] != shadow[b][a]) begin
          failures++;
          if (failures < 10) $display("bank %0d addr %0d: %0h expected %0h", b, a, rdata[b], shadow[b][a]);
        end
      end
    end
  endtask

  initial begin
    // one bank per cycle, as during frame loading
    for (int b = 0; b < NB; b++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        we = '0;
        we[b] = 1;
        waddr[b] = 10'(a);
        wdata[b] = WIDTH'($urandom());
        shadow[b][a] = wdata[b];
      end
    @(negedge clk);
    we = '0;
    check_all();
    // all banks in one cycle at different addresses
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int b = 0; b < NB; b++) begin
        we[b] = 1'($urandom());
        waddr[b] = 10'($urandom_range(0, DEPTH - 1));
        wdata[b] = WIDTH'($urandom());
        if (we[b]) shadow[b][waddr[b]] = wdata[b];
      end
    end
    @(negedge clk);
    we = '0;
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
