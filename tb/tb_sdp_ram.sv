// tb_sdp_ram: writes random words to random addresses of a 768-word memory
// and checks every read against a shadow array: one-cycle read latency, read
// enable holding the output, and old data on a same-cycle read and write.
module tb_sdp_ram;
  logic clk = 0, we = 0, re = 0;
  logic [9:0] waddr, raddr;
  logic [7:0] wdata, rdata;
  logic [7:0] shadow [768];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  sdp_ram #(.DEPTH(768), .WIDTH(8)) dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_d;
    // fill
    for (int a = 0; a < 768; a++) begin
      @(negedge clk);
      we = 1; waddr = 10'(a); wdata = 8'($urandom()); shadow[a] = wdata;
    end
    @(negedge clk);
    we = 0;
    // random reads, some with a write to the same address in the same cycle
    for (int t = 0; t < 5000; t++) begin
      @(negedge clk);
      re = 1;
      raddr = 10'($urandom_range(0, 767));
      we = ($urandom_range(0, 1) == 1);
      waddr = (t % 3 == 0) ? raddr : 10'($urandom_range(0, 767));
      wdata = 8'($urandom());
      exp_d = shadow[raddr];
      @(posedge clk);
      if (we) shadow[waddr] = wdata;
      #1;
      checks++;
      if (rdata != exp_d) begin
        failures++;
        if (failures < 10) $display("t=%0d addr=%0d got %0h expected %0h", t, raddr, rdata, exp_d);
      end
    end
    // read enable low holds the output
    @(negedge clk);
    we = 0;
    re = 0;
    exp_d = rdata;
    raddr = raddr + 1'b1;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (rdata != exp_d) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
