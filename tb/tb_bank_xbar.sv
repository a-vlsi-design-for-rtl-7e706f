// tb_bank_xbar: random bank data and random (also repeated) selections; each
// SISO output must equal the selected bank's word.
module tb_bank_xbar;
  localparam int N = 8, WIDTH = 8;
  logic [WIDTH-1:0] bank_rdata [N], siso_rdata [N];
  logic [2:0] rsel [N];
  int checks = 0, failures = 0;

  bank_xbar #(.N(N), .WIDTH(WIDTH)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      for (int b = 0; b < N; b++) bank_rdata[b] = WIDTH'($urandom());
      for (int n = 0; n < N; n++) rsel[n] = 3'($urandom());
      #1;
      for (int n = 0; n < N; n++) begin
        checks++;
        if (siso_rdata[n] != bank_rdata[int'(rsel[n])]) begin
          failures++;
          if (failures < 10) $display("siso %0d sel %0d: %0h", n, rsel[n], siso_rdata[n]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
