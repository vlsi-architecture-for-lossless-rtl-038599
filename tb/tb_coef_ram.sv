// tb_coef_ram: writes random words to all 32 coefficient locations and reads them back.
module tb_coef_ram;
  logic clk = 1'b0, we = 1'b0;
  logic [4:0] waddr = '0, raddr = '0;
  logic [31:0] wdata = '0, rdata;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  coef_ram dut (.*);
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < 32; i++) begin
        @(negedge clk);
        we = 1'b1; waddr = 5'(i); wdata = $urandom; model[i] = wdata;
      end
      @(negedge clk) we = 1'b0;
      for (int i = 31; i >= 0; i--) begin
        @(negedge clk) raddr = 5'(i);
        #1 checks++;
        if (rdata !== model[i]) begin failures++; $display("FAIL word %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
