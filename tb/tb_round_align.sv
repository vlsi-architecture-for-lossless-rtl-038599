// tb_round_align: random accumulator values and shifts; the registered result must be
// floor(acc / 2^rshift) plus the most significant dropped bit, truncated to 32 bits.
module tb_round_align;
  logic clk = 1'b0, en = 1'b0;
  logic signed [63:0] acc = '0; logic [5:0] rshift = 6'd1;
  logic signed [31:0] dout;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  round_align dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 3000; i++) begin
      longint e; real r;
      @(negedge clk);
      en = 1'b1;
      acc = {$urandom, $urandom};
      rshift = 6'($urandom_range(1, 49));
      if (i < 8) begin acc = (i < 4) ? 64'sd3 : -64'sd3; rshift = 6'd1 + 6'(i % 2); end
      // independent model: round half up of acc / 2^rshift
      r = real'(acc) / (2.0 ** rshift);
      e = ((acc >>> (rshift - 1)) + 64'sd1) >>> 1;
      @(negedge clk);
      en = 1'b0;
      checks++;
      if (dout !== 32'(e)) begin failures++; if (failures < 10) $display("FAIL %0d >> %0d: %0d vs %0d (%f)", acc, rshift, dout, 32'(e), r); end
      // hold when en is low
      acc = ~acc;
      @(negedge clk);
      checks++;
      if (dout !== 32'(e)) begin failures++; $display("FAIL hold"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
