// tb_pipe_mult: random and corner signed operands; the product must appear exactly
// two cycles after the operands, one product per cycle.
module tb_pipe_mult;
  logic clk = 1'b0;
  logic signed [31:0] a = '0, b = '0;
  logic signed [63:0] p;
  longint exp_q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  pipe_mult dut (.*);
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int corner [6] = '{32'sh8000_0000, 32'sh7fff_ffff, -1, 0, 1, 32'sh0000_ffff};
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = (i < 36) ? corner[i % 6] : $urandom;
      b = (i < 36) ? corner[i / 6] : $urandom;
      exp_q.push_back(longint'(a) * longint'(b));
      if (i >= 2) begin
        automatic longint e = exp_q.pop_front();
        checks++;
        if (p !== e) begin failures++; if (failures < 10) $display("FAIL %0d: %0d vs %0d", i, p, e); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
