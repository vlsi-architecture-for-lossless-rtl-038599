// tb_input_buffer: checks the two-bank folding of the input buffer.
//
// Streams lines of 16, 32 and 512 samples (alternating parity) into the buffer in
// stream order, and after each write reads back every sample the convolutions still
// need: for a stream index t, the 2l border samples of the line and the last 13 stream
// samples must all still be there. Also checks that the next line's first 12 samples
// do not overwrite what the previous line's last results need.
module tb_input_buffer;
  import dwt_pkg::*;
  logic clk = 1'b0;
  logic we = 1'b0; logic [LW-1:0] w_t = '0, w_n = LW'(16), r_pos = '0, r_n = LW'(16);
  logic w_odd = 1'b0, r_odd = 1'b0; logic [31:0] w_data = '0, r_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  input_buffer dut (.*);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] val(input int line, input int q);
    return 32'(line * 4096 + q);
  endfunction

  // position read as stream sample t (independent of the package functions)
  function automatic int spos(input int t, input int n);
    return (t < 6) ? n - 6 + t : t - 6;
  endfunction

  task automatic expect_pos(input int line, input int n, input int q);
    @(negedge clk);
    r_pos = LW'(q); r_n = LW'(n); r_odd = line[0];
    #1;
    checks++;
    if (r_data !== val(line, q)) begin
      failures++;
      if (failures < 10) $display("FAIL line %0d n %0d pos %0d: %h", line, n, q, r_data);
    end
  endtask

  initial begin
    int lens [3] = '{16, 32, 512};
    int line = 0;
    foreach (lens[i]) begin
      automatic int n = lens[i];
      for (int l = 0; l < 3; l++, line++) begin
        for (int t = 0; t < n; t++) begin
          @(negedge clk);
          we = 1'b1; w_t = LW'(t); w_n = LW'(n); w_odd = line[0]; w_data = val(line, spos(t, n));
          @(negedge clk) we = 1'b0;
          // previous line: result m = n-13+t is computed in this stream slot (t < 13)
          if (l > 0 && t < 13)
            for (int k = 0; k < 13; k++) expect_pos(line - 1, n, (n - 13 + t - 6 + k + n) % n);
          // border samples of this line, once read
          for (int b = 0; b < 12 && b <= t; b++) expect_pos(line, n, spos(b, n));
          // the last 13 stream samples of this line
          for (int b = (t >= 13) ? t - 12 : 0; b <= t; b++) expect_pos(line, n, spos(b, n));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
