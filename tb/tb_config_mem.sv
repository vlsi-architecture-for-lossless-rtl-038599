// tb_config_mem: checks the reset contents (b_int of filter bank F2, FIFO delays
// 250, 122, 58, 26, 10, 2 for N = 512), directed and random host writes of both tables
// against a model, and that a second reset restores the defaults.
module tb_config_mem;
  logic clk = 1'b0, rst_n = 1'b1, we = 1'b0, wsel = 1'b0;
  logic [2:0] waddr = '0; logic [8:0] wdata = '0;
  logic [5:0] bint [8]; logic [8:0] dfifo [8];
  int checks = 0, failures = 0;
  int exp_b [7] = '{13, 16, 17, 19, 21, 23, 25};
  int exp_d [7] = '{0, 250, 122, 58, 26, 10, 2};
  always #5 clk = ~clk;
  config_mem dut (.*);
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  // reset is asserted with a real falling edge so the asynchronous flops
  // start from a known state whatever the power-up values are
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int s = 0; s < 7; s++) begin
      chk(int'(bint[s]) == exp_b[s], $sformatf("b_int(%0d)", s));
      if (s > 0) chk(int'(dfifo[s]) == exp_d[s], $sformatf("D(%0d)", s));
    end
    @(negedge clk) begin we = 1'b1; wsel = 1'b1; waddr = 3'd3; wdata = 9'd77; end
    @(negedge clk) begin wsel = 1'b0; waddr = 3'd2; wdata = 9'd31; end
    @(negedge clk) we = 1'b0;
    chk(dfifo[3] == 9'd77, "D write");
    chk(bint[2] == 6'd31, "b_int write");
    chk(dfifo[2] == 9'd122 && bint[3] == 6'd19, "other entries untouched");
    // random host writes against a model of both tables, every entry checked each time
    begin
      int mb [8], md [8];
      for (int s = 0; s < 8; s++) begin mb[s] = int'(bint[s]); md[s] = int'(dfifo[s]); end
      for (int i = 0; i < 200; i++) begin
        @(negedge clk);
        we = 1'($urandom_range(0, 3) != 0); wsel = 1'($urandom); waddr = 3'($urandom);
        wdata = 9'($urandom);
        if (we && wsel) md[waddr] = int'(wdata);
        if (we && !wsel) mb[waddr] = int'(wdata[5:0]);
        @(negedge clk) we = 1'b0;
        for (int s = 0; s < 8; s++) begin
          chk(int'(bint[s]) == mb[s], $sformatf("b_int(%0d) after write %0d", s, i));
          chk(int'(dfifo[s]) == md[s], $sformatf("D(%0d) after write %0d", s, i));
        end
      end
    end
    // a second reset brings the defaults back
    rst_n = 1'b0;
    #1 rst_n = 1'b1;
    for (int s = 1; s < 7; s++)
      chk(int'(bint[s]) == exp_b[s] && int'(dfifo[s]) == exp_d[s], $sformatf("reset value of scale %0d", s));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
