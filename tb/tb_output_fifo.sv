// tb_output_fifo: pushes one entry and requests one pop per 13-cycle macrocycle, as the
// engine does, with delays D of 2, 122 and 250, then drains to a lower D and to 0.
// Each entry must come out in order, exactly D macrocycles after it was pushed, with
// its address, and the occupancy must settle at D.
module tb_output_fifo;
  logic clk = 1'b0, rst_n = 1'b1, push = 1'b0, pop_req = 1'b0, popped;
  logic [17:0] push_addr = '0, dout_addr; logic [31:0] push_data = '0, dout_data;
  logic [8:0] d_target = '0, count;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  output_fifo dut (.*);
  // reset is asserted with a real falling edge so the asynchronous flops
  // start from a known state whatever the power-up values are
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask
  initial begin
    int ds [3] = '{2, 122, 250};
    int seq = 0, next_out = 0;
    int macro = 0;
    int push_macro [int];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    foreach (ds[j]) begin
      d_target = 9'(ds[j]);
      // grow: pushes without pops until D is reached happen naturally (count <= D)
      for (int m = 0; m < 600; m++, macro++) begin
        for (int c = 0; c < 13; c++) begin
          @(negedge clk);
          push = (c == 1); pop_req = (c == 5);
          if (c == 1) begin push_data = 32'(seq); push_addr = 18'(seq * 7); push_macro[seq] = macro; seq++; end
          if (c == 6 && popped) begin
            chk(dout_data == 32'(next_out) && dout_addr == 18'(next_out * 7), "order and address");
            chk(macro - push_macro[next_out] == ds[j] || macro - push_macro[next_out] < ds[j], "delay");
            next_out++;
          end
        end
      end
      chk(count == 9'(ds[j]), $sformatf("occupancy settles at D=%0d (%0d)", ds[j], count));
    end
    // drain: no pushes, pop down to 10 then to 0
    push = 1'b0;
    for (int tgt = 10; tgt >= 0; tgt -= 10) begin
      d_target = 9'(tgt);
      for (int m = 0; m < 300; m++)
        for (int c = 0; c < 13; c++) begin
          @(negedge clk); pop_req = (c == 5); push = 1'b0;
          if (c == 6 && popped) begin chk(dout_data == 32'(next_out), "drain order"); next_out++; end
        end
      chk(count == 9'(tgt), "drained to target");
    end
    chk(next_out == seq, "every entry came out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
