// tb_mac_unit: drives 13-tap convolutions through the MAC with the accumulator control
// pattern of a macrocycle (LOAD, 12 x ACC, optional 6 x HOLD for a refresh) given three
// cycles after the operands, and compares each sum with a software dot product.
module tb_mac_unit;
  import dwt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b1;
  logic signed [31:0] data_in = '0, coef_in = '0;
  acc_ctl_e acc_ctl = ACC_HOLD;
  logic signed [63:0] acc;
  acc_ctl_e ctl_q [$];
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  mac_unit dut (.*);
  // reset is asserted with a real falling edge so the asynchronous flops
  // start from a known state whatever the power-up values are
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  // acc_ctl follows the operands with three cycles of delay
  always @(negedge clk) acc_ctl = (ctl_q.size() > 3) ? ctl_q.pop_front() : ACC_HOLD;
  initial begin
    longint sums [$];
    int holds = 0;
    repeat (3) ctl_q.push_back(ACC_HOLD);
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int r = 0; r < 200; r++) begin
      automatic longint s = 0;
      for (int k = 0; k < 13; k++) begin
        @(negedge clk);
        data_in = $urandom; coef_in = $urandom;
        if (r % 3 == 0) data_in = 32'($urandom_range(0, 8191)) - 32'd4096;
        s += longint'(data_in) * longint'(coef_in);
        ctl_q.push_back(k == 0 ? ACC_LOAD : ACC_ACC);
      end
      if (r % 5 == 4) for (int h = 0; h < 6; h++) begin
        @(negedge clk); data_in = $urandom; ctl_q.push_back(ACC_HOLD); holds++;
      end
      sums.push_back(s);
      // the sum of round r is complete 4 cycles after its last operand
      fork
        begin
          automatic longint e = s;
          repeat (4) @(posedge clk);
          #1 checks++;
          if (acc !== e) begin failures++; if (failures < 10) $display("FAIL round %0d", r); end
        end
      join_none
    end
    repeat (10) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
