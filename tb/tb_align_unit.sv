// tb_align_unit: random words and shifts against a multiply-by-power-of-two model.
module tb_align_unit;
  logic [31:0] din = '0, dout; logic [4:0] shl = '0;
  int checks = 0, failures = 0;
  align_unit dut (.*);
  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    for (int i = 0; i < 2000; i++) begin
      longint e;
      din = (i % 2) ? $urandom : 32'($urandom_range(0, 8191)) - 32'd4096;
      shl = (i < 200) ? 5'd19 : 5'($urandom_range(0, 31));
      e = longint'($signed(din)) * (longint'(1) << shl);
      #1 checks++;
      if (dout !== 32'(e)) begin failures++; if (failures < 10) $display("FAIL %h << %0d", din, shl); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
