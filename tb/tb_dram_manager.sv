// tb_dram_manager: checks the DRAM command side: reads registered onto the port with the
// sample's stream index kept until the data return into the input buffer, writes
// registered with address and data, refresh requested every REFRESH_CYCLES cycles and
// issued one cycle after the refresh slot (or at once when the engine is idle).
module tb_dram_manager;
  import dwt_pkg::*;
  localparam int RC = 50;
  logic clk = 1'b0, rst_n = 1'b1, engine_busy = 1'b1;
  logic rd_req = 1'b0, rd_odd = 1'b0, ref_slot = 1'b0, ref_pending, wr_valid = 1'b0;
  logic [17:0] rd_addr = '0, wr_addr = '0, dram_addr;
  logic [LW-1:0] rd_t = '0, rd_n = '0, ib_t, ib_n;
  logic [31:0] wr_data = '0, ib_data, dram_wdata, dram_rdata = '0;
  logic ib_we, ib_odd, dram_rd, dram_wr, dram_ref, dram_rvalid = 1'b0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;
  dram_manager #(.AWID(18), .REFRESH_CYCLES(RC)) dut (.*);
  // reset is asserted with a real falling edge so the asynchronous flops
  // start from a known state whatever the power-up values are
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic chk(input bit ok, input string what);
    checks++; if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  // a DRAM returning mem = addr ^ 32'hA5A5_0000 two cycles after a read
  logic [17:0] a1, a2; logic v1 = 1'b0, v2 = 1'b0;
  always_ff @(posedge clk) begin
    v1 <= dram_rd; a1 <= dram_addr; v2 <= v1; a2 <= a1;
  end
  always_comb begin dram_rvalid = v2; dram_rdata = {14'h0, a2} ^ 32'hA5A5_0000; end

  int refs = 0;
  always_ff @(posedge clk) if (dram_ref) refs <= refs + 1;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // 13-cycle macrocycles: read request at c0, write at c6, refresh slot c13 when
    // extended; each command is seen on the registered port one cycle later
    for (int m = 0; m < 100; m++) begin
      automatic bit ext = ref_pending;
      automatic int t = m % 32;
      automatic logic [17:0] a = 18'($urandom);
      for (int c = 0; c < (ext ? 19 : 13); c++) begin
        @(negedge clk);
        rd_req = (c == 0); rd_addr = a; rd_t = LW'(t); rd_n = LW'(32); rd_odd = m[0];
        wr_valid = (c == 6); wr_addr = ~a; wr_data = 32'(m);
        ref_slot = (c == 13);
        #1;
        if (c == 1) chk(dram_rd && dram_addr == a, "read registered onto the port");
        if (c == 7) chk(dram_wr && dram_addr == ~a && dram_wdata == 32'(m), "write registered onto the port");
        if (c == 14) chk(dram_ref, "refresh issued one cycle after the refresh slot");
        if (c == 4) chk(ib_we && ib_t == LW'(t) && ib_n == LW'(32) && ib_odd == m[0] &&
                        ib_data == ({14'h0, a} ^ 32'hA5A5_0000), "read data into the buffer");
        if (c != 4) chk(!ib_we, "no spurious buffer write");
      end
    end
    rd_req = 1'b0; wr_valid = 1'b0; ref_slot = 1'b0;
    // expected number of refreshes: one per RC cycles (within one)
    chk(refs >= 1300 / RC - 2, $sformatf("refresh rate (%0d)", refs));
    // idle: a pending refresh is issued at once
    engine_busy = 1'b0;
    wait (ref_pending);
    @(posedge clk);
    #1 chk(!ref_pending, "idle refresh served at once");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
