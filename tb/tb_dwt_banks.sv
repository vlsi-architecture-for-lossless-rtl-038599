// tb_dwt_banks: the engine with each of six biorthogonal filter banks at the default
// size (512 x 512 image, 6 scales, all parameters of dwt_top at their defaults).
//
// For every bank (F1 9/7, F2 13/11, F3 6/10, F4 5/3, F5 2/6, F6 9/3 taps) it loads the
// analysis coefficients and the bank's integer bits per scale (b_int, through the
// configuration port), transforms a fresh random 12-bit image, and compares every
// DRAM word with the reference model. It then loads the synthesis coefficients, runs
// the inverse transform and checks the result against the reference model and against
// the original image: a lossless round trip with 32-bit data for every bank. The
// even-length banks (F3, F5) use half-sample symmetric filters placed inside the same
// 13-tap window; which bank needs which b_int comes with the reference model. Each
// run must also keep 13 multiplier cycles per result.
module tb_dwt_banks;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int unsigned TN   = N_DEF;
  localparam int unsigned TS   = S_DEF;
  localparam int unsigned TAW  = 2 * $clog2(TN);
  localparam int unsigned TDB  = $clog2(TN / 2) + 1;
  localparam int          WATCHDOG = 150_000_000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, dir = 1'b0, busy, done, mac_busy;
  logic coef_we = 1'b0; logic [4:0] coef_waddr = '0; logic [31:0] coef_wdata = '0;
  logic cfg_we = 1'b0, cfg_wsel = 1'b0; logic [2:0] cfg_waddr = '0; logic [TDB-1:0] cfg_wdata = '0;
  logic dram_rd, dram_wr, dram_ref, dram_rvalid;
  logic [TAW-1:0] dram_addr;
  logic [31:0] dram_wdata, dram_rdata;

  int checks = 0, failures = 0;
  longint mac_cycles = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) if (mac_busy) mac_cycles <= mac_cycles + 1;

  dwt_top u_dut (.*);

  dram_model #(.WORDS(TN * TN), .AWID(TAW)) u_mem (
    .clk, .rd(dram_rd), .wr(dram_wr), .refresh(dram_ref), .addr(dram_addr),
    .wdata(dram_wdata), .rdata(dram_rdata), .rvalid(dram_rvalid));

  // reset is asserted with a real falling edge so the asynchronous flops
  // start from a known state whatever the power-up values are
  initial #1 rst_n = 1'b0;

  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  task automatic load_coefs(input bit inverse, input int bank);
    int c [32];
    make_coefs(inverse, c, bank);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_waddr = 5'(i); coef_wdata = c[i];
    end
    @(negedge clk) coef_we = 1'b0;
  endtask

  task automatic load_bint(input int bank);
    for (int s = 0; s < 8; s++) begin
      @(negedge clk);
      cfg_we = 1'b1; cfg_wsel = 1'b0; cfg_waddr = 3'(s); cfg_wdata = TDB'(BANK_BINT[bank][s]);
    end
    @(negedge clk) cfg_we = 1'b0;
  endtask

  task automatic run(input bit inverse);
    longint m0, outs;
    outs = 0;
    for (int s = 1; s <= TS; s++) outs += 2 * longint'(TN >> (s - 1)) * longint'(TN >> (s - 1));
    @(negedge clk);
    dir = inverse; start = 1'b1;
    m0 = mac_cycles;
    @(negedge clk) start = 1'b0;
    @(posedge done);
    @(negedge clk);
    check(mac_cycles - m0 == 13 * outs, "13 multiplier cycles per result");
  endtask

  int orig [], gold [];

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    orig = new[TN * TN];
    for (int bank = 0; bank < 6; bank++) begin
      automatic int f0 = failures;
      for (int i = 0; i < TN * TN; i++) begin
        orig[i] = int'($urandom_range(0, 4095));
        u_mem.mem[i] = orig[i];
      end
      load_bint(bank);
      load_coefs(1'b0, bank);
      run(1'b0);
      gold = new[TN * TN](orig);
      transform(gold, TN, TS, 1'b0, BANK_BINT[bank], bank);
      for (int i = 0; i < TN * TN; i++)
        check(u_mem.mem[i] == gold[i], $sformatf("F%0d forward word %0d", bank + 1, i));
      load_coefs(1'b1, bank);
      run(1'b1);
      transform(gold, TN, TS, 1'b1, BANK_BINT[bank], bank);
      for (int i = 0; i < TN * TN; i++)
        check(u_mem.mem[i] == gold[i], $sformatf("F%0d inverse word %0d", bank + 1, i));
      for (int i = 0; i < TN * TN; i++)
        check(u_mem.mem[i] == orig[i], $sformatf("F%0d lossless pixel %0d", bank + 1, i));
      $display("filter bank F%0d (%0d-tap analysis low pass): %s", bank + 1, BANK_LH[bank],
               failures == f0 ? "bit-exact and lossless" : "FAILED");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
