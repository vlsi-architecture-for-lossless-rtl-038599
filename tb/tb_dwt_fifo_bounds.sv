// tb_dwt_fifo_bounds: the write-after-read and read-after-write hazards that the output
// FIFO delay D(s) must cover, on a 128 x 128 image with 4 scales.
//
// A result overwrites a sample of its own line, so its DRAM write must wait until the
// old value has been read (lower bound on D). It also must not wait so long that the
// next pass reads the old value of a position that the previous pass has not yet
// written (upper bound on D). For each scale this testbench overwrites D(s) through the
// configuration port, runs a forward and an inverse transform of a random image, and
// checks the outcome against the reference model:
//  * at the lowest and the highest safe D both transforms must be bit-exact and the
//    round trip lossless;
//  * one step outside (where the FIFO can hold it) the data must be corrupted, which
//    shows that the hazard is real and that the bound is tight.
// The safe range for a line of n samples with this design's schedule is
// n/2 - 9 .. n - 10 (never below 0); on the first scale the FIFO size, N/2 entries,
// caps the upper end. The default D(s) = N/2^s - 6 = n/2 - 6 lies inside every range.
module tb_dwt_fifo_bounds;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int unsigned TN   = 128;
  localparam int unsigned TS   = 4;
  localparam int unsigned TAW  = 2 * $clog2(TN);
  localparam int unsigned TDB  = $clog2(TN / 2) + 1;
  localparam int          WATCHDOG = 40_000_000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, dir = 1'b0, busy, done, mac_busy;
  logic coef_we = 1'b0; logic [4:0] coef_waddr = '0; logic [31:0] coef_wdata = '0;
  logic cfg_we = 1'b0, cfg_wsel = 1'b0; logic [2:0] cfg_waddr = '0; logic [TDB-1:0] cfg_wdata = '0;
  logic dram_rd, dram_wr, dram_ref, dram_rvalid;
  logic [TAW-1:0] dram_addr;
  logic [31:0] dram_wdata, dram_rdata;

  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  dwt_top #(.N(TN), .S(TS), .REFRESH_CYCLES(624)) u_dut (.*);

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

  task automatic load_coefs(input bit inverse);
    int c [32];
    make_coefs(inverse, c);
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      coef_we = 1'b1; coef_waddr = 5'(i); coef_wdata = c[i];
    end
    @(negedge clk) coef_we = 1'b0;
  endtask

  task automatic set_d(input int s, input int d);
    @(negedge clk);
    cfg_we = 1'b1; cfg_wsel = 1'b1; cfg_waddr = 3'(s); cfg_wdata = TDB'(d);
    @(negedge clk) cfg_we = 1'b0;
  endtask

  task automatic run(input bit inverse);
    @(negedge clk);
    dir = inverse; start = 1'b1;
    @(negedge clk) start = 1'b0;
    @(posedge done);
    @(negedge clk);
  endtask

  int orig [], gold [];
  int bint [8] = '{13, 16, 17, 19, 21, 23, 25, 27};

  // Runs a forward and an inverse transform with D(s) = d and returns the number of
  // DRAM words that differ from the reference model or from the original image.
  task automatic trial(input int s, input int d, output int wrong);
    wrong = 0;
    for (int i = 0; i < TN * TN; i++) begin
      orig[i] = int'($urandom_range(0, 4095));
      u_mem.mem[i] = orig[i];
    end
    set_d(s, d);
    load_coefs(1'b0);
    run(1'b0);
    gold = new[TN * TN](orig);
    transform(gold, TN, TS, 1'b0, bint);
    for (int i = 0; i < TN * TN; i++) if (u_mem.mem[i] != gold[i]) wrong++;
    load_coefs(1'b1);
    run(1'b1);
    for (int i = 0; i < TN * TN; i++) if (u_mem.mem[i] != orig[i]) wrong++;
    set_d(s, (TN >> s) - 6);
  endtask

  int hazards = 0;

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    orig = new[TN * TN];
    for (int s = 1; s <= TS; s++) begin
      automatic int n  = TN >> (s - 1);
      automatic int lo = (n / 2 > 9) ? n / 2 - 9 : 0;
      automatic int hi = (n - 10 < TN / 2 - 1) ? n - 10 : TN / 2 - 1;
      automatic int wrong;
      trial(s, lo, wrong);
      check(wrong == 0, $sformatf("scale %0d: D = %0d (lowest safe) gives %0d wrong words", s, lo, wrong));
      trial(s, hi, wrong);
      check(wrong == 0, $sformatf("scale %0d: D = %0d (highest safe) gives %0d wrong words", s, hi, wrong));
      trial(s, (TN >> s) - 6, wrong);
      check(wrong == 0, $sformatf("scale %0d: default D = %0d gives %0d wrong words", s, (TN >> s) - 6, wrong));
      if (lo > 0) begin
        trial(s, lo - 1, wrong);
        check(wrong > 0, $sformatf("scale %0d: D = %0d should break write-after-read", s, lo - 1));
        if (wrong > 0) hazards++;
      end
      if (hi < TN / 2 - 1) begin
        trial(s, hi + 1, wrong);
        check(wrong > 0, $sformatf("scale %0d: D = %0d should break read-after-write", s, hi + 1));
        if (wrong > 0) hazards++;
      end
      $display("scale %0d (lines of %0d): safe D = %0d .. %0d, default %0d", s, n, lo, hi, (TN >> s) - 6);
    end
    // both kinds of hazard must have been provoked
    check(hazards >= 2 * TS - 2, $sformatf("hazards provoked: %0d", hazards));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
