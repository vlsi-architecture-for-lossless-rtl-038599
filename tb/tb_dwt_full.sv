// tb_dwt_full: end-to-end test of the transform engine at its default size: a 512 x 512
// image, 6 scales, refresh every 624 cycles (all parameters of dwt_top at their defaults).
//
// Runs a forward transform of a random 12-bit image held in a behavioural DRAM,
// compares every DRAM word with the reference model, then loads the synthesis
// coefficients, runs the inverse transform and compares with the reference model and
// with the original image (lossless round trip). It checks the multiplier work
// (13 accumulator cycles per result) and the total cycle count against the schedule
// (13-cycle macrocycles, 6 extra cycles per refresh, FIFO drain between scales), and
// that refresh extensions, both bank parities, the FIFO delay and the drains occurred.
module tb_dwt_full;
  import dwt_pkg::*;
  import dwt_ref_pkg::*;

  localparam int unsigned TN   = N_DEF;
  localparam int unsigned TS   = S_DEF;
  localparam int unsigned TREF = 624;
  localparam int unsigned TAW  = 2 * $clog2(TN);
  localparam int unsigned TDB  = $clog2(TN / 2) + 1;
  localparam longint      WATCHDOG = 64'd40_000_000;

  logic clk = 1'b0, rst_n = 1'b1;
  logic start = 1'b0, dir = 1'b0, busy, done, mac_busy;
  logic coef_we = 1'b0; logic [4:0] coef_waddr = '0; logic [31:0] coef_wdata = '0;
  logic cfg_we = 1'b0, cfg_wsel = 1'b0; logic [2:0] cfg_waddr = '0; logic [TDB-1:0] cfg_wdata = '0;
  logic dram_rd, dram_wr, dram_ref, dram_rvalid;
  logic [TAW-1:0] dram_addr;
  logic [31:0] dram_wdata, dram_rdata;

  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always_ff @(posedge clk) cyc <= cyc + 1;

  dwt_top u_dut (.*);

  dram_model #(.WORDS(TN * TN), .AWID(TAW)) u_mem (
    .clk, .rd(dram_rd), .wr(dram_wr), .refresh(dram_ref), .addr(dram_addr),
    .wdata(dram_wdata), .rdata(dram_rdata), .rvalid(dram_rvalid));

  // event counters
  longint mac_cycles = 0, ref_ext = 0, drain_cycles = 0, odd_writes = 0, even_writes = 0;
  int     max_fifo = 0;
  always_ff @(posedge clk) begin
    if (mac_busy) mac_cycles <= mac_cycles + 1;
    if (dram_ref && busy) ref_ext <= ref_ext + 1;
    if (u_dut.u_ctl.state == 2'd2) drain_cycles <= drain_cycles + 1;
    if (u_dut.ib_we && u_dut.ib_wodd) odd_writes <= odd_writes + 1;
    if (u_dut.ib_we && !u_dut.ib_wodd) even_writes <= even_writes + 1;
    if (int'(u_dut.fifo_count) > max_fifo) max_fifo <= int'(u_dut.fifo_count);
  end

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

  // expected cycles of one run: macrocycles of every scale, drain, refresh extensions
  function automatic longint expected_cycles(input bit inverse, input longint refs);
    longint t = 0;
    for (int step = 0; step < TS; step++) begin
      int s, n, d, dn;
      s  = inverse ? TS - step : step + 1;
      n  = TN >> (s - 1);
      d  = (TN >> s) - 6;
      dn = (step == TS - 1) ? 0 : (TN >> (inverse ? s - 1 : s + 1)) - 6;
      t += 13 * (longint'(2 * n * n) + 14 + ((d - dn > 1) ? d - dn : 1));
    end
    return t + 6 * refs;
  endfunction

  real util [2];

  task automatic run(input bit inverse, output longint cycles);
    longint t0, r0, m0;
    @(negedge clk);
    dir = inverse; start = 1'b1;
    @(negedge clk) start = 1'b0;
    t0 = cyc - 1; r0 = ref_ext; m0 = mac_cycles;
    @(posedge done);
    cycles = cyc - t0;
    @(negedge clk);
    begin
      longint outs = 0, exp_c;
      for (int s = 1; s <= TS; s++) outs += 2 * (TN >> (s - 1)) * (TN >> (s - 1));
      util[inverse] = 100.0 * real'(mac_cycles - m0) / real'(cycles);
      check(mac_cycles - m0 == 13 * outs, "13 multiplier cycles per result");
      exp_c = expected_cycles(inverse, ref_ext - r0);
      check(cycles >= exp_c - 2 && cycles <= exp_c + 2, "cycle count of the schedule");
      $display("%s: %0d cycles (expected %0d), %0d results, %0d refreshes, utilisation %0.2f%%",
               inverse ? "inverse" : "forward", cycles, exp_c, outs, ref_ext - r0,
               100.0 * real'(mac_cycles - m0) / real'(cycles));
    end
  endtask

  int orig [], gold [];
  int bint [8] = '{13, 16, 17, 19, 21, 23, 25, 27};
  longint cyc_f, cyc_i;

  initial begin
    repeat (3) @(negedge clk);
    // the image is written into the memory model while the engine is in reset
    orig = new[TN * TN];
    for (int i = 0; i < TN * TN; i++) begin
      orig[i] = int'($urandom_range(0, 4095));
      u_mem.mem[i] = orig[i];
    end
    rst_n = 1'b1;
    load_coefs(1'b0);
    run(1'b0, cyc_f);
    gold = new[TN * TN](orig);
    transform(gold, TN, TS, 1'b0, bint);
    for (int i = 0; i < TN * TN; i++) check(u_mem.mem[i] == gold[i], $sformatf("forward word %0d", i));

    load_coefs(1'b1);
    run(1'b1, cyc_i);
    transform(gold, TN, TS, 1'b1, bint);
    for (int i = 0; i < TN * TN; i++) check(u_mem.mem[i] == gold[i], $sformatf("inverse word %0d", i));
    for (int i = 0; i < TN * TN; i++) check(u_mem.mem[i] == orig[i], $sformatf("lossless pixel %0d", i));

    // the target rate: 3.5 images/s at 33 MHz needs at most 33e6/3.5 cycles per image
    check(cyc_f <= 64'd9_428_571 && cyc_i <= 64'd9_428_571, "3.5 images/s at 33 MHz");
    // multiplier utilisation reported for the design: 99.04 %
    check(util[0] >= 98.9 && util[1] >= 98.9, "multiplier utilisation of at least 98.9 %");
    // every mechanism must have happened
    check(ref_ext > 0, "refresh extension happened");
    check(odd_writes > 0 && even_writes > 0, "both bank parities used");
    check(max_fifo >= (TN / 2) - 6, "FIFO delay reached D(1)");
    check(drain_cycles > 0, "FIFO drain between scales happened");
    $display("events: refresh=%0d odd_lines_writes=%0d even_lines_writes=%0d max_fifo=%0d drain_cycles=%0d",
             ref_ext, odd_writes, even_writes, max_fifo, drain_cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
