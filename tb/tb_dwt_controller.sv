// tb_dwt_controller: runs the sequencer alone (N = 32, S = 2) with a model of the
// output FIFO occupancy and random refresh requests, and checks the schedule: one read
// and one result per macrocycle, macrocycles of 13 cycles or 19 with a refresh, the
// LOAD / 12 x ACC accumulator pattern per result, the read order and write layout of the
// first column, and the number of reads and results per transform in both directions.
module tb_dwt_controller;
  import dwt_pkg::*;
  localparam int TN = 32, TS = 2, AW = 10, DB = 5;
  logic clk = 1'b0, rst_n = 1'b1, start = 1'b0, busy, done;
  dir_e dir = DIR_FWD;
  logic [5:0] bint [8] = '{6'd13, 6'd16, 6'd17, 6'd19, 6'd21, 6'd23, 6'd25, 6'd27};
  logic [DB-1:0] dfifo [8] = '{5'd0, 5'd10, 5'd2, 5'd0, 5'd0, 5'd0, 5'd0, 5'd0};
  logic ref_pending = 1'b0, ref_slot, rd_req, rd_odd, ib_odd, mac_busy, round_en;
  logic fifo_push, fifo_pop_req;
  logic [AW-1:0] rd_addr, fifo_push_addr;
  logic [LW-1:0] rd_t, rd_n, ib_pos, ib_n;
  logic [4:0] coef_addr, align_shl;
  acc_ctl_e acc_ctl;
  logic [5:0] rshift;
  logic [DB-1:0] d_target, fifo_count = '0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  dwt_controller #(.N(TN), .S(TS)) dut (.*);

  // FIFO occupancy model
  always_ff @(posedge clk)
    fifo_count <= fifo_count + DB'(fifo_push) - DB'(fifo_pop_req && (fifo_count > d_target));

  // random refresh requests, cleared by the refresh slot
  always_ff @(posedge clk)
    if (ref_slot) ref_pending <= 1'b0;
    else if ($urandom_range(0, 299) == 0) ref_pending <= 1'b1;

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

  int reads, pushes, loads, accs, refs, bad_gap, last_rd, ncyc;
  int rd_list [$], push_list [$];
  always_ff @(posedge clk) if (busy) begin
    ncyc <= ncyc + 1;
    if (rd_req) begin
      reads <= reads + 1;
      rd_list.push_back(int'(rd_addr));
      if (last_rd >= 0 && !(ncyc - last_rd == 13 || ncyc - last_rd == 19)) bad_gap <= bad_gap + 1;
      last_rd <= ncyc;
    end
    if (fifo_push) begin pushes <= pushes + 1; push_list.push_back(int'(fifo_push_addr)); end
    if (acc_ctl == ACC_LOAD) loads <= loads + 1;
    if (acc_ctl == ACC_ACC) accs <= accs + 1;
    if (ref_slot) refs <= refs + 1;
  end

  task automatic run(input dir_e d);
    int outs;
    reads = 0; pushes = 0; loads = 0; accs = 0; refs = 0; bad_gap = 0; last_rd = -1; ncyc = 0;
    rd_list.delete(); push_list.delete();
    @(negedge clk) begin dir = d; start = 1'b1; end
    @(negedge clk) start = 1'b0;
    @(posedge done);
    @(negedge clk);
    outs = 2 * TN * TN + 2 * (TN / 2) * (TN / 2);
    chk(reads == outs, $sformatf("reads %0d", reads));
    chk(pushes == outs, "results pushed");
    chk(loads == outs && accs == 12 * outs, "LOAD + 12 ACC per result");
    chk(bad_gap <= 2 * TS, "reads 13 or 19 cycles apart within a scale");
    chk(refs > 0, "refresh extensions happened");
    chk(fifo_count == 0, "FIFO drained at the end");
    // forward: first column of scale 1, positions 26..31, 0..25 read
    for (int t = 0; t < TN; t++) begin
      automatic int q = (t < 6) ? TN - 6 + t : t - 6;
      automatic int p = (d == DIR_FWD) ? q : ((q % 2) ? TN / 2 + q / 2 : q / 2);
      if (d == DIR_FWD) chk(rd_list[t] == p * TN, $sformatf("read %0d address", t));
    end
    // first column's results: Mallat layout
    if (d == DIR_FWD)
      for (int m = 0; m < TN; m++)
        chk(push_list[m] == ((m % 2) ? TN / 2 + m / 2 : m / 2) * TN, $sformatf("result %0d address", m));
    else begin
      // inverse starts with scale S, rows of the 16 x 16 block, interleaved reads
      for (int t = 0; t < TN / 2; t++) begin
        automatic int q = (t < 6) ? TN / 2 - 6 + t : t - 6;
        chk(rd_list[t] == ((q % 2) ? TN / 4 + q / 2 : q / 2), $sformatf("inverse read %0d address", t));
      end
      for (int m = 0; m < TN / 2; m++) chk(push_list[m] == m, $sformatf("inverse result %0d address", m));
    end
    $display("%s: %0d cycles, %0d refreshes", d == DIR_FWD ? "forward" : "inverse", ncyc, refs);
  endtask

  initial begin
    ncyc = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    run(DIR_FWD);
    run(DIR_INV);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
