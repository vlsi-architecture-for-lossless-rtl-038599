// dwt_top: forward / inverse 2-D discrete wavelet transform engine for lossless
// compression of N x N medical images (N = 512, 12-bit pixels, S = 6 scales).
//
// The image lives in an external DRAM (one 32-bit word per pixel, row-major) and is
// transformed in place: each sample is read once and each result written once. One
// 13-tap convolution result is produced per 13-cycle macrocycle by a single pipelined
// 32x32 multiplier and a 64-bit accumulator; data between scales are 32-bit fixed point
// whose integer part grows with the scale (config_mem).
//
// Blocks: dwt_controller (macrocycle and scale sequencing), dram_manager (DRAM
// commands, refresh), input_buffer (32-word, two banks), coef_ram (32 coefficients),
// align_unit, mac_unit (operand registers, pipe_mult, accumulator), round_align,
// output_fifo (N/2-entry delay FIFO), config_mem (b_int and FIFO delay per scale).
//
// Host interface (this design's choice): load coefficients through coef_*, optionally
// overwrite the per-scale configuration through cfg_*, then pulse `start` with `dir`
// (0 forward, 1 inverse); `busy` is high until `done` pulses. mac_busy is high in every
// cycle the accumulator takes a product (for utilisation measurements). The DRAM
// command port is registered (this design's choice), so every read, write and refresh
// reaches the DRAM one cycle after the schedule slot that issues it.
module dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned N              = N_DEF,
  parameter int unsigned S              = S_DEF,
  parameter int unsigned REFRESH_CYCLES = 624,
  parameter int unsigned AWID           = 2 * $clog2(N),
  parameter int unsigned DBITS          = $clog2(N / 2) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             dir,          // 0: forward (FDWT), 1: inverse (IDWT)
  output logic             busy,
  output logic             done,
  output logic             mac_busy,
  input  logic             coef_we,
  input  logic [4:0]       coef_waddr,
  input  logic [DW-1:0]    coef_wdata,
  input  logic             cfg_we,
  input  logic             cfg_wsel,
  input  logic [2:0]       cfg_waddr,
  input  logic [DBITS-1:0] cfg_wdata,
  output logic             dram_rd,
  output logic             dram_wr,
  output logic             dram_ref,
  output logic [AWID-1:0]  dram_addr,
  output logic [DW-1:0]    dram_wdata,
  input  logic [DW-1:0]    dram_rdata,
  input  logic             dram_rvalid
);
  logic [5:0]       bint [8];
  logic [DBITS-1:0] dfifo [8];

  logic            ref_pending, ref_slot;
  logic            rd_req, rd_odd;
  logic [AWID-1:0] rd_addr;
  logic [LW-1:0]   rd_t, rd_n;
  logic [LW-1:0]   ib_pos, ib_n, ib_wt, ib_wn;
  logic            ib_odd, ib_we, ib_wodd;
  logic [DW-1:0]   ib_wdata, ib_rdata, aligned, coef;
  logic [4:0]      coef_raddr, align_shl;
  acc_ctl_e        acc_ctl;
  logic signed [ACCW-1:0] acc;
  logic            round_en;
  logic [5:0]      rshift;
  logic [DW-1:0]   result;
  logic            fifo_push, fifo_pop_req, fifo_popped;
  logic [AWID-1:0] fifo_push_addr, fifo_out_addr;
  logic [DW-1:0]   fifo_out_data;
  logic [DBITS-1:0] d_target;
  logic [DBITS-1:0] fifo_count;

  config_mem #(.N(N), .DBITS(DBITS)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .wsel(cfg_wsel), .waddr(cfg_waddr), .wdata(cfg_wdata),
    .bint, .dfifo);

  dwt_controller #(.N(N), .S(S), .AWID(AWID), .DBITS(DBITS)) u_ctl (
    .clk, .rst_n, .start, .dir(dir_e'(dir)), .busy, .done, .bint, .dfifo,
    .ref_pending, .ref_slot, .rd_req, .rd_addr, .rd_t, .rd_n, .rd_odd,
    .ib_pos, .ib_n, .ib_odd, .coef_addr(coef_raddr), .align_shl,
    .acc_ctl, .mac_busy, .round_en, .rshift, .fifo_push, .fifo_push_addr,
    .fifo_pop_req, .d_target, .fifo_count);

  dram_manager #(.AWID(AWID), .REFRESH_CYCLES(REFRESH_CYCLES)) u_dram (
    .clk, .rst_n, .engine_busy(busy), .rd_req, .rd_addr, .rd_t, .rd_n, .rd_odd,
    .ref_slot, .ref_pending, .wr_valid(fifo_popped), .wr_addr(fifo_out_addr),
    .wr_data(fifo_out_data), .ib_we, .ib_t(ib_wt), .ib_n(ib_wn), .ib_odd(ib_wodd),
    .ib_data(ib_wdata), .dram_rd, .dram_wr, .dram_ref, .dram_addr, .dram_wdata,
    .dram_rdata, .dram_rvalid);

  input_buffer u_ibuf (
    .clk, .we(ib_we), .w_t(ib_wt), .w_n(ib_wn), .w_odd(ib_wodd), .w_data(ib_wdata),
    .r_pos(ib_pos), .r_n(ib_n), .r_odd(ib_odd), .r_data(ib_rdata));

  coef_ram u_coef (
    .clk, .we(coef_we), .waddr(coef_waddr), .wdata(coef_wdata),
    .raddr(coef_raddr), .rdata(coef));

  align_unit u_align (.din(ib_rdata), .shl(align_shl), .dout(aligned));

  mac_unit u_mac (.clk, .rst_n, .data_in(aligned), .coef_in(coef), .acc_ctl, .acc);

  round_align u_round (.clk, .en(round_en), .acc, .rshift, .dout(result));

  output_fifo #(.DEPTH(N / 2), .AWID(AWID)) u_fifo (
    .clk, .rst_n, .push(fifo_push), .push_addr(fifo_push_addr), .push_data(result),
    .pop_req(fifo_pop_req), .d_target(d_target), .popped(fifo_popped),
    .dout_addr(fifo_out_addr), .dout_data(fifo_out_data), .count(fifo_count));
endmodule
