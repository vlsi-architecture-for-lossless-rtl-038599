// dwt_controller: macrocycle sequencer of the 2-D DWT engine.
//
// Every macrocycle (13 cycles, 0..12) the engine reads one sample from DRAM, performs
// the 13 multiply-accumulates of one convolution result and writes one result back, so
// the multiplier is busy on every cycle except during DRAM refresh. When the DRAM
// manager asks for a refresh the macrocycle is extended to 19 cycles (13..18); the
// accumulator holds, and the three taps issued in cycles 10..12 are issued again in
// cycles 16..18.
//
// Cycle plan of a macrocycle (c = cycle):
//   c=0     DRAM read of the next input sample; accumulator LOAD (tap 0 arrives)
//   c=0..9  taps 3..12 of the current result are issued to the buffer/coefficient RAM
//   c=1     the previous result (rounded in c=0) is pushed into the output FIFO
//   c=5     FIFO pop request; c=6 the popped result is written to DRAM
//   c=10..12 taps 0..2 of the next result are issued; c=12 refresh branch
//   c=13..18 refresh extension (refresh command in c=13, taps 0..2 again in 16..18)
// A tap issued in cycle c reaches the accumulator in cycle c+3.
//
// Order of work: a forward transform runs scales 1..S, each as a column pass then a
// row pass over the top-left n x n block (n = N/2^(s-1)); the inverse runs scales S..1,
// rows then columns. Within a scale, reads and results of consecutive lines and of the
// two passes are pipelined without gaps: result G of the scale (G = 0..2n^2-1) is
// computed in macrocycle G+13 of the scale while input sample G+13 is read. Between
// scales the pipeline empties and the output FIFO drains down to the next scale's
// delay D (to 0 after the last scale), then `done` pulses.
//
// Forward: a line's results go to the Mallat layout (even results, low pass, to the
// first half; odd results, high pass, to the second half). Inverse: samples are read
// interleaved from the two halves and results are written in natural order.
//
// Fixed point: data of scale s have F(s) = 32 - b_int(s) fractional bits, coefficients
// 30. A result is shifted right by F_in + 30 - F_out; the last inverse pass rounds to
// integer pixels. The macrocycle, the refresh extension, the reissue of taps 1..3 and
// the accumulator controls follow the operation schedule of the document; the exact
// cycles of the FIFO push/pop, the scale-boundary drain and the read order are this
// design's choices.
module dwt_controller
  import dwt_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned S     = S_DEF,
  parameter int unsigned LOGN  = $clog2(N),
  parameter int unsigned AWID  = 2 * LOGN,
  parameter int unsigned DBITS = $clog2(N / 2) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  dir_e             dir,
  output logic             busy,
  output logic             done,
  // configuration
  input  logic [5:0]       bint [8],
  input  logic [DBITS-1:0] dfifo [8],
  // DRAM manager
  input  logic             ref_pending,
  output logic             ref_slot,      // this cycle is the refresh slot (c = 13)
  output logic             rd_req,
  output logic [AWID-1:0]  rd_addr,
  output logic [LW-1:0]    rd_t,
  output logic [LW-1:0]    rd_n,
  output logic             rd_odd,
  // input buffer read port, coefficient RAM, alignment
  output logic [LW-1:0]    ib_pos,
  output logic [LW-1:0]    ib_n,
  output logic             ib_odd,
  output logic [4:0]       coef_addr,
  output logic [4:0]       align_shl,
  // MAC, rounding, output FIFO
  output acc_ctl_e         acc_ctl,
  output logic             mac_busy,      // the accumulator takes a product this cycle
  output logic             round_en,
  output logic [5:0]       rshift,
  output logic             fifo_push,
  output logic [AWID-1:0]  fifo_push_addr,
  output logic             fifo_pop_req,
  output logic [DBITS-1:0] d_target,
  input  logic [DBITS-1:0] fifo_count
);
  typedef enum logic [1:0] {ST_IDLE, ST_RUN, ST_DRAIN} state_e;

  state_e      state;
  logic [4:0]  cyc;
  logic [LW+LW:0] slot;       // macrocycle index within the scale
  logic [2:0]  s;
  dir_e        dir_q;

  // scale geometry
  logic [4:0]       ln;
  logic [LW-1:0]    n;
  logic [LW+LW:0]   nn2;      // 2 n^2 results per scale
  logic             last_scale;
  logic [2:0]       s_next;

  always_comb begin
    ln         = 5'(LOGN) - 5'(s) + 5'd1;
    n          = LW'(1) << ln;
    nn2        = (LW+LW+1)'(1) << (2 * ln + 1);
    last_scale = (dir_q == DIR_FWD) ? (s == 3'(S)) : (s == 3'd1);
    s_next     = (dir_q == DIR_FWD) ? s + 3'd1 : s - 3'd1;
  end

  function automatic logic pass_is_col(input logic pass, input dir_e d);
    return (d == DIR_FWD) ? !pass : pass;
  endfunction

  // ---------------- read side ----------------
  logic [LW+LW:0] g_rd;
  logic           rd_pass;
  logic [LW-1:0]  rd_line, rd_q, rd_pos;
  always_comb begin
    g_rd    = slot;
    rd_pass = g_rd[2*ln];
    rd_line = LW'(g_rd >> ln) & (n - 1'b1);
    rd_t    = LW'(g_rd) & (n - 1'b1);
    rd_n    = n;
    rd_odd  = rd_line[0];
    rd_q    = stream_pos(rd_t, n);
    rd_pos  = (dir_q == DIR_FWD) ? rd_q : perm_pos(rd_q, n);
    rd_addr = AWID'(line_addr(pass_is_col(rd_pass, dir_q), rd_line, rd_pos, LW'(N)));
    rd_req  = (state == ST_RUN) && (cyc == 5'd0) && (slot < nn2);
  end

  // ---------------- tap issue side ----------------
  logic           iss_valid;
  logic [3:0]     tap;
  logic [LW+LW:0] g_is;
  logic           is_pass;
  logic [LW-1:0]  is_line, is_m, is_wpos;
  logic [5:0]     is_rshift;
  always_comb begin
    tap       = 4'd0;
    iss_valid = 1'b0;
    g_is      = '0;
    if (cyc <= 5'd9) begin
      tap       = 4'(cyc + 5'd3);
      iss_valid = (slot >= 13) && (slot - 13 < nn2);
      g_is      = slot - 13;
    end else if (cyc <= 5'd12 || cyc >= 5'd16) begin
      tap       = (cyc <= 5'd12) ? 4'(cyc - 5'd10) : 4'(cyc - 5'd16);
      iss_valid = (slot >= 12) && (slot - 12 < nn2);
      g_is      = slot - 12;
    end
    iss_valid = iss_valid && (state == ST_RUN);
    is_pass   = g_is[2*ln];
    is_line   = LW'(g_is >> ln) & (n - 1'b1);
    is_m      = LW'(g_is) & (n - 1'b1);
    ib_pos    = (is_m + LW'(tap) - LW'(HALF)) & (n - 1'b1);
    ib_n      = n;
    ib_odd    = is_line[0];
    coef_addr = {is_m[0], tap};
    align_shl = (dir_q == DIR_FWD && s == 3'd1 && !is_pass) ? 5'(6'd32 - bint[0]) : 5'd0;
    is_wpos   = (dir_q == DIR_FWD) ? perm_pos(is_m, n) : is_m;
    if (dir_q == DIR_FWD)
      is_rshift = is_pass ? 6'(CFRAC) : 6'(CFRAC) + bint[s] - bint[s - 3'd1];
    else if (!is_pass)
      is_rshift = 6'(CFRAC);
    else if (s == 3'd1)
      is_rshift = 6'(CFRAC) + 6'd32 - bint[1];
    else
      is_rshift = 6'(CFRAC) - (bint[s] - bint[s - 3'd1]);
  end

  // issue-valid delay line: product of a tap reaches the accumulator 3 cycles later
  logic [2:0] v_d;
  logic       fin_valid;
  logic [AWID-1:0] fin_addr;
  logic [5:0] fin_rshift;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      v_d <= '0; fin_valid <= 1'b0; fin_addr <= '0; fin_rshift <= 6'd1;
    end else begin
      v_d <= {v_d[1:0], iss_valid};
      if (cyc == 5'd9) begin       // tap 12 issued: remember where the result goes
        fin_valid  <= iss_valid;
        fin_addr   <= AWID'(line_addr(pass_is_col(is_pass, dir_q), is_line, is_wpos, LW'(N)));
        fin_rshift <= is_rshift;
      end
    end

  always_comb begin
    acc_ctl = ACC_HOLD;
    if (v_d[2]) begin
      if (cyc == 5'd0)       acc_ctl = ACC_LOAD;
      else if (cyc <= 5'd12) acc_ctl = ACC_ACC;
    end
    mac_busy       = (acc_ctl != ACC_HOLD);
    round_en       = (cyc == 5'd0) && fin_valid;
    rshift         = fin_rshift;
    fifo_push      = (cyc == 5'd1) && fin_valid;
    fifo_push_addr = fin_addr;
    fifo_pop_req   = (state != ST_IDLE) && (cyc == 5'd5);
    d_target       = (state == ST_DRAIN) ? (last_scale ? '0 : dfifo[s_next]) : dfifo[s];
    ref_slot       = (cyc == 5'd13);
    busy           = (state != ST_IDLE);
  end

  // ---------------- macrocycle and scale sequencing ----------------
  logic macro_end;
  always_comb macro_end = (cyc == 5'(MACRO_R - 1)) || (cyc == 5'(MACRO - 1) && !ref_pending);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state <= ST_IDLE; cyc <= '0; slot <= '0; s <= 3'd1; dir_q <= DIR_FWD; done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (state == ST_IDLE) begin
        cyc <= '0;
        slot <= '0;
        if (start) begin
          dir_q <= dir;
          s     <= (dir == DIR_FWD) ? 3'd1 : 3'(S);
          state <= ST_RUN;
        end
      end else begin
        cyc <= macro_end ? 5'd0 : cyc + 5'd1;
        if (macro_end) begin
          if (state == ST_RUN) begin
            if (slot == nn2 + 13) begin
              slot  <= '0;
              state <= ST_DRAIN;
            end else slot <= slot + 1'b1;
          end else if (fifo_count <= d_target) begin
            if (last_scale) begin
              state <= ST_IDLE;
              done  <= 1'b1;
            end else begin
              s     <= s_next;
              state <= ST_RUN;
            end
          end
        end
      end
    end

  // The scale range must fit the line-buffer folding (lines of at least 16 samples).
  initial assert (N >> (S - 1) >= 16) else $error("N/2^(S-1) must be at least 16");
  initial assert (consts_ok()) else $error("inconsistent constants in dwt_pkg");
endmodule
