// dwt_pkg: types, constants and address functions shared by the 2-D DWT engine.
//
// The engine computes a forward or inverse multi-scale 2-D wavelet transform of an
// N x N image held in an external DRAM, one 13-tap convolution per 13-cycle
// "macrocycle", with one 32x32 multiplier and a 64-bit accumulator. The constants
// below are the configuration described for the design: N = 512, S = 6 scales,
// 13-tap filters, 32-bit data and coefficients, 64-bit accumulation.
//
// Address functions:
//  * ibuf_loc   maps the position of a sample in a line's read stream onto the 32-word
//               input buffer, folded in two 16-word banks (border bank / cycling bank,
//               swapped on odd lines).
//  * stream_pos gives the line position of the t-th sample read for a line: the last
//               HALF samples first (left border of the periodic extension), then the
//               rest in order. This order is this design's reading of the schedule.
//  * perm_pos   is the in-place Mallat layout: even outputs (low pass) go to the first
//               half of a line, odd outputs (high pass) to the second half.
//  * line_addr  turns (pass, line, position) into a row-major DRAM word address.
package dwt_pkg;

  localparam int unsigned DW      = 32;   // data and coefficient word
  localparam int unsigned ACCW    = 64;   // accumulator word
  localparam int unsigned TAPS    = 13;   // filter length L = 2*HALF+1
  localparam int unsigned HALF    = (TAPS - 1) / 2;  // l = 6
  localparam int unsigned BANK    = 16;   // words per input-buffer bank
  localparam int unsigned BSIZE   = 32;   // input-buffer words (4*l+1 = 25 rounded up)
  localparam int unsigned CFRAC   = 30;   // fractional bits of a coefficient (Q2.30)
  localparam int unsigned MACRO   = 13;   // cycles of a macrocycle without refresh
  localparam int unsigned MACRO_R = 19;   // cycles of a macrocycle extended by a refresh
  localparam int unsigned N_DEF   = 512;  // image rows/columns
  localparam int unsigned S_DEF   = 6;    // number of scales
  localparam int unsigned LW      = 16;   // width of line-position counters

  // Relations between the constants that the schedule relies on: two banks make the
  // buffer and hold the 4l+1 words in use, one cycle per tap, a 6-cycle refresh
  // extension, a full-precision product and the smallest line at least one bank long.
  function automatic bit consts_ok();
    return (BSIZE == 2 * BANK) && (BSIZE >= 4 * HALF + 1) && (MACRO == TAPS) &&
           (MACRO_R == MACRO + 6) && (ACCW == 2 * DW) && (CFRAC < DW) &&
           ((N_DEF >> (S_DEF - 1)) >= BANK);
  endfunction

  typedef enum logic [1:0] {ACC_HOLD = 2'd0, ACC_LOAD = 2'd1, ACC_ACC = 2'd2} acc_ctl_e;
  typedef enum logic {DIR_FWD = 1'b0, DIR_INV = 1'b1} dir_e;

  // Position in the 32-word buffer of stream sample t of a line of length n.
  // Samples 0..2l-1 (the border data) go to words 4..15 of the line's own bank,
  // samples 2l..n-5 cycle through the other bank ((n-16)/16 rounds), and the last
  // four samples go to words 0..3 of the own bank. Own bank = words 0..15 on even
  // lines, 16..31 on odd lines.
  function automatic logic [4:0] ibuf_loc(input logic [LW-1:0] t, input logic [LW-1:0] n,
                                          input logic odd);
    logic [4:0] own, oth;
    own = odd ? 5'd16 : 5'd0;
    oth = odd ? 5'd0 : 5'd16;
    if (t < LW'(2 * HALF))       return own + 5'(t + 4);
    else if (t >= n - LW'(4))    return own + 5'(t - (n - LW'(4)));
    else                         return oth + 5'((t - LW'(2 * HALF)) & LW'(BANK - 1));
  endfunction

  // Line position of the t-th sample read.
  function automatic logic [LW-1:0] stream_pos(input logic [LW-1:0] t, input logic [LW-1:0] n);
    return (t < LW'(HALF)) ? n - LW'(HALF) + t : t - LW'(HALF);
  endfunction

  // Stream index of the sample at line position q (inverse of stream_pos).
  function automatic logic [LW-1:0] pos_stream(input logic [LW-1:0] q, input logic [LW-1:0] n);
    return (q >= n - LW'(HALF)) ? q - (n - LW'(HALF)) : q + LW'(HALF);
  endfunction

  // Mallat in-place layout: even index -> first half, odd index -> second half.
  function automatic logic [LW-1:0] perm_pos(input logic [LW-1:0] m, input logic [LW-1:0] n);
    return m[0] ? (n >> 1) + (m >> 1) : (m >> 1);
  endfunction

  // Row-major word address; on a column pass the line is a column.
  function automatic logic [31:0] line_addr(input logic is_col, input logic [LW-1:0] line,
                                            input logic [LW-1:0] pos, input logic [LW-1:0] nfull);
    logic [31:0] row, col;
    row = is_col ? 32'(pos) : 32'(line);
    col = is_col ? 32'(line) : 32'(pos);
    return row * 32'(nfull) + col;
  endfunction

endpackage
