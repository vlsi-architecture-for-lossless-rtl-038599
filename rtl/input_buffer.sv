// input_buffer: 32-word x 32-bit buffer that keeps every sample read from DRAM alive
// for as long as the convolutions of its line need it, so each sample is read once.
//
// A line of n samples is extended periodically by l = 6 samples at each end, and a new
// result needs 2l+1 samples; 2l border samples + a 2l+1 window gives 4l+1 = 25 words,
// rounded up to 32 and folded in two 16-word banks. On an even line words 4..15 of bank 1
// (words 0..15) hold the 2l border samples, bank 2 (words 16..31) is cycled through
// (n-16)/16 times, and the last four samples land in words 0..3 of bank 1; on odd lines
// the banks swap roles, so the next line can fill its border while the previous line's
// last results are still being computed. The mapping itself is dwt_pkg::ibuf_loc.
//
// Interface: the write port takes the stream index of the sample (its order of arrival
// within the line), the line length and the line parity; the read port takes the line
// position of a tap and returns the word combinationally. Writes happen on the clock edge.
// The bank folding follows the document; the exact word order inside a bank and the
// direct (pointer-free) address computation are this design's choices.
module input_buffer
  import dwt_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [LW-1:0] w_t,      // stream index of the sample being written
  input  logic [LW-1:0] w_n,      // line length
  input  logic          w_odd,    // line parity
  input  logic [DW-1:0] w_data,
  input  logic [LW-1:0] r_pos,    // line position of the tap (0..n-1)
  input  logic [LW-1:0] r_n,
  input  logic          r_odd,
  output logic [DW-1:0] r_data
);
  logic [DW-1:0] mem [BSIZE];

  always_ff @(posedge clk)
    if (we) mem[ibuf_loc(w_t, w_n, w_odd)] <= w_data;

  always_comb r_data = mem[ibuf_loc(pos_stream(r_pos, r_n), r_n, r_odd)];
endmodule
