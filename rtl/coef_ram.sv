// coef_ram: filter coefficient memory, 32 words x 32 bits (two's complement Q2.30).
//
// Words 0..12 hold the 13 taps used for even output indices and words 16..28 the taps
// for odd output indices (forward: low-pass and high-pass analysis filters; inverse:
// the interleaved synthesis taps), addressed {odd_output, tap[3:0]}. Shorter filters
// are padded with zero taps. The host writes it through the write port before a
// transform; one word is read combinationally per cycle, 13 reads per macrocycle.
// Size and word width follow the document; the layout of the two sets is this
// design's choice.
module coef_ram
  import dwt_pkg::*;
(
  input  logic          clk,
  input  logic          we,
  input  logic [4:0]    waddr,
  input  logic [DW-1:0] wdata,
  input  logic [4:0]    raddr,
  output logic [DW-1:0] rdata
);
  logic [DW-1:0] mem [32];

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  always_comb rdata = mem[raddr];
endmodule
