// round_align: output alignment and rounding, 64-bit accumulator -> 32-bit word.
//
// The accumulator holds the sum with (F_in + 30) fractional bits; the result word must
// have F_out fractional bits, F = 32 - b_int(scale). The unit shifts right arithmetically
// by rshift = F_in + 30 - F_out and rounds: if the most significant dropped bit is 0 the
// value is truncated, if it is 1 one is added. The low 32 bits are registered when `en`
// is high (one cycle latency). The rounding rule is the document's; computing the shift
// from b_int values is this design's choice. rshift must be at least 1.
module round_align
  import dwt_pkg::*;
(
  input  logic                   clk,
  input  logic                   en,
  input  logic signed [ACCW-1:0] acc,
  input  logic [5:0]             rshift,
  output logic signed [DW-1:0]   dout
);
  logic signed [ACCW-1:0] shifted;
  logic                   rbit;

  always_comb begin
    shifted = acc >>> rshift;
    rbit    = acc[rshift - 6'd1];
  end

  always_ff @(posedge clk)
    if (en) dout <= DW'(shifted + ACCW'(rbit));
endmodule
