// align_unit: input-side alignment of the operand read from the input buffer.
//
// Shifts the 32-bit two's complement word left by `shl` bits. It is used on the first
// forward pass, where DRAM holds plain 13-bit (signed) pixels, to place them in the
// scale-0 fixed-point format with b_int(0) = 13 integer bits, i.e. 32-13 = 19
// fractional bits; on every other pass the shift is 0. Purely combinational.
// That the unit sits between the input buffer and the multiplier follows the data-path
// diagram; what it shifts by is this design's choice.
module align_unit
  import dwt_pkg::*;
(
  input  logic [DW-1:0] din,
  input  logic [4:0]    shl,
  output logic [DW-1:0] dout
);
  always_comb dout = din << shl;
endmodule
