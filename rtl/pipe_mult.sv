// pipe_mult: two-stage pipelined 32 x 32 -> 64-bit signed multiplier.
//
// Stage 1 forms the four 16 x 16 partial products of the split operands
// (a = aH*2^16 + aL with aH signed and aL unsigned, likewise b) and registers them;
// stage 2 adds the shifted partial products and registers the 64-bit product.
// Latency is two clock cycles, one new product per cycle. The document specifies a
// two-stage Wallace-tree multiplier; the split into four registered partial products
// summed in the second stage is this design's simpler stand-in with the same latency
// and throughput, leaving the reduction tree to synthesis.
module pipe_mult
  import dwt_pkg::*;
(
  input  logic                   clk,
  input  logic signed [DW-1:0]   a,
  input  logic signed [DW-1:0]   b,
  output logic signed [ACCW-1:0] p
);
  logic signed [32:0] hh, hl, lh;   // 17x17 signed products fit in 33 bits
  logic        [31:0] ll;
  logic signed [16:0] ah, bh, al_s, bl_s;

  always_comb begin
    ah   = {a[31], a[31:16]};
    bh   = {b[31], b[31:16]};
    al_s = {1'b0, a[15:0]};
    bl_s = {1'b0, b[15:0]};
  end

  always_ff @(posedge clk) begin
    hh <= ah * bh;
    hl <= ah * bl_s;
    lh <= al_s * bh;
    ll <= a[15:0] * b[15:0];
    p  <= (ACCW'(hh) <<< 32) + (ACCW'(hl) <<< 16) + (ACCW'(lh) <<< 16) + ACCW'({32'd0, ll});
  end
endmodule
