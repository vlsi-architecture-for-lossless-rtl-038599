// config_mem: per-scale configuration memory of the transform engine.
//
// Holds, for scale s = 0..7, the integer-part width b_int(s) of the data words of that
// scale (the fixed-point format is b_int integer bits and 32-b_int fractional bits) and,
// for s = 1..7, the output-FIFO delay D(s). The increment of b_int from one scale to the
// next sets the alignment shifts of the forward transform, its decrement those of the
// inverse. Reset loads the defaults: b_int = 13 for the input image and 16, 17, 19, 21,
// 23, 25 for scales 1..6 (filter bank F2), and D(s) = N/2^s - 6, which for N = 512 is
// 250, 122, 58, 26, 10, 2 (the minimum delays). The host can overwrite any entry through
// the write port (wsel = 0: b_int, 1: D). All entries are read in parallel.
// The contents follow the document; storing absolute b_int values instead of
// increments and the host write port are this design's choices.
module config_mem
  import dwt_pkg::*;
#(
  parameter int unsigned N     = N_DEF,
  parameter int unsigned DBITS = $clog2(N / 2) + 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic             wsel,
  input  logic [2:0]       waddr,
  input  logic [DBITS-1:0] wdata,
  output logic [5:0]       bint [8],
  output logic [DBITS-1:0] dfifo [8]
);
  localparam logic [5:0] BINT_F2 [8] = '{6'd13, 6'd16, 6'd17, 6'd19, 6'd21, 6'd23, 6'd25, 6'd27};

  function automatic logic [DBITS-1:0] d_default(input int s);
    int v;
    v = int'(N >> s) - int'(HALF);
    return (s == 0 || v < 0) ? '0 : DBITS'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      for (int s = 0; s < 8; s++) begin
        bint[s]  <= BINT_F2[s];
        dfifo[s] <= d_default(s);
      end
    end else if (we) begin
      if (wsel) dfifo[waddr] <= wdata;
      else      bint[waddr]  <= 6'(wdata);
    end
endmodule
