// dram_model: behavioural model of the external image DRAM (not synthesizable).
//
// WORDS x 32-bit words; one-cycle read, write and refresh commands. Read data return
// RD_LAT cycles after the read command with rvalid. Counts refresh commands. The array
// `mem` is accessed hierarchically by testbenches to load and inspect images.
module dram_model #(
  parameter int unsigned WORDS  = 512 * 512,
  parameter int unsigned AWID   = 18,
  parameter int unsigned RD_LAT = 2
) (
  input  logic            clk,
  input  logic            rd,
  input  logic            wr,
  input  logic            refresh,
  input  logic [AWID-1:0] addr,
  input  logic [31:0]     wdata,
  output logic [31:0]     rdata,
  output logic            rvalid
);
  logic [31:0] mem [WORDS];
  logic [31:0] pipe_d [RD_LAT];
  logic        pipe_v [RD_LAT];
  int unsigned refreshes = 0;

  initial for (int i = 0; i < RD_LAT; i++) begin pipe_v[i] = 1'b0; pipe_d[i] = '0; end

  always_ff @(posedge clk) begin
    if (wr) mem[addr] <= wdata;
    if (refresh) refreshes <= refreshes + 1;
    pipe_v[0] <= rd;
    pipe_d[0] <= mem[addr];
    for (int i = 1; i < RD_LAT; i++) begin
      pipe_v[i] <= pipe_v[i-1];
      pipe_d[i] <= pipe_d[i-1];
    end
  end

  assign rdata  = pipe_d[RD_LAT-1];
  assign rvalid = pipe_v[RD_LAT-1];
endmodule
