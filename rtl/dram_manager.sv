// dram_manager: interface between the engine and the external DRAM.
//
// Issues at most one read and one write per macrocycle and the DRAM refresh (as in the
// document). All DRAM port signals are registered (this design's choice), so each command
// reaches the DRAM one cycle after the schedule decides it. A read request from the
// controller in cycle 0 of a macrocycle reaches the DRAM in cycle 1. The sample's stream
// index, line length and line parity are kept until the DRAM returns the word
// (dram_rvalid); the word is registered once more and written into the input buffer.
// A result popped from the output FIFO in cycle 5 is on the FIFO output in cycle 6 and
// reaches the DRAM in cycle 7. A refresh timer raises ref_pending every REFRESH_CYCLES
// clock cycles. The controller then extends the next macrocycle; the refresh is decided
// in its cycle 13 and reaches the DRAM in cycle 14. While the engine is idle a pending
// refresh is issued at once.
//
// DRAM port (this design's choice of a simple synchronous protocol): dram_rd, dram_wr
// and dram_ref are one-cycle commands with dram_addr/dram_wdata; read data return with
// dram_rvalid a fixed number of cycles later. That latency must be at most 11: the
// sample's buffer tag is held only until the next read, 13 cycles on.
// Default REFRESH_CYCLES = 624 (15.6 us at a 25 ns clock) is this design's choice: the
// document gives no interval, and this one comes closest to its 99.04 % utilisation.
module dram_manager
  import dwt_pkg::*;
#(
  parameter int unsigned AWID           = 18,
  parameter int unsigned REFRESH_CYCLES = 624
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            engine_busy,
  // controller
  input  logic            rd_req,
  input  logic [AWID-1:0] rd_addr,
  input  logic [LW-1:0]   rd_t,
  input  logic [LW-1:0]   rd_n,
  input  logic            rd_odd,
  input  logic            ref_slot,
  output logic            ref_pending,
  // output FIFO
  input  logic            wr_valid,
  input  logic [AWID-1:0] wr_addr,
  input  logic [DW-1:0]   wr_data,
  // input buffer write port
  output logic            ib_we,
  output logic [LW-1:0]   ib_t,
  output logic [LW-1:0]   ib_n,
  output logic            ib_odd,
  output logic [DW-1:0]   ib_data,
  // external DRAM
  output logic            dram_rd,
  output logic            dram_wr,
  output logic            dram_ref,
  output logic [AWID-1:0] dram_addr,
  output logic [DW-1:0]   dram_wdata,
  input  logic [DW-1:0]   dram_rdata,
  input  logic            dram_rvalid
);
  localparam int unsigned RW = $clog2(REFRESH_CYCLES + 1);

  logic [RW-1:0] ref_cnt;
  logic          rd_outstanding;

  logic ref_fire;
  assign ref_fire = ref_pending && (ref_slot || !engine_busy);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      ref_cnt <= '0; ref_pending <= 1'b0; rd_outstanding <= 1'b0;
      ib_t <= '0; ib_n <= LW'(BANK); ib_odd <= 1'b0;
      dram_rd <= 1'b0; dram_wr <= 1'b0; dram_ref <= 1'b0;
      dram_addr <= '0; dram_wdata <= '0;
      ib_we <= 1'b0; ib_data <= '0;
    end else begin
      // registered DRAM port: commands leave one cycle after the request
      dram_rd    <= rd_req;
      dram_wr    <= wr_valid;
      dram_ref   <= ref_fire;
      dram_addr  <= rd_req ? rd_addr : wr_addr;
      dram_wdata <= wr_data;
      // registered return path into the input buffer
      ib_we      <= dram_rvalid;
      ib_data    <= dram_rdata;
      if (ref_cnt == RW'(REFRESH_CYCLES - 1)) begin
        ref_cnt     <= '0;
        ref_pending <= 1'b1;
      end else begin
        ref_cnt <= ref_cnt + 1'b1;
        if (ref_fire) ref_pending <= 1'b0;
      end
      if (rd_req) begin
        ib_t <= rd_t; ib_n <= rd_n; ib_odd <= rd_odd;
        rd_outstanding <= 1'b1;
      end else if (dram_rvalid) rd_outstanding <= 1'b0;
    end

  // The macrocycle has one read and one write, in different cycles.
  assert property (@(posedge clk) !(rd_req && wr_valid))
    else $error("dram_manager: read and write in the same cycle");
  // A read must complete before the next one is issued.
  assert property (@(posedge clk) rd_req |-> !rd_outstanding || dram_rvalid)
    else $error("dram_manager: read issued while one is outstanding");
endmodule
