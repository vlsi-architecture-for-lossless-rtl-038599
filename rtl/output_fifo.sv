// output_fifo: variable-depth delay FIFO between the rounding unit and the DRAM writes.
//
// Results are written back in place, so a new value must not reach DRAM before the old
// value at the same address has been read (write-after-read). Each result is held until
// D newer results have been pushed: a pop request succeeds only while more than D entries
// are held. D (d_target) depends on the scale. The FIFO is a RAM of DEPTH = N/2 entries
// accessed through a write and a read pointer, each entry a result and its DRAM word
// address. Push and pop are single-cycle; the popped entry appears on dout one cycle
// after the pop and stays there. The N/2 depth and the minimum-D rule follow the
// document; carrying the address with the data is this design's choice.
module output_fifo
  import dwt_pkg::*;
#(
  parameter int unsigned DEPTH = N_DEF / 2,
  parameter int unsigned AWID  = 18
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    push,
  input  logic [AWID-1:0]         push_addr,
  input  logic [DW-1:0]           push_data,
  input  logic                    pop_req,
  input  logic [$clog2(DEPTH):0]  d_target,
  output logic                    popped,     // registered: dout is a fresh entry
  output logic [AWID-1:0]         dout_addr,
  output logic [DW-1:0]           dout_data,
  output logic [$clog2(DEPTH):0]  count
);
  localparam int unsigned PW = $clog2(DEPTH);

  logic [AWID+DW-1:0] mem [DEPTH];
  logic [PW-1:0]      wp, rp;
  logic               do_pop;

  always_comb do_pop = pop_req && (count > d_target);

  always_ff @(posedge clk)
    if (push) mem[wp] <= {push_addr, push_data};

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp <= '0; rp <= '0; count <= '0; popped <= 1'b0;
      dout_addr <= '0; dout_data <= '0;
    end else begin
      popped <= do_pop;
      if (push) wp <= (wp == PW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_pop) begin
        {dout_addr, dout_data} <= mem[rp];
        rp <= (rp == PW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      end
      count <= count + (PW+1)'(push) - (PW+1)'(do_pop);
    end

  // A full FIFO must not be pushed unless it is popped in the same cycle.
  assert property (@(posedge clk)
                   push |-> (count < (PW+1)'(DEPTH)) || do_pop)
    else $error("output_fifo overflow");
endmodule
