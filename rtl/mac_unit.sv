// mac_unit: the multiply-accumulate unit of the data path.
//
// Operand registers capture the aligned data word and the coefficient every cycle, the
// two-stage multiplier follows, and a 64-bit accumulator register is fed through a
// three-way select driven by acc_ctl: LOAD (start a new sum with the product), ACC
// (add the product) or HOLD (keep the sum; used during DRAM refresh and idle cycles).
// An operand presented in cycle c reaches the accumulator select in cycle c+3, so the
// accumulator control for it must be given three cycles later. Structure and the three
// accumulator controls follow the data-path diagram and the operation schedule.
module mac_unit
  import dwt_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [DW-1:0]   data_in,
  input  logic signed [DW-1:0]   coef_in,
  input  acc_ctl_e               acc_ctl,
  output logic signed [ACCW-1:0] acc
);
  logic signed [DW-1:0]   a_q, b_q;
  logic signed [ACCW-1:0] prod;

  always_ff @(posedge clk) begin
    a_q <= data_in;
    b_q <= coef_in;
  end

  pipe_mult u_mult (.clk(clk), .a(a_q), .b(b_q), .p(prod));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) acc <= '0;
    else unique case (acc_ctl)
      ACC_LOAD: acc <= prod;
      ACC_ACC:  acc <= acc + prod;
      default:  acc <= acc;
    endcase
endmodule
