// phase_shift: complex rotation of the double-spectrum data, the Phase Shift
// unit of the DSPS.
//
// Computes Re' = Re*cos - Im*sin and Im' = Re*sin + Im*cos with four float
// multipliers (Re*Cos, Re*Sin, Im*Cos, Im*Sin), one float subtractor and one
// float adder, as in the design's block diagram, and packs the result into one
// 64-bit word (imaginary part high). Inputs ds and sc must arrive in the same
// cycle; sc.re is the cosine and sc.im the sine. Latency MUL_LAT + ADD_LAT
// cycles (6 + 8 by default, the operator latencies given for the Remap unit),
// one result per cycle.
module phase_shift
  import fp_pkg::*;
#(
  parameter int unsigned MUL_LAT = 6,
  parameter int unsigned ADD_LAT = 8,
  localparam int unsigned LAT    = MUL_LAT + ADD_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t ds,
  input  cplx_t sc,
  output logic  out_valid,
  output cplx_t ps
);
  f32_t rc, rs, ic, is_;
  logic v1, v2;
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul1 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(ds.re), .b(sc.re), .out_valid(v1), .y(rc));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul2 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(ds.re), .b(sc.im), .out_valid(),   .y(rs));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul3 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(ds.im), .b(sc.re), .out_valid(),   .y(ic));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul4 (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .a(ds.im), .b(sc.im), .out_valid(),   .y(is_));
  fp_op #(.OP(1), .LAT(ADD_LAT)) u_sub1 (.clk(clk), .rst_n(rst_n), .in_valid(v1), .a(rc), .b(is_), .out_valid(v2), .y(ps.re));
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add1 (.clk(clk), .rst_n(rst_n), .in_valid(v1), .a(rs), .b(ic),  .out_valid(),   .y(ps.im));
  assign out_valid = v2;
endmodule
