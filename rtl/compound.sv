// compound: coherent compounding of plane-wave angles (Compound unit).
//
// Adds the remapped spectrum of the current angle (s_axis_data_tdata_Remap,
// straight from a Remap unit) to the partial compound of the earlier angles of
// the same frame (s_axis_data_tdata_Mem, read from the MemRC memory that holds
// it), element by element, as two float additions (real and imaginary). Both
// inputs share one tvalid/tlast and must arrive in the same cycle; the stage
// controller aligns the memory read with the Remap output. Latency ADD_LAT
// cycles (8 by default, the adder latency used throughout), one result per
// cycle; tlast is delayed with the data.
module compound
  import fp_pkg::*;
#(
  parameter int unsigned ADD_LAT = 8
) (
  input  logic  aclk,
  input  logic  aresetn,
  input  logic  en,
  input  cplx_t s_axis_data_tdata_Remap,
  input  cplx_t s_axis_data_tdata_Mem,
  input  logic  s_axis_data_tvalid_Remap,
  input  logic  s_axis_data_tlast,
  output cplx_t m_axis_data_tdata,
  output logic  m_axis_data_tvalid,
  output logic  m_axis_data_tlast
);
  logic v;
  assign v = en && s_axis_data_tvalid_Remap;
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add_re (.clk(aclk), .rst_n(aresetn), .in_valid(v),
    .a(s_axis_data_tdata_Remap.re), .b(s_axis_data_tdata_Mem.re), .out_valid(m_axis_data_tvalid), .y(m_axis_data_tdata.re));
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add_im (.clk(aclk), .rst_n(aresetn), .in_valid(v),
    .a(s_axis_data_tdata_Remap.im), .b(s_axis_data_tdata_Mem.im), .out_valid(), .y(m_axis_data_tdata.im));
  ctl_delay #(.W(1), .D(ADD_LAT)) u_last (.clk(aclk), .rst_n(aresetn), .d(v && s_axis_data_tlast), .q(m_axis_data_tlast));
endmodule
