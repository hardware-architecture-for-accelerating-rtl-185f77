// remap: frequency remapping f -> kz of one kx column with scaling (Remap unit).
//
// For every output bin j of a column the unit reads the interpolation point
// iiF[j] and scale factor SFac[j] (RLUT word: iiF in the upper 32 bits, SFac in
// the lower 32 bits) and computes
//   out[j] = SFac * ( X[int] + (X[int+1] - X[int]) * frac ),
//   int = floor(iiF), frac = iiF - int,
// separately for the real and imaginary parts, following the design's
// datapath: Float to Fix (1 sign, 11 integer, 23 fraction bits), Fix Inc for
// int+1 (11-bit, wraps), Fix to Float for frac, Float Sub, Float Mul1, Float
// Add, Float Mul2 per part (eight operators in all).
//
// Memories: Data Mem1/Data Mem2 form a ping-pong pair of NF words (one column
// is written while the previous one is interpolated, reads use both ports at
// int and int+1); LUT Mem holds the RLUT words of the column and is read at
// the same address the next column is written (read before write), so the
// output is gapless between columns. Data Mem writes are delayed by
// MEM_LAT + F2F_LAT cycles to match the later data reads. Once a column has been written the
// reader runs NF cycles from its own counter.
//
// Interface: data and LUT words arrive together under one tvalid; tlast marks
// the last word of each column (NF words). Output: one word per cycle, tlast on
// the last word of each column. Latency from the start of a column's read-out
// to its first output: MEM_LAT + F2F_LAT + MEM_LAT + ADD_LAT + MUL_LAT +
// ADD_LAT + MUL_LAT = 3+4+3+8+6+8+6 = 38 cycles at the defaults; Frac is
// delayed by ADD_LAT - 1 = 7 cycles behind its conversion and SFac by 29
// cycles, the figures the design gives. Memory read latency is modelled as a
// one-cycle read followed by MEM_LAT-1 output registers.
module remap
  import fp_pkg::*;
#(
  parameter int unsigned NF      = 2048,
  parameter int unsigned MEM_LAT = 3,
  parameter int unsigned F2F_LAT = 4,
  parameter int unsigned I2F_LAT = 4,
  parameter int unsigned ADD_LAT = 8,
  parameter int unsigned MUL_LAT = 6,
  localparam int unsigned LAT    = 2 * MEM_LAT + F2F_LAT + 2 * ADD_LAT + 2 * MUL_LAT
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic        en,
  input  cplx_t       s_axis_data_tdata,
  input  logic [63:0] s_axis_data_tdata_LUT,
  input  logic        s_axis_data_tvalid,
  input  logic        s_axis_data_tlast,
  output cplx_t       m_axis_data_tdata,
  output logic        m_axis_data_tvalid,
  output logic        m_axis_data_tlast
);
  localparam int unsigned AW = $clog2(NF);

  // ------------------------------------------------------------- writing
  cplx_t         dmem [2][NF];
  logic [63:0]   lmem [NF];
  logic [AW-1:0] ucnt;       // Up Counter (write address)
  logic          wbank;
  logic          take;
  assign take = en && s_axis_data_tvalid;

  // The data write is delayed by the LUT read and Float to Fix latency, the
  // same amount by which the data reads trail the LUT reads, so that with a
  // gapless input the column after next cannot overwrite a bank that is
  // still being read.
  localparam int unsigned WDLY = MEM_LAT + F2F_LAT;
  logic          take_w, wbank_w;
  logic [AW-1:0] ucnt_w;
  cplx_t         wdata_w;
  ctl_delay  #(.W(1), .D(WDLY))           u_wv (.clk(aclk), .rst_n(aresetn), .d(take), .q(take_w));
  delay_line #(.W(AW + 65), .D(WDLY)) u_wd (.clk(aclk), .d({wbank, ucnt, s_axis_data_tdata}),
                                            .q({wbank_w, ucnt_w, wdata_w}));
  always_ff @(posedge aclk) begin
    if (take)   lmem[ucnt] <= s_axis_data_tdata_LUT;
    if (take_w) dmem[wbank_w][ucnt_w] <= wdata_w;
  end

  // ------------------------------------------------------------- reading
  logic          rd_act, rbank;
  logic [AW-1:0] rcnt;
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      ucnt <= '0; wbank <= 1'b0; rd_act <= 1'b0; rbank <= 1'b0; rcnt <= '0;
    end else begin
      if (rd_act) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == AW'(NF - 1)) rd_act <= 1'b0;
      end
      if (take) begin
        ucnt <= ucnt + 1'b1;
        if (ucnt == AW'(NF - 1)) begin
          wbank  <= ~wbank;
          rbank  <= wbank;
          rd_act <= 1'b1;
          rcnt   <= '0;
        end
      end
    end
  end

  // LUT Mem read (read-first), MEM_LAT cycles
  logic [63:0] lut_q, lut_d;
  always_ff @(posedge aclk) lut_q <= lmem[rcnt];
  delay_line #(.W(64), .D(MEM_LAT - 1)) u_lutd (.clk(aclk), .d(lut_q), .q(lut_d));
  logic rv_l, bank_l, last_l;
  ctl_delay #(.W(3), .D(MEM_LAT)) u_lutv (.clk(aclk), .rst_n(aresetn),
    .d({rd_act, rbank, rd_act && rcnt == AW'(NF - 1)}), .q({rv_l, bank_l, last_l}));

  // Float to Fix of iiF: 35 bits, 1 sign + 11 integer + 23 fraction
  logic signed [63:0] iif_full;
  logic [34:0]        iif_fx;
  assign iif_full = fp_to_fix(lut_d[63:32], 23);
  delay_line #(.W(35), .D(F2F_LAT)) u_f2f (.clk(aclk), .d(iif_full[34:0]), .q(iif_fx));
  logic rv_f, bank_f, last_f;
  ctl_delay #(.W(3), .D(F2F_LAT)) u_f2fv (.clk(aclk), .rst_n(aresetn), .d({rv_l, bank_l, last_l}), .q({rv_f, bank_f, last_f}));

  logic [AW-1:0] a_int, a_inc;
  logic [22:0]   frac;
  assign a_int = iif_fx[23 +: AW];
  assign a_inc = a_int + 1'b1;           // Fix Inc
  assign frac  = iif_fx[22:0];

  // Data Mem reads at int and int+1
  cplx_t x0_q, x1_q, x0, x1;
  always_ff @(posedge aclk) begin
    x0_q <= dmem[bank_f][a_int];
    x1_q <= dmem[bank_f][a_inc];
  end
  delay_line #(.W(128), .D(MEM_LAT - 1)) u_dd (.clk(aclk), .d({x1_q, x0_q}), .q({x1, x0}));
  logic rv_d;
  ctl_delay #(.W(1), .D(MEM_LAT)) u_ddv (.clk(aclk), .rst_n(aresetn), .d(rv_f), .q(rv_d));

  // Fix to Float of frac (I2F_LAT), then delayed to meet the subtractor output
  f32_t frac_f, frac_al;
  delay_line #(.W(32), .D(I2F_LAT)) u_i2f (.clk(aclk), .d(fix_to_fp(64'(frac), 23)), .q(frac_f));
  delay_line #(.W(32), .D(MEM_LAT + ADD_LAT - I2F_LAT)) u_frd (.clk(aclk), .d(frac_f), .q(frac_al));

  // SFac: from the LUT output to the final multipliers
  localparam int unsigned SF_DLY = F2F_LAT + MEM_LAT + ADD_LAT + MUL_LAT + ADD_LAT;   // 29
  f32_t sfac_al;
  delay_line #(.W(32), .D(SF_DLY)) u_sf (.clk(aclk), .d(lut_d[31:0]), .q(sfac_al));

  // X[int] delayed to the adder input
  cplx_t x0_al;
  delay_line #(.W(64), .D(ADD_LAT + MUL_LAT)) u_x0 (.clk(aclk), .d(x0), .q(x0_al));

  f32_t dre, dim, mre, mim, are, aim;
  logic v_sub, v_mul1, v_add;
  fp_op #(.OP(1), .LAT(ADD_LAT)) u_sub1 (.clk(aclk), .rst_n(aresetn), .in_valid(rv_d),   .a(x1.re), .b(x0.re),   .out_valid(v_sub),  .y(dre));
  fp_op #(.OP(1), .LAT(ADD_LAT)) u_sub2 (.clk(aclk), .rst_n(aresetn), .in_valid(rv_d),   .a(x1.im), .b(x0.im),   .out_valid(),       .y(dim));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul1 (.clk(aclk), .rst_n(aresetn), .in_valid(v_sub),  .a(dre),   .b(frac_al), .out_valid(v_mul1), .y(mre));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul3 (.clk(aclk), .rst_n(aresetn), .in_valid(v_sub),  .a(dim),   .b(frac_al), .out_valid(),       .y(mim));
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add1 (.clk(aclk), .rst_n(aresetn), .in_valid(v_mul1), .a(mre),   .b(x0_al.re), .out_valid(v_add), .y(are));
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add2 (.clk(aclk), .rst_n(aresetn), .in_valid(v_mul1), .a(mim),   .b(x0_al.im), .out_valid(),      .y(aim));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul2 (.clk(aclk), .rst_n(aresetn), .in_valid(v_add),  .a(are),   .b(sfac_al), .out_valid(m_axis_data_tvalid), .y(m_axis_data_tdata.re));
  fp_op #(.OP(2), .LAT(MUL_LAT)) u_mul4 (.clk(aclk), .rst_n(aresetn), .in_valid(v_add),  .a(aim),   .b(sfac_al), .out_valid(),      .y(m_axis_data_tdata.im));

  ctl_delay #(.W(1), .D(MEM_LAT + 2 * ADD_LAT + 2 * MUL_LAT)) u_last (.clk(aclk), .rst_n(aresetn), .d(last_f), .q(m_axis_data_tlast));

  a_tlast: assert property (@(posedge aclk) disable iff (!aresetn)
                            take |-> (s_axis_data_tlast == (ucnt == AW'(NF - 1))));
endmodule
