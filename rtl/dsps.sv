// dsps: Double Spectrum and Phase Shift unit, placed right after the TFFT.
//
// The TFFT transforms two adjacent real RF columns at once (even column in the
// real part, odd column in the imaginary part). For every 4096-point output
// column Y this unit separates the two spectra and keeps the non-negative
// half, k = 0 .. NT/2-1:
//   even: Re = (Yr[k] + Yr[-k]) / 2,  Im = (Yi[k] - Yi[-k]) / 2
//   odd : Re = (Yi[k] + Yi[-k]) / 2,  Im = (Yr[-k] - Yr[k]) / 2
// with -k taken modulo NT (so k = 0 pairs with itself). It then multiplies
// every element i of each output column by exp(j*PS(i)), PS(i) = (i+1)*angle,
// using the column's shift angle from Phase Mem (sincos + phase_shift).
//
// Structure as in the design: FFT Mem (NT words, one write port, two read
// ports, read-first), Float Add1/Sub1/Add2/Sub2 followed by Float Div (by 2,
// exponent decrement), Next Column Mem (NT/2 words) holding the odd column
// while the even column is being phase shifted, Phase Mem (PH_DEPTH words,
// each with two 32-bit angles: even column low, odd column high), Sin/Cos and
// Phase Shift. The column reader runs from its own counter once a column has
// been fully written, so a column's output is NT consecutive cycles (even
// column then odd column) and the next input column can be written meanwhile.
//
// Interface: phase words are accepted while s_axis_data_tready_phase is high
// (s_axis_data_tvalid_phase is this design's addition; the document lists only
// data, ready and last); tlast_phase ends the list and drops ready until all
// words have been used. s_axis_data_new_col marks the first sample of each
// TFFT output column. The output tlast marks the last sample produced with the
// last stored phase word. Latency from the last sample of a column to the
// first output: 1 + max(ADD_LAT + 2, sincos latency) + phase_shift latency.
module dsps
  import fp_pkg::*;
#(
  parameter int unsigned NT       = 4096,
  parameter int unsigned PH_DEPTH = 128,
  parameter int unsigned ADD_LAT  = 8,
  parameter int unsigned MUL_LAT  = 6
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic        en,
  input  logic [63:0] s_axis_data_tdata_phase,
  input  logic        s_axis_data_tvalid_phase,
  output logic        s_axis_data_tready_phase,
  input  logic        s_axis_data_tlast_phase,
  input  logic        s_axis_data_new_col,
  input  cplx_t       s_axis_data_tdata,
  input  logic        s_axis_data_tvalid,
  input  logic        s_axis_data_tlast,
  output cplx_t       m_axis_data_tdata,
  output logic        m_axis_data_tvalid,
  output logic        m_axis_data_tlast
);
  localparam int unsigned AW  = $clog2(NT);
  localparam int unsigned PW  = $clog2(PH_DEPTH);
  localparam int unsigned DSL = 1 + ADD_LAT + 1;                      // read + add + div2
  localparam int unsigned SCL = sincos_lat();
  localparam int unsigned AL  = (SCL > DSL) ? SCL : DSL;              // aligned latency

  function automatic int unsigned sincos_lat();
    return 4 + 2 + 24 + 2 + 4;
  endfunction

  // ------------------------------------------------------------ Phase Mem
  logic [63:0]   phase_mem [PH_DEPTH];
  logic [PW:0]   ph_wr, ph_cnt, ph_rd;
  logic          ph_ready;
  assign s_axis_data_tready_phase = ph_ready;

  // --------------------------------------------------------- FFT Mem write
  cplx_t         fft_mem [NT];
  logic [AW-1:0] wptr, wa;
  logic          col_done;
  assign wa       = s_axis_data_new_col ? '0 : wptr;
  assign col_done = en && s_axis_data_tvalid && (wa == AW'(NT - 1));

  always_ff @(posedge aclk) begin
    if (en && s_axis_data_tvalid) fft_mem[wa] <= s_axis_data_tdata;
  end

  // ---------------------------------------------------------------- reader
  logic          rd_act, rd_last;
  logic [AW-1:0] rcnt;
  logic [63:0]   cur_ph;
  logic          take_ph;
  assign take_ph = col_done;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      wptr     <= '0;
      ph_ready <= 1'b1;
      ph_wr    <= '0;
      ph_cnt   <= '0;
      ph_rd    <= '0;
      rd_act   <= 1'b0;
      rd_last  <= 1'b0;
      rcnt     <= '0;
      cur_ph   <= '0;
    end else begin
      if (ph_ready && s_axis_data_tvalid_phase) begin
        phase_mem[ph_wr[PW-1:0]] <= s_axis_data_tdata_phase;
        ph_wr <= ph_wr + 1'b1;
        if (s_axis_data_tlast_phase) begin
          ph_ready <= 1'b0;
          ph_cnt   <= ph_wr + 1'b1;
          ph_rd    <= '0;
        end
      end
      if (en && s_axis_data_tvalid) wptr <= wa + 1'b1;
      if (rd_act) begin
        rcnt <= rcnt + 1'b1;
        if (rcnt == AW'(NT - 1)) rd_act <= 1'b0;
      end
      if (take_ph) begin
        rd_act  <= 1'b1;
        rcnt    <= '0;
        cur_ph  <= phase_mem[ph_rd[PW-1:0]];
        rd_last <= (ph_rd + 1'b1 == ph_cnt);
        ph_rd   <= ph_rd + 1'b1;
        if (ph_rd + 1'b1 == ph_cnt) begin
          ph_ready <= 1'b1;
          ph_wr    <= '0;
        end
      end
    end
  end

  // -------------------------------------------- double spectrum formation
  logic          first_half;
  logic [AW-1:0] ka, kb;
  cplx_t         da, db;
  logic          rv;
  assign first_half = !rcnt[AW-1];
  assign ka = rcnt;
  assign kb = AW'(NT) - rcnt;          // modulo NT

  always_ff @(posedge aclk) begin
    da <= fft_mem[ka];
    db <= fft_mem[kb];
  end
  always_ff @(posedge aclk) begin
    if (!aresetn) rv <= 1'b0;
    else          rv <= rd_act && first_half;
  end

  f32_t s_add1, s_sub1, s_add2, s_sub2;
  logic dv;
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add1 (.clk(aclk), .rst_n(aresetn), .in_valid(rv), .a(da.re), .b(db.re), .out_valid(dv), .y(s_add1));
  fp_op #(.OP(1), .LAT(ADD_LAT)) u_sub1 (.clk(aclk), .rst_n(aresetn), .in_valid(rv), .a(da.im), .b(db.im), .out_valid(),   .y(s_sub1));
  fp_op #(.OP(0), .LAT(ADD_LAT)) u_add2 (.clk(aclk), .rst_n(aresetn), .in_valid(rv), .a(da.im), .b(db.im), .out_valid(),   .y(s_add2));
  fp_op #(.OP(1), .LAT(ADD_LAT)) u_sub2 (.clk(aclk), .rst_n(aresetn), .in_valid(rv), .a(db.re), .b(da.re), .out_valid(),   .y(s_sub2));

  cplx_t         even_c, odd_c;
  logic          ev;
  logic [AW-2:0] nc_wa;
  always_ff @(posedge aclk) begin
    even_c <= '{im: fp_div2(s_sub1), re: fp_div2(s_add1)};
    odd_c  <= '{im: fp_div2(s_sub2), re: fp_div2(s_add2)};
  end
  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      ev    <= 1'b0;
      nc_wa <= '0;
    end else begin
      ev <= dv;
      if (ev) nc_wa <= nc_wa + 1'b1;
    end
  end

  // ------------------------------------------------------ Next Column Mem
  cplx_t nc_mem [NT/2];
  cplx_t nc_q;
  always_ff @(posedge aclk) begin
    if (ev) nc_mem[nc_wa] <= odd_c;
    nc_q <= nc_mem[rcnt[AW-2:0]];
  end

  // second-half data: 1 cycle read, delayed to the DS path latency
  cplx_t nc_d, ds_sel;
  logic  sel_d;
  delay_line #(.W(64), .D(DSL - 1)) u_ncd (.clk(aclk), .d(nc_q), .q(nc_d));
  ctl_delay #(.W(1),  .D(DSL))     u_sel (.clk(aclk), .rst_n(aresetn), .d(rd_act && !first_half), .q(sel_d));
  assign ds_sel = sel_d ? nc_d : even_c;

  // valid and tlast of the DS stream, then aligned with Sin/Cos
  logic ds_v, ds_l, al_v, al_l;
  ctl_delay #(.W(2), .D(DSL)) u_dsv (.clk(aclk), .rst_n(aresetn),
    .d({rd_act, rd_act && rd_last && rcnt == AW'(NT - 1)}), .q({ds_v, ds_l}));
  cplx_t ds_al;
  delay_line #(.W(64), .D(AL - DSL)) u_dsa (.clk(aclk), .d(ds_sel), .q(ds_al));
  ctl_delay #(.W(2),  .D(AL - DSL)) u_dsb (.clk(aclk), .rst_n(aresetn), .d({ds_v, ds_l}), .q({al_v, al_l}));

  // ------------------------------------------------------------ Sin/Cos
  logic  sc_v;
  cplx_t sc;
  sincos u_sincos (
    .clk(aclk), .rst_n(aresetn), .en(rd_act),
    .new_col(rd_act && (rcnt == '0 || rcnt == AW'(NT / 2))),
    .angle(first_half ? cur_ph[31:0] : cur_ph[63:32]),
    .out_valid(sc_v), .sc(sc));
  cplx_t sc_al;
  delay_line #(.W(64), .D(AL - SCL)) u_sca (.clk(aclk), .d(sc), .q(sc_al));

  // -------------------------------------------------------- Phase Shift
  logic ps_v;
  phase_shift #(.MUL_LAT(MUL_LAT), .ADD_LAT(ADD_LAT)) u_ps (
    .clk(aclk), .rst_n(aresetn), .in_valid(al_v), .ds(ds_al), .sc(sc_al),
    .out_valid(ps_v), .ps(m_axis_data_tdata));
  assign m_axis_data_tvalid = ps_v;
  ctl_delay #(.W(1), .D(MUL_LAT + ADD_LAT)) u_pl (.clk(aclk), .rst_n(aresetn), .d(al_l), .q(m_axis_data_tlast));

  // the Sin/Cos stream must meet the double-spectrum stream cycle by cycle
  a_sc_aligned: assert property (@(posedge aclk) disable iff (!aresetn) sc_v == (al_v | (AL > SCL)));
  // TFFT frames are NT samples long
  a_tlast: assert property (@(posedge aclk) disable iff (!aresetn)
                            (en && s_axis_data_tvalid) |-> (s_axis_data_tlast == (wa == AW'(NT - 1))));
endmodule
