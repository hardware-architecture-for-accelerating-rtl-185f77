// remap_proc: Remap_Compound_Process stage-level controller with two Remap
// and two Compound units.
//
// One start pulse migrates one frame in the kz direction. The controller
// requests RLUT words through the global controller; every accepted LUT
// transfer reads one word from each half of MemX (column-major, NF words per
// kx column): Remap1 takes kx = 0 .. NX/2-1 (address i), Remap2
// kx = NX/2 .. NX-1 (address i + NX/2*NF), and both use the same RLUT1/RLUT2
// pair of that transfer (LUT1 for Remap1, LUT2 for Remap2). The LUT word is
// delayed one cycle to meet the memory data. Remap outputs (bin j of column
// kx) are written to MemRC in row-major order, address j*NX + kx.
//
// In compound mode (set for every angle after the first) the MemRC read side
// holds the partial sum of the earlier angles: at each Remap output the
// controller reads MemRC at the same address, delays the Remap result by the
// one-cycle read, lets the Compound unit add the two and writes the sum with
// the address delayed by the adder latency. Without compound mode the Remap
// output is written directly. done pulses when all words are written.
module remap_proc
  import fp_pkg::*;
#(
  parameter int unsigned NF      = 2048,
  parameter int unsigned NX      = 256,
  parameter int unsigned ADD_LAT = 8,
  localparam int unsigned AW     = $clog2(NF * NX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic          compound_mode,
  output logic          done,
  output logic          busy,
  // RLUT words (LUT channel, routed by the global controller)
  output logic          rlut_req,
  input  logic [63:0]   rlut1_data,
  input  logic [63:0]   rlut2_data,
  input  logic          rlut_valid,
  output logic          rlut_ready,
  // MemX read side
  output logic [AW-1:0] x_ra_addr,
  output logic [AW-1:0] x_rb_addr,
  input  cplx_t         x_ra_data,
  input  cplx_t         x_rb_data,
  // MemRC read side (partial sums) and write side
  output logic [AW-1:0] c_ra_addr,
  output logic [AW-1:0] c_rb_addr,
  input  cplx_t         c_ra_data,
  input  cplx_t         c_rb_data,
  output logic          wa_en,
  output logic [AW-1:0] wa_addr,
  output cplx_t         wa_data,
  output logic          wb_en,
  output logic [AW-1:0] wb_addr,
  output cplx_t         wb_data
);
  localparam int unsigned HALF  = NX / 2;
  localparam int unsigned TOTAL = HALF * NF;
  localparam int unsigned TW    = $clog2(TOTAL);
  localparam int unsigned FW    = $clog2(NF);
  localparam int unsigned KW    = $clog2(HALF);

  typedef enum logic [1:0] {S_HALT, S_RUN, S_DONE} state_t;
  state_t st;
  logic        cmode;
  logic [TW:0] rc, oca, ocb, wca, wcb;
  logic        take, take_q, last_q;
  logic [63:0] l1_q, l2_q;
  cplx_t       ra_o, rb_o;
  logic        ra_v, rb_v, ra_l, rb_l;

  assign busy       = (st != S_HALT);
  assign rlut_req   = (st == S_RUN) && (rc < (TW+1)'(TOTAL));
  assign rlut_ready = rlut_req;
  assign take       = rlut_valid && rlut_ready;
  assign x_ra_addr  = AW'(rc);
  assign x_rb_addr  = AW'(rc + TOTAL);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_HALT; cmode <= 1'b0; rc <= '0; oca <= '0; ocb <= '0; wca <= '0; wcb <= '0;
      done <= 1'b0; take_q <= 1'b0; last_q <= 1'b0;
    end else begin
      done   <= 1'b0;
      take_q <= take;
      last_q <= (rc[FW-1:0] == '1);
      case (st)
        S_HALT: if (start) begin
          st <= S_RUN; cmode <= compound_mode;
          rc <= '0; oca <= '0; ocb <= '0; wca <= '0; wcb <= '0;
        end
        S_RUN: begin
          if (take) rc <= rc + 1'b1;
          if (ra_v) oca <= oca + 1'b1;
          if (rb_v) ocb <= ocb + 1'b1;
          if (wa_en) wca <= wca + 1'b1;
          if (wb_en) wcb <= wcb + 1'b1;
          if (wca >= (TW+1)'(TOTAL) && wcb >= (TW+1)'(TOTAL)) st <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_HALT;
        end
        default: st <= S_HALT;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    l1_q <= rlut1_data;
    l2_q <= rlut2_data;
  end

  remap #(.NF(NF), .ADD_LAT(ADD_LAT)) u_remap1 (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata(x_ra_data), .s_axis_data_tdata_LUT(l1_q),
    .s_axis_data_tvalid(take_q), .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(ra_o), .m_axis_data_tvalid(ra_v), .m_axis_data_tlast(ra_l));
  remap #(.NF(NF), .ADD_LAT(ADD_LAT)) u_remap2 (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata(x_rb_data), .s_axis_data_tdata_LUT(l2_q),
    .s_axis_data_tvalid(take_q), .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(rb_o), .m_axis_data_tvalid(rb_v), .m_axis_data_tlast(rb_l));

  // output address of a Remap result: bin j = oc[FW-1:0], column kx = oc / NF
  logic [AW-1:0] oa_addr, ob_addr;
  assign oa_addr = AW'({oca[FW-1:0], 1'b0, oca[FW +: KW]});
  assign ob_addr = AW'({ocb[FW-1:0], 1'b1, ocb[FW +: KW]});
  assign c_ra_addr = oa_addr;
  assign c_rb_addr = ob_addr;

  // compound path: Remap result delayed by the memory read
  cplx_t         ra_q, rb_q, ca_o, cb_o;
  logic          ra_vq, rb_vq, ra_lq, ca_v, cb_v, ca_l, cb_l;
  logic [AW-1:0] oa_q, ob_q, ca_addr, cb_addr;
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ra_vq <= 1'b0; rb_vq <= 1'b0;
    end else begin
      ra_vq <= ra_v && cmode;
      rb_vq <= rb_v && cmode;
    end
    ra_q <= ra_o; rb_q <= rb_o; ra_lq <= ra_l;
    oa_q <= oa_addr; ob_q <= ob_addr;
  end
  compound #(.ADD_LAT(ADD_LAT)) u_comp1 (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata_Remap(ra_q), .s_axis_data_tdata_Mem(c_ra_data),
    .s_axis_data_tvalid_Remap(ra_vq), .s_axis_data_tlast(ra_lq),
    .m_axis_data_tdata(ca_o), .m_axis_data_tvalid(ca_v), .m_axis_data_tlast(ca_l));
  compound #(.ADD_LAT(ADD_LAT)) u_comp2 (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata_Remap(rb_q), .s_axis_data_tdata_Mem(c_rb_data),
    .s_axis_data_tvalid_Remap(rb_vq), .s_axis_data_tlast(ra_lq),
    .m_axis_data_tdata(cb_o), .m_axis_data_tvalid(cb_v), .m_axis_data_tlast(cb_l));
  delay_line #(.W(2 * AW), .D(ADD_LAT)) u_cadr (.clk(clk), .d({oa_q, ob_q}), .q({ca_addr, cb_addr}));

  always_comb begin
    if (cmode) begin
      wa_en = ca_v; wa_addr = ca_addr; wa_data = ca_o;
      wb_en = cb_v; wb_addr = cb_addr; wb_data = cb_o;
    end else begin
      wa_en = ra_v; wa_addr = oa_addr; wa_data = ra_o;
      wb_en = rb_v; wb_addr = ob_addr; wb_data = rb_o;
    end
    wa_en = wa_en && (st == S_RUN);
    wb_en = wb_en && (st == S_RUN);
  end

  a_col_last: assert property (@(posedge clk) disable iff (!rst_n)
                               ra_v |-> (ra_l == (oca[FW-1:0] == '1)));
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (ra_v == rb_v) && (ca_v == cb_v) && (!ca_v || ca_l == cb_l));
  a_rb_last: assert property (@(posedge clk) disable iff (!rst_n) rb_v |-> (rb_l == ra_l));
endmodule
