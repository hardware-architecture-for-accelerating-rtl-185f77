// tm_core: frequency-domain (Temme-Mueller) plane-wave beamformer core.
//
// Pipeline, one step per stage:
//   TFFT+DSPS -> MemT -> XFFT (x2) -> MemX -> Remap (x2) [+ Compound (x2)]
//   -> MemRC -> IXFFT (x2) -> MemIX -> ITFFT (x2) -> output channel
// Each arrow memory is a ping-pong pair: one memory is written by the stage
// before it while the stage after it reads the other. The global controller
// starts the stages together and swaps the pairs. With angle = N-1 the
// Remap/Compound stage runs N times per image and the images of the N
// plane-wave angles are summed in MemRC.
//
// External interfaces (AXI-Stream style):
//   LUT channel:  lut1_tdata carries RLUT1 or PLUT words (lut1_sel = 1
//                 selects the PLUT), lut2_tdata carries RLUT2
//   raw channel:  raw RF words, two float columns per 64-bit word
//   output:       beamformed I/Q, two complex samples per 128-bit word
module tm_core
  import fp_pkg::*;
#(
  parameter int unsigned NT       = 4096,  // temporal FFT length
  parameter int unsigned NX       = 256,   // lateral FFT length
  parameter int unsigned NCOL     = 128,   // transducer elements (columns)
  parameter int unsigned PH_DEPTH = 128    // Phase Mem depth in the DSPS
) (
  input  logic         clk,
  input  logic         nrst,
  input  logic         start,
  input  logic [3:0]   angle,
  // LUT channel
  input  logic [63:0]  lut1_tdata,
  input  logic [63:0]  lut2_tdata,
  output logic         lut1_sel,
  output logic         lut_tready,
  input  logic         lut_tvalid,
  input  logic         lut_tlast,
  // raw data channel
  input  logic [63:0]  raw_tdata,
  output logic         raw_tready,
  input  logic         raw_tvalid,
  input  logic         raw_tlast,
  // beamformed output channel
  output logic [127:0] bf_tdata,
  output logic         bf_tvalid,
  output logic         bf_tlast,
  input  logic         bf_tready
);
  localparam int unsigned NF  = NT / 2;
  localparam int unsigned TAW = $clog2(NF * NCOL);
  localparam int unsigned XAW = $clog2(NF * NX);

  // ------------------------------------------------------ global control
  logic go_t, go_x, go_rc, go_ix, go_it;
  logic done_t, done_x, done_rc, done_ix, done_it;
  logic busy_t, busy_x, busy_rc, busy_ix, busy_it;
  logic rc_cmp, sel_t, sel_x, sel_rc, sel_ix;
  logic plut_req, plut_ready, rlut_ready, rlut_req;
  logic plut_valid, plut_last, rlut_valid;
  logic [1:0] gstate;

  global_ctrl u_gctrl (
    .clk(clk), .rst_n(nrst), .start(start), .angle(angle), .state(gstate),
    .go_t(go_t), .go_x(go_x), .go_rc(go_rc), .go_ix(go_ix), .go_it(go_it),
    .done_t(done_t), .done_x(done_x), .done_rc(done_rc), .done_ix(done_ix), .done_it(done_it),
    .rc_compound(rc_cmp),
    .sel_t(sel_t), .sel_x(sel_x), .sel_rc(sel_rc), .sel_ix(sel_ix),
    .plut_req(plut_req), .plut_ready(plut_ready), .rlut_ready(rlut_ready),
    .lut_tvalid(lut_tvalid), .lut_tlast(lut_tlast),
    .lut1_sel(lut1_sel), .lut_tready(lut_tready),
    .plut_valid(plut_valid), .plut_last(plut_last), .rlut_valid(rlut_valid));

  // ------------------------------------------------------ TFFT + DSPS
  logic            t_we;
  logic [TAW-1:0]  t_waddr, t_ra, t_rb;
  cplx_t           t_wdata, t_rda, t_rdb;

  tfft_proc #(.NT(NT), .NCOL(NCOL), .PH_DEPTH(PH_DEPTH)) u_tfft (
    .clk(clk), .rst_n(nrst), .start(go_t), .done(done_t), .busy(busy_t),
    .plut_req(plut_req), .plut_data(lut1_tdata), .plut_valid(plut_valid),
    .plut_ready(plut_ready), .plut_last(plut_last),
    .in_tready(raw_tready), .in_tdata(raw_tdata), .in_tvalid(raw_tvalid), .in_tlast(raw_tlast),
    .mem_we(t_we), .mem_waddr(t_waddr), .mem_wdata(t_wdata));

  pp_mem #(.DEPTH(NF * NCOL)) u_mem_t (
    .clk(clk), .sel(sel_t),
    .wa_en(t_we), .wa_addr(t_waddr), .wa_data(t_wdata),
    .wb_en(1'b0), .wb_addr('0), .wb_data('0),
    .ra_addr(t_ra), .rb_addr(t_rb), .ra_data(t_rda), .rb_data(t_rdb));

  // ------------------------------------------------------ XFFT
  logic            x_wa_en, x_wb_en;
  logic [XAW-1:0]  x_wa, x_wb, x_ra, x_rb;
  cplx_t           x_wda, x_wdb, x_rda, x_rdb;

  xfft_proc #(.NX(NX), .NROWS(NF), .SRC_COLS(NCOL), .INV(1'b0)) u_xfft (
    .clk(clk), .rst_n(nrst), .start(go_x), .done(done_x), .busy(busy_x),
    .ra_addr(t_ra), .rb_addr(t_rb), .ra_data(t_rda), .rb_data(t_rdb),
    .wa_en(x_wa_en), .wa_addr(x_wa), .wa_data(x_wda),
    .wb_en(x_wb_en), .wb_addr(x_wb), .wb_data(x_wdb));

  pp_mem #(.DEPTH(NF * NX)) u_mem_x (
    .clk(clk), .sel(sel_x),
    .wa_en(x_wa_en), .wa_addr(x_wa), .wa_data(x_wda),
    .wb_en(x_wb_en), .wb_addr(x_wb), .wb_data(x_wdb),
    .ra_addr(x_ra), .rb_addr(x_rb), .ra_data(x_rda), .rb_data(x_rdb));

  // ------------------------------------------------------ Remap + Compound
  logic            c_wa_en, c_wb_en;
  logic [XAW-1:0]  c_wa, c_wb, c_ra_rc, c_rb_rc, c_ra_ix, c_rb_ix, c_ra, c_rb;
  cplx_t           c_wda, c_wdb, c_rda, c_rdb;

  remap_proc #(.NF(NF), .NX(NX)) u_rc (
    .clk(clk), .rst_n(nrst), .start(go_rc), .compound_mode(rc_cmp),
    .done(done_rc), .busy(busy_rc),
    .rlut_req(rlut_req), .rlut1_data(lut1_tdata), .rlut2_data(lut2_tdata),
    .rlut_valid(rlut_valid), .rlut_ready(rlut_ready),
    .x_ra_addr(x_ra), .x_rb_addr(x_rb), .x_ra_data(x_rda), .x_rb_data(x_rdb),
    .c_ra_addr(c_ra_rc), .c_rb_addr(c_rb_rc), .c_ra_data(c_rda), .c_rb_data(c_rdb),
    .wa_en(c_wa_en), .wa_addr(c_wa), .wa_data(c_wda),
    .wb_en(c_wb_en), .wb_addr(c_wb), .wb_data(c_wdb));

  // The read side of MemRC is shared: the IXFFT reads a finished image
  // while the Remap stage works on the first angle of the next image, which
  // never compounds, so the two readers never need it at the same time.
  assign c_ra = busy_ix ? c_ra_ix : c_ra_rc;
  assign c_rb = busy_ix ? c_rb_ix : c_rb_rc;

  pp_mem #(.DEPTH(NF * NX)) u_mem_rc (
    .clk(clk), .sel(sel_rc),
    .wa_en(c_wa_en), .wa_addr(c_wa), .wa_data(c_wda),
    .wb_en(c_wb_en), .wb_addr(c_wb), .wb_data(c_wdb),
    .ra_addr(c_ra), .rb_addr(c_rb), .ra_data(c_rda), .rb_data(c_rdb));

  // ------------------------------------------------------ IXFFT
  logic            i_wa_en, i_wb_en;
  logic [XAW-1:0]  i_wa, i_wb, i_ra, i_rb;
  cplx_t           i_wda, i_wdb, i_rda, i_rdb;

  xfft_proc #(.NX(NX), .NROWS(NF), .SRC_COLS(NX), .INV(1'b1)) u_ixfft (
    .clk(clk), .rst_n(nrst), .start(go_ix), .done(done_ix), .busy(busy_ix),
    .ra_addr(c_ra_ix), .rb_addr(c_rb_ix), .ra_data(c_rda), .rb_data(c_rdb),
    .wa_en(i_wa_en), .wa_addr(i_wa), .wa_data(i_wda),
    .wb_en(i_wb_en), .wb_addr(i_wb), .wb_data(i_wdb));

  pp_mem #(.DEPTH(NF * NX)) u_mem_ix (
    .clk(clk), .sel(sel_ix),
    .wa_en(i_wa_en), .wa_addr(i_wa), .wa_data(i_wda),
    .wb_en(i_wb_en), .wb_addr(i_wb), .wb_data(i_wdb),
    .ra_addr(i_ra), .rb_addr(i_rb), .ra_data(i_rda), .rb_data(i_rdb));

  // ------------------------------------------------------ ITFFT
  itfft_proc #(.NT(NT), .NX(NX), .NCOL(NCOL)) u_itfft (
    .clk(clk), .rst_n(nrst), .start(go_it), .done(done_it), .busy(busy_it),
    .ra_addr(i_ra), .rb_addr(i_rb), .ra_data(i_rda), .rb_data(i_rdb),
    .out_tdata(bf_tdata), .out_tvalid(bf_tvalid), .out_tlast(bf_tlast), .out_tready(bf_tready));

  a_rc_read_shared: assert property (@(posedge clk) disable iff (!nrst)
                                     !(busy_ix && busy_rc && rc_cmp && rlut_req));
endmodule
