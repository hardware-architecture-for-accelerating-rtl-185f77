// xfft_proc: XFFT_Process / IXFFT_Process stage-level controller with its
// pair of lateral FFT cores.
//
// One start pulse transforms one frame along the lateral axis. The source
// memory (read side of a ping-pong pair) is row-major with SRC_COLS words per
// row and NROWS rows; the first core takes rows 0 .. NROWS/2-1 and the second
// rows NROWS/2 .. NROWS-1, both reading in the same cycle (address_a = i,
// address_b = i + half). Each row is fed as NX points; when SRC_COLS < NX the
// points past SRC_COLS are zeros and the read address is not advanced (the
// zero padding of the XFFT). Outputs (bin k of row r) go to the destination
// memory in column-major order, address k*NROWS + r, so that the next stage
// can read whole columns. INV = 0 gives the XFFT (forward, MemT -> MemX),
// INV = 1 the IXFFT (inverse, MemRC -> MemIX, SRC_COLS = NX). The cores are
// configured in the setup step and the controller waits for their
// acknowledgement. Feeding is continuous; done pulses when both cores'
// outputs have been written. Reads have one cycle of latency.
module xfft_proc
  import fp_pkg::*;
#(
  parameter int unsigned NX       = 256,
  parameter int unsigned NROWS    = 2048,
  parameter int unsigned SRC_COLS = 128,
  parameter bit          INV      = 1'b0,
  localparam int unsigned SAW     = $clog2(NROWS * SRC_COLS),
  localparam int unsigned DAW     = $clog2(NROWS * NX)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           start,
  output logic           done,
  output logic           busy,
  // source memory read side
  output logic [SAW-1:0] ra_addr,
  output logic [SAW-1:0] rb_addr,
  input  cplx_t          ra_data,
  input  cplx_t          rb_data,
  // destination memory write side
  output logic           wa_en,
  output logic [DAW-1:0] wa_addr,
  output cplx_t          wa_data,
  output logic           wb_en,
  output logic [DAW-1:0] wb_addr,
  output cplx_t          wb_data
);
  localparam int unsigned HALF  = NROWS / 2;
  localparam int unsigned TOTAL = HALF * NX;
  localparam int unsigned TW    = $clog2(TOTAL);
  localparam int unsigned XW    = $clog2(NX);
  localparam int unsigned RW    = $clog2(HALF);

  typedef enum logic [2:0] {S_HALT, S_SETUP, S_WAIT, S_RUN, S_DONE} state_t;
  state_t st;

  logic [TW:0] rc, oca, ocb;
  logic        cfg_ra, cfg_rb, din_ra, din_rb;
  logic        feed, feed_q, zero_q, last_q;
  logic [XW-1:0] x;
  logic [RW-1:0] r;
  cplx_t       oa, ob;
  logic        oa_v, ob_v, oa_l, ob_l;

  assign busy = (st != S_HALT);
  assign x    = rc[XW-1:0];
  assign r    = rc[XW +: RW];
  assign feed = (st == S_RUN) && (rc < (TW+1)'(TOTAL));

  assign ra_addr = SAW'(r * SRC_COLS + x);
  assign rb_addr = SAW'((r + HALF) * SRC_COLS + x);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_HALT; rc <= '0; oca <= '0; ocb <= '0; done <= 1'b0;
      feed_q <= 1'b0; zero_q <= 1'b0; last_q <= 1'b0;
    end else begin
      done   <= 1'b0;
      feed_q <= feed;
      zero_q <= (int'(x) >= int'(SRC_COLS));
      last_q <= (x == XW'(NX - 1));
      if (wa_en) oca <= oca + 1'b1;
      if (wb_en) ocb <= ocb + 1'b1;
      case (st)
        S_HALT:  if (start) st <= S_SETUP;
        S_SETUP: begin
          rc <= '0; oca <= '0; ocb <= '0;
          if (cfg_ra && cfg_rb) st <= S_WAIT;
        end
        S_WAIT:  if (din_ra && din_rb) st <= S_RUN;
        S_RUN: begin
          if (feed) rc <= rc + 1'b1;
          if (oca >= (TW+1)'(TOTAL) && ocb >= (TW+1)'(TOTAL)) st <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_HALT;
        end
        default: st <= S_HALT;
      endcase
    end
  end

  cplx_t ia, ib;
  assign ia = zero_q ? '0 : ra_data;
  assign ib = zero_q ? '0 : rb_data;

  fft_stream #(.N(NX)) u_fft_a (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata({15'd0, !INV}), .s_axis_config_tvalid(st == S_SETUP), .s_axis_config_tready(cfg_ra),
    .s_axis_data_tdata(ia), .s_axis_data_tvalid(feed_q), .s_axis_data_tready(din_ra),
    .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(oa), .m_axis_data_tvalid(oa_v), .m_axis_data_tlast(oa_l));
  fft_stream #(.N(NX)) u_fft_b (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata({15'd0, !INV}), .s_axis_config_tvalid(st == S_SETUP), .s_axis_config_tready(cfg_rb),
    .s_axis_data_tdata(ib), .s_axis_data_tvalid(feed_q), .s_axis_data_tready(din_rb),
    .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(ob), .m_axis_data_tvalid(ob_v), .m_axis_data_tlast(ob_l));

  assign wa_en   = oa_v && (st == S_RUN);
  assign wb_en   = ob_v && (st == S_RUN);
  assign wa_addr = DAW'(oca[XW-1:0] * NROWS + oca[XW +: RW]);
  assign wb_addr = DAW'(ocb[XW-1:0] * NROWS + ocb[XW +: RW] + HALF);
  assign wa_data = oa;
  assign wb_data = ob;

  a_rows: assert property (@(posedge clk) disable iff (!rst_n)
                           wa_en |-> (oa_l == (oca[XW-1:0] == XW'(NX - 1))));
  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) oa_v == ob_v);
  a_ob_last: assert property (@(posedge clk) disable iff (!rst_n) ob_v |-> (ob_l == oa_l));
endmodule
