// itfft_proc: ITFFT_Process stage-level controller with two inverse temporal
// FFT cores.
//
// One start pulse produces one output frame. MemIX (read side) is
// column-major with NF = NT/2 words (kz bins) per lateral position x. Only the
// first NCOL positions are delivered: core 1 takes x = 0 .. NCOL/2-1 and core
// 2 x = NCOL/2 .. NCOL-1, one column of NT points each in turn; the upper
// NT/2 points of every column are zeros, so the inverse FFT returns the
// analytic (I/Q) signal. The controller configures both cores for the
// inverse direction and waits until the output channel is ready
// (out_tready); the frame is then streamed without interruption, because the
// FFT output cannot be held back. out_tdata = {core 2 sample, core 1 sample};
// out_tlast marks the last sample of the frame.
module itfft_proc
  import fp_pkg::*;
#(
  parameter int unsigned NT   = 4096,
  parameter int unsigned NX   = 256,
  parameter int unsigned NCOL = 128,
  localparam int unsigned NF  = NT / 2,
  localparam int unsigned AW  = $clog2(NF * NX)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  output logic          busy,
  output logic [AW-1:0] ra_addr,
  output logic [AW-1:0] rb_addr,
  input  cplx_t         ra_data,
  input  cplx_t         rb_data,
  output logic [127:0]  out_tdata,
  output logic          out_tvalid,
  output logic          out_tlast,
  input  logic          out_tready
);
  localparam int unsigned HALF  = NCOL / 2;
  localparam int unsigned TOTAL = HALF * NT;
  localparam int unsigned TW    = $clog2(TOTAL);
  localparam int unsigned NW    = $clog2(NT);
  localparam int unsigned FW    = $clog2(NF);
  localparam int unsigned XW    = $clog2(HALF);

  typedef enum logic [2:0] {S_HALT, S_SETUP, S_WAIT, S_RUN, S_DONE} state_t;
  state_t st;
  logic [TW:0] rc, oc;
  logic        cfg_ra, cfg_rb, din_ra, din_rb;
  logic        feed, feed_q, zero_q, last_q;
  logic [NW-1:0] n;
  logic [XW-1:0] x;

  assign busy = (st != S_HALT);
  assign n    = rc[NW-1:0];
  assign x    = rc[NW +: XW];
  assign feed = (st == S_RUN) && (rc < (TW+1)'(TOTAL));
  assign ra_addr = AW'({x, n[FW-1:0]});
  assign rb_addr = AW'(({1'b0, x} + HALF) * NF + n[FW-1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_HALT; rc <= '0; oc <= '0; done <= 1'b0;
      feed_q <= 1'b0; zero_q <= 1'b0; last_q <= 1'b0;
    end else begin
      done   <= 1'b0;
      feed_q <= feed;
      zero_q <= n[NW-1];
      last_q <= (n == '1);
      if (out_tvalid) oc <= oc + 1'b1;
      case (st)
        S_HALT:  if (start) st <= S_SETUP;
        S_SETUP: begin
          rc <= '0; oc <= '0;
          if (cfg_ra && cfg_rb) st <= S_WAIT;
        end
        S_WAIT:  if (din_ra && din_rb && out_tready) st <= S_RUN;
        S_RUN: begin
          if (feed) rc <= rc + 1'b1;
          if (out_tvalid && out_tlast) st <= S_DONE;
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_HALT;
        end
        default: st <= S_HALT;
      endcase
    end
  end

  cplx_t ia, ib, oa, ob;
  logic  oa_v, ob_v, oa_l, ob_l;
  assign ia = zero_q ? '0 : ra_data;
  assign ib = zero_q ? '0 : rb_data;

  fft_stream #(.N(NT)) u_fft_a (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata(16'h0000), .s_axis_config_tvalid(st == S_SETUP), .s_axis_config_tready(cfg_ra),
    .s_axis_data_tdata(ia), .s_axis_data_tvalid(feed_q), .s_axis_data_tready(din_ra),
    .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(oa), .m_axis_data_tvalid(oa_v), .m_axis_data_tlast(oa_l));
  fft_stream #(.N(NT)) u_fft_b (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata(16'h0000), .s_axis_config_tvalid(st == S_SETUP), .s_axis_config_tready(cfg_rb),
    .s_axis_data_tdata(ib), .s_axis_data_tvalid(feed_q), .s_axis_data_tready(din_rb),
    .s_axis_data_tlast(last_q),
    .m_axis_data_tdata(ob), .m_axis_data_tvalid(ob_v), .m_axis_data_tlast(ob_l));

  assign out_tvalid = oa_v && (st == S_RUN);
  assign out_tdata  = {ob, oa};
  assign out_tlast  = out_tvalid && (oc == (TW+1)'(TOTAL - 1));

  a_lockstep: assert property (@(posedge clk) disable iff (!rst_n) (oa_v == ob_v) && (!oa_v || oa_l == ob_l));
  a_col: assert property (@(posedge clk) disable iff (!rst_n)
                          out_tvalid |-> (oa_l == (oc[NW-1:0] == '1)));
endmodule
