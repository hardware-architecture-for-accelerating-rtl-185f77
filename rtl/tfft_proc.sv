// tfft_proc: TFFT_Process stage-level controller with the TFFT core and DSPS.
//
// One start pulse processes one raw RF frame of NT time samples by NCOL
// elements. Steps: configure the FFT for the forward direction and wait for
// its acknowledgement; request the frame's phase words (PLUT, NCOL/2 words of
// two angles) through the global controller and pass them to the DSPS; then
// raise in_tready and stream NCOL/2 column pairs of NT words into the TFFT
// (each raw word carries column 2i in its lower and column 2i+1 in its upper
// 32 bits). The TFFT output feeds the DSPS directly; new_col marks the first
// sample of each TFFT output column. DSPS output, the half spectrum
// (NT/2 bins) of column 2i followed by that of column 2i+1, is written to the
// MemT memory in write mode at address f*NCOL + c (row-major, one row per
// frequency bin), which is the write pattern of the design. done pulses for
// one cycle when the last word has been written.
//
// The raw input may pause (in_tvalid low) inside a frame; the FFT then waits.
module tfft_proc
  import fp_pkg::*;
#(
  parameter int unsigned NT       = 4096,
  parameter int unsigned NCOL     = 128,
  parameter int unsigned PH_DEPTH = 128,
  localparam int unsigned NF      = NT / 2,
  localparam int unsigned TOTAL   = NCOL * NF,       // words per frame, in and out
  localparam int unsigned TW      = $clog2(TOTAL),
  localparam int unsigned AW      = $clog2(NF * NCOL)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  output logic          done,
  output logic          busy,
  // PLUT words (LUT channel, routed by the global controller)
  output logic          plut_req,
  input  logic [63:0]   plut_data,
  input  logic          plut_valid,
  output logic          plut_ready,
  input  logic          plut_last,
  // raw RF input channel
  output logic          in_tready,
  input  logic [63:0]   in_tdata,
  input  logic          in_tvalid,
  input  logic          in_tlast,
  // MemT write side
  output logic          mem_we,
  output logic [AW-1:0] mem_waddr,
  output cplx_t         mem_wdata
);
  typedef enum logic [2:0] {S_HALT, S_SETUP, S_PHASE, S_RUN, S_DONE} state_t;
  state_t st;

  logic [TW:0]   in_cnt, out_cnt;
  logic          cfg_v, cfg_r;
  logic          f_in_v, f_in_r, f_in_l;
  cplx_t         f_out;
  logic          f_out_v, f_out_l;
  logic [$clog2(NT)-1:0] f_ocnt;
  logic          ph_rdy;

  assign busy      = (st != S_HALT);
  assign cfg_v     = (st == S_SETUP);
  assign plut_req  = (st == S_PHASE);
  assign plut_ready = plut_req && ph_rdy;
  assign in_tready = (st == S_RUN) && (in_cnt < (TW+1)'(TOTAL)) && f_in_r;
  assign f_in_v    = in_tvalid && in_tready;
  assign f_in_l    = (in_cnt[$clog2(NT)-1:0] == '1);  // column boundary from the count

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st      <= S_HALT;
      in_cnt  <= '0;
      out_cnt <= '0;
      done    <= 1'b0;
      f_ocnt  <= '0;
    end else begin
      done <= 1'b0;
      if (f_out_v) f_ocnt <= f_ocnt + 1'b1;
      case (st)
        S_HALT:  if (start) st <= S_SETUP;
        S_SETUP: begin
          in_cnt  <= '0;
          out_cnt <= '0;
          if (cfg_r) st <= S_PHASE;
        end
        S_PHASE: if (plut_valid && plut_ready && plut_last) st <= S_RUN;
        S_RUN: begin
          if (f_in_v) in_cnt <= in_cnt + 1'b1;
          if (mem_we) begin
            out_cnt <= out_cnt + 1'b1;
            if (out_cnt == (TW+1)'(TOTAL - 1)) st <= S_DONE;
          end
        end
        S_DONE: begin
          done <= 1'b1;
          st   <= S_HALT;
        end
        default: st <= S_HALT;
      endcase
    end
  end

  fft_stream #(.N(NT)) u_tfft (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata(16'h0001), .s_axis_config_tvalid(cfg_v), .s_axis_config_tready(cfg_r),
    .s_axis_data_tdata(in_tdata), .s_axis_data_tvalid(f_in_v), .s_axis_data_tready(f_in_r),
    .s_axis_data_tlast(f_in_l),
    .m_axis_data_tdata(f_out), .m_axis_data_tvalid(f_out_v), .m_axis_data_tlast(f_out_l));

  cplx_t d_out;
  logic  d_out_v, d_out_l;
  dsps #(.NT(NT), .PH_DEPTH(PH_DEPTH)) u_dsps (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata_phase(plut_data), .s_axis_data_tvalid_phase(plut_valid && plut_req),
    .s_axis_data_tready_phase(ph_rdy), .s_axis_data_tlast_phase(plut_last),
    .s_axis_data_new_col(f_out_v && f_ocnt == '0),
    .s_axis_data_tdata(f_out), .s_axis_data_tvalid(f_out_v), .s_axis_data_tlast(f_out_l),
    .m_axis_data_tdata(d_out), .m_axis_data_tvalid(d_out_v), .m_axis_data_tlast(d_out_l));

  // write address: out_cnt = {pair, half, f}; column c = {pair, half}
  localparam int unsigned FW = $clog2(NF);
  localparam int unsigned CW = $clog2(NCOL);
  assign mem_we    = d_out_v && (st == S_RUN);
  assign mem_waddr = {out_cnt[FW-1:0], out_cnt[FW +: CW]};
  assign mem_wdata = d_out;

  a_last: assert property (@(posedge clk) disable iff (!rst_n)
                           (d_out_v && st == S_RUN) |-> (d_out_l == (out_cnt == (TW+1)'(TOTAL - 1))));
endmodule
