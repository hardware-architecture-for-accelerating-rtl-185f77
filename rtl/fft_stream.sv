// fft_stream: streaming single-precision FFT / inverse FFT of N points.
//
// Plays the part of the FFT cores of the beamformer: TFFT and ITFFT
// (N = 4096, axial) and XFFT and IXFFT (N = 256, lateral). What follows the
// design: complex binary32 input and output (imaginary part in the upper 32
// bits), natural order in and out, one sample per clock, forward or inverse
// direction chosen by bit 0 of the 16-bit configuration word (1 = forward,
// all other bits ignored), no scaling, and an output that cannot be stalled.
// Unlike a strict real-time core, the input may pause inside a frame (the
// pipeline only advances on accepted samples); s_axis_data_tready is low only
// while the last frame is flushed. The insides are this design's own: a radix-2 decimation-in-frequency
// single-path delay-feedback pipeline of log2(N) stages followed by a
// double-buffered bit-reversal reorder memory.
//
// Stage s keeps a circular buffer of L = N/2^(s+1) words. For the first L
// samples of each 2L block it stores the input and emits the buffered
// differences of the previous block multiplied by the twiddle W_N^(n*2^s);
// for the next L samples it emits buffer + input and stores buffer - input.
// All stages advance together whenever a sample is accepted. Each sample
// carries a "real" tag so that the flush samples inserted after the last
// frame (2N of them, during which s_axis_data_tready is low) push
// the final frame out without being written to the reorder memory. The
// direction is carried as a tag too, so a frame in flight keeps its setting.
//
// Each stage's block counter starts offset by the pipeline delay in front of
// it, so that blocks line up with the data; the flush length of 2N keeps that
// alignment. Timing: a frame's first output appears 2N + log2(N) cycles
// after its first input when frames follow each other without a gap; after the
// last frame the flush delivers it just as quickly. The output
// frame is then N consecutive valid cycles with m_axis_data_tlast on the last.
// The twiddle table holds cos and sin of 2*pi*m/N, m < N/2, filled at start-up
// (formula above; a synthesis tool folds it into a ROM).
module fft_stream
  import fp_pkg::*;
#(
  parameter int unsigned N = 4096
) (
  input  logic        aclk,
  input  logic        aresetn,
  input  logic [15:0] s_axis_config_tdata,
  input  logic        s_axis_config_tvalid,
  output logic        s_axis_config_tready,
  input  cplx_t       s_axis_data_tdata,
  input  logic        s_axis_data_tvalid,
  output logic        s_axis_data_tready,
  input  logic        s_axis_data_tlast,
  output cplx_t       m_axis_data_tdata,
  output logic        m_axis_data_tvalid,
  output logic        m_axis_data_tlast
);
  localparam int unsigned LOGN  = $clog2(N);
  localparam int unsigned DRAIN = 2 * N;   // keeps every stage aligned to frame starts

  typedef struct packed {
    logic  real_s;   // sample belongs to a frame (not a flush sample)
    logic  fwd;      // direction of the frame it belongs to
    cplx_t d;
  } samp_t;

  // ---------------------------------------------------------------- twiddles
  cplx_t tw [N/2];
  initial begin
    for (int m = 0; m < int'(N/2); m++) begin
      tw[m].re = real_to_f32($cos(2.0 * 3.14159265358979323846 * m / N));
      tw[m].im = real_to_f32($sin(2.0 * 3.14159265358979323846 * m / N));
    end
  end

  function automatic f32_t real_to_f32(input real r);
    logic [63:0] b;
    int          e;
    logic [24:0] m;
    b = $realtobits(r);
    if (b[62:52] == 11'd0) return 32'h0;
    e = int'(b[62:52]) - 1023 + 127;
    m = {2'b01, b[51:29]} + 25'(b[28]);
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e <= 0) return {b[63], 31'd0};
    return {b[63], e[7:0], m[22:0]};
  endfunction

  // -------------------------------------------------------- input and flush
  logic                cfg_fwd;
  logic [LOGN-1:0]     icnt;
  logic                pend_frame;
  logic [LOGN+1:0]     dcnt;
  logic                take, flush_step, adv;

  assign s_axis_config_tready = (icnt == '0) && (dcnt == '0);
  assign s_axis_data_tready   = (dcnt == '0);
  assign take       = s_axis_data_tvalid && s_axis_data_tready;
  assign flush_step = (dcnt != '0) || (pend_frame && !take && icnt == '0);
  assign adv        = take || flush_step;

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      cfg_fwd    <= 1'b1;
      icnt       <= '0;
      pend_frame <= 1'b0;
      dcnt       <= '0;
    end else begin
      if (s_axis_config_tvalid && s_axis_config_tready) cfg_fwd <= s_axis_config_tdata[0];
      if (take) begin
        icnt <= icnt + 1'b1;
        if (icnt == LOGN'(N - 1)) pend_frame <= 1'b1;
        else if (icnt == '0)      pend_frame <= 1'b0;
      end else if (flush_step) begin
        if (dcnt == (LOGN+2)'(DRAIN - 1)) begin
          dcnt       <= '0;
          pend_frame <= 1'b0;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end

  samp_t st_in [LOGN+1];
  assign st_in[0] = take ? samp_t'{real_s: 1'b1, fwd: cfg_fwd, d: s_axis_data_tdata}
                         : samp_t'{real_s: 1'b0, fwd: cfg_fwd, d: '0};

  // ------------------------------------------------------------ SDF stages
  for (genvar s = 0; s < int'(LOGN); s++) begin : g_stage
    localparam int unsigned L  = N >> (s + 1);
    localparam int unsigned LB = (L > 1) ? $clog2(L) : 1;
    // delay from the core input to this stage's input, in advances
    localparam int unsigned DS = (N - (N >> s)) + s;
    localparam logic [LOGN-s-1:0] CNT0 = (LOGN-s)'((2*L - (DS % (2*L))) % (2*L));

    samp_t           buf_q [L];
    logic [LOGN-s-1:0] cnt;      // position within the 2L block
    logic            pend;       // buffer holds differences to emit
    logic            phase;
    logic [LB-1:0]   ptr;
    samp_t           outr;
    samp_t           bv;
    cplx_t           w;

    assign phase = cnt[LOGN-s-1];
    if (L > 1) begin : g_ptr
      assign ptr = cnt[LB-1:0];
    end else begin : g_ptr1
      assign ptr = '0;
    end
    assign bv = buf_q[ptr];

    always_comb begin
      w = tw[(N/2 - 1) & (int'(ptr) << s)];
      if (bv.fwd) w.im = fp_neg(w.im);   // forward: exp(-j...), inverse: exp(+j...)
    end

    always_ff @(posedge aclk) begin
      if (!aresetn) begin
        cnt  <= CNT0;
        pend <= 1'b0;
        outr <= '0;
      end else if (adv) begin
        cnt <= cnt + 1'b1;
        if (!phase) begin
          buf_q[ptr]  <= st_in[s];
          outr.real_s <= bv.real_s && pend;
          outr.fwd    <= bv.fwd;
          outr.d      <= (L > 1) ? c_mul(bv.d, w) : bv.d;
          if (ptr == LB'(L - 1)) pend <= 1'b0;
        end else begin
          buf_q[ptr] <= samp_t'{real_s: st_in[s].real_s, fwd: st_in[s].fwd,
                                d: c_sub(bv.d, st_in[s].d)};
          outr <= samp_t'{real_s: st_in[s].real_s, fwd: st_in[s].fwd,
                          d: c_add(bv.d, st_in[s].d)};
          if (ptr == LB'(L - 1)) pend <= 1'b1;
        end
      end
    end
    assign st_in[s+1] = outr;
  end

  // ------------------------------------------------ bit-reversal reordering
  function automatic logic [LOGN-1:0] bitrev(input logic [LOGN-1:0] x);
    for (int i = 0; i < int'(LOGN); i++) bitrev[i] = x[LOGN-1-i];
  endfunction

  cplx_t           rbuf [2*N];
  logic [LOGN-1:0] wpos, rpos;
  logic            wbank, rbank, reading;
  logic [1:0]      full;

  always_ff @(posedge aclk) begin
    if (adv && st_in[LOGN].real_s) rbuf[{wbank, bitrev(wpos)}] <= st_in[LOGN].d;
    m_axis_data_tdata <= rbuf[{rbank, rpos}];
  end

  always_ff @(posedge aclk) begin
    if (!aresetn) begin
      wpos <= '0; rpos <= '0; wbank <= 1'b0; rbank <= 1'b0; full <= '0;
      reading <= 1'b0; m_axis_data_tvalid <= 1'b0; m_axis_data_tlast <= 1'b0;
    end else begin
      if (adv && st_in[LOGN].real_s) begin
        wpos <= wpos + 1'b1;
        if (wpos == LOGN'(N - 1)) begin
          full[wbank] <= 1'b1;
          wbank       <= ~wbank;
        end
      end
      m_axis_data_tvalid <= 1'b0;
      m_axis_data_tlast  <= 1'b0;
      if (reading || full[rbank]) begin
        reading            <= 1'b1;
        m_axis_data_tvalid <= 1'b1;
        rpos               <= rpos + 1'b1;
        if (rpos == LOGN'(N - 1)) begin
          m_axis_data_tlast <= 1'b1;
          full[rbank]       <= 1'b0;
          rbank             <= ~rbank;
          reading           <= 1'b0;
        end
      end
    end
  end

  // The source must respect the frame length given by N.
  a_tlast: assert property (@(posedge aclk) disable iff (!aresetn)
                            take |-> (s_axis_data_tlast == (icnt == LOGN'(N - 1))));
endmodule
