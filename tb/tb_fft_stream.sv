// tb_fft_stream: checks the streaming FFT against a direct DFT computed in
// real arithmetic. Three forward frames of random data are sent back to back,
// then, after a gap that makes the core flush, two inverse frames. Every
// output bin is compared (relative tolerance 1e-4 of the frame's peak), the
// frame order and tlast position are checked, and the latency of the first
// gapless frame is checked against 2N + log2(N) cycles.
module tb_fft_stream;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int N = 64;
  localparam int NFR = 5;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [15:0] cfg;
  logic cfg_v, cfg_r;
  cplx_t din, dout;
  logic din_v, din_r, din_l, dout_v, dout_l;

  fft_stream #(.N(N)) dut (
    .aclk(clk), .aresetn(rst_n),
    .s_axis_config_tdata(cfg), .s_axis_config_tvalid(cfg_v), .s_axis_config_tready(cfg_r),
    .s_axis_data_tdata(din), .s_axis_data_tvalid(din_v), .s_axis_data_tready(din_r),
    .s_axis_data_tlast(din_l),
    .m_axis_data_tdata(dout), .m_axis_data_tvalid(dout_v), .m_axis_data_tlast(dout_l));

  real xr [NFR][N], xi [NFR][N];
  int checks = 0, failures = 0;
  int t_first_in, t_first_out, cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic send_frame(input int f);
    for (int n = 0; n < N; n++) begin
      din.re = r2f(xr[f][n]);
      din.im = r2f(xi[f][n]);
      din_v  = 1;
      din_l  = (n == N - 1);
      @(posedge clk);
      while (!din_r) @(posedge clk);
      #1;
    end
    din_v = 0;
    din_l = 0;
  endtask

  // checker
  initial begin
    int f = 0, k = 0;
    real er, ei, pk, sgn;
    t_first_out = -1;
    forever begin
      @(posedge clk);
      if (dout_v && rst_n) begin
        if (t_first_out < 0) t_first_out = cyc;
        sgn = (f < 3) ? -1.0 : 1.0;
        er = 0; ei = 0; pk = 0;
        for (int n = 0; n < N; n++) begin
          er += xr[f][n] * $cos(2.0*3.14159265358979*k*n/N) - sgn * xi[f][n] * $sin(2.0*3.14159265358979*k*n/N);
          ei += xi[f][n] * $cos(2.0*3.14159265358979*k*n/N) + sgn * xr[f][n] * $sin(2.0*3.14159265358979*k*n/N);
          pk += rabs(xr[f][n]) + rabs(xi[f][n]);
        end
        checks++;
        if (!close(f2r(dout.re), er, 1e-4, pk) || !close(f2r(dout.im), ei, 1e-4, pk)) begin
          failures++;
          if (failures < 10) $display("frame %0d bin %0d got %f %f exp %f %f", f, k, f2r(dout.re), f2r(dout.im), er, ei);
        end
        checks++;
        if (dout_l != (k == N - 1)) failures++;
        k++;
        if (k == N) begin k = 0; f++; end
        if (f == NFR) begin
          checks++;
          if (t_first_out - t_first_in != 2*N + $clog2(N)) begin
            failures++;
            $display("latency %0d", t_first_out - t_first_in);
          end
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < NFR; f++)
      for (int n = 0; n < N; n++) begin
        int r1, r2;
        r1 = int'($urandom % 20001) - 10000;
        r2 = int'($urandom % 20001) - 10000;
        xr[f][n] = r1 / 1000.0;
        xi[f][n] = r2 / 1000.0;
      end
    cfg = 16'h1; cfg_v = 0; din_v = 0; din_l = 0; din = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    cfg_v = 1;
    @(posedge clk); #1;
    cfg_v = 0;
    t_first_in = cyc;
    for (int f = 0; f < 3; f++) send_frame(f);
    repeat (20) @(posedge clk);
    #1;
    while (!cfg_r) begin @(posedge clk); #1; end
    cfg = 16'h0; cfg_v = 1;
    @(posedge clk); #1;
    cfg_v = 0;
    send_frame(3);
    send_frame(4);
  end
endmodule
