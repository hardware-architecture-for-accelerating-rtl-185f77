// tb_dsps: double spectrum and phase shift unit at NT = 64. Two frames of
// four TFFT output columns (random complex data, each column holding two
// real RF columns) with their phase words. Expected output per column: the
// even spectrum then the odd spectrum, k = 0 .. 31, each multiplied by
// exp(j*(k+1)*angle*pi). Gaps between input columns and a late phase list
// are exercised; checks tlast, the phase-word handshake and the latency from
// the last sample of a column to its first output.
module tb_dsps;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NT = 64, NF = 32, NC = 4, NFR = 2;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  logic [63:0] ph_d;
  logic ph_v = 0, ph_r, ph_l = 0, nc = 0, v = 0, l = 0;
  cplx_t d, y;
  logic yv, yl;
  int checks = 0, failures = 0, cyc = 0;

  dsps #(.NT(NT), .PH_DEPTH(8)) dut (
    .aclk(clk), .aresetn(rst_n), .en(1'b1),
    .s_axis_data_tdata_phase(ph_d), .s_axis_data_tvalid_phase(ph_v), .s_axis_data_tready_phase(ph_r),
    .s_axis_data_tlast_phase(ph_l), .s_axis_data_new_col(nc),
    .s_axis_data_tdata(d), .s_axis_data_tvalid(v), .s_axis_data_tlast(l),
    .m_axis_data_tdata(y), .m_axis_data_tvalid(yv), .m_axis_data_tlast(yl));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real yr [NFR][NC][NT], yi [NFR][NC][NT];
  logic [31:0] th [NFR][NC][2];
  int last_in [NFR * NC];
  int oidx = 0, first_out [NFR * NC];

  always @(posedge clk) if (rst_n && yv) begin
    int f, c, h, k, km;
    real er, ei, pr, pi_, p, pk;
    f = oidx / (NC * NT); c = (oidx / NT) % NC; h = (oidx / NF) % 2; k = oidx % NF;
    km = (NT - k) % NT;
    if (k == 0 && h == 0) first_out[f * NC + c] = cyc;
    if (h == 0) begin pr = (yr[f][c][k] + yr[f][c][km]) / 2.0; pi_ = (yi[f][c][k] - yi[f][c][km]) / 2.0; end
    else        begin pr = (yi[f][c][k] + yi[f][c][km]) / 2.0; pi_ = (yr[f][c][km] - yr[f][c][k]) / 2.0; end
    p = real'(k + 1) * f2r(th[f][c][h]) * PI;
    er = pr * $cos(p) - pi_ * $sin(p);
    ei = pr * $sin(p) + pi_ * $cos(p);
    checks += 3;
    if (!close(f2r(y.re), er, 1e-5, 100.0) || !close(f2r(y.im), ei, 1e-5, 100.0)) begin
      failures++;
      if (failures < 10) $display("ERROR: f%0d c%0d h%0d k%0d got %g %g exp %g %g", f, c, h, k, f2r(y.re), f2r(y.im), er, ei);
    end
    if (yl != (c == NC - 1 && h == 1 && k == NF - 1)) begin failures++; $display("ERROR: tlast at %0d", oidx); end
    if (k == 0 && h == 0 && cyc - last_in[f * NC + c] != 51) begin
      failures++; $display("ERROR: latency %0d", cyc - last_in[f * NC + c]);
    end
    oidx++;
  end

  initial begin
    foreach (yr[f, c, n]) begin
      yr[f][c][n] = (real'($urandom % 20001) - 10000.0) / 100.0;
      yi[f][c][n] = (real'($urandom % 20001) - 10000.0) / 100.0;
    end
    foreach (th[f, c, h]) th[f][c][h] = r2f(real'(int'($urandom % 3801) - 1900) / 1024.0);
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < NFR; f++) begin
      // phase list; the second frame's list arrives while frame 0 is still in use
      for (int c = 0; c < NC; c++) begin
        @(negedge clk);
        ph_v = 1; ph_d = {th[f][c][1], th[f][c][0]}; ph_l = (c == NC - 1);
        while (!ph_r) @(negedge clk);
        @(posedge clk);
      end
      @(negedge clk); ph_v = 0; ph_l = 0;
      if (f == 1) continue;
      for (int ff = 0; ff < NFR; ff++)
        for (int c = 0; c < NC; c++) begin
          if (ff == 1 && c == 0) break;
          for (int n = 0; n < NT; n++) begin
            @(negedge clk);
            v = 1; nc = (n == 0); l = (n == NT - 1);
            d.re = r2f(yr[ff][c][n]); d.im = r2f(yi[ff][c][n]);
            yr[ff][c][n] = f2r(d.re); yi[ff][c][n] = f2r(d.im);
            last_in[ff * NC + c] = cyc;
          end
          @(negedge clk); v = 0; nc = 0;
          if (c % 2 == 1) repeat (10) @(negedge clk);
        end
    end
    // remaining columns of frame 1
    for (int c = 0; c < NC; c++) begin
      for (int n = 0; n < NT; n++) begin
        @(negedge clk);
        v = 1; nc = (n == 0); l = (n == NT - 1);
        d.re = r2f(yr[1][c][n]); d.im = r2f(yi[1][c][n]);
        yr[1][c][n] = f2r(d.re); yi[1][c][n] = f2r(d.im);
        last_in[NC + c] = cyc;
      end
    end
    @(negedge clk); v = 0; nc = 0;
    repeat (300) @(posedge clk);
    checks++; if (oidx != NFR * NC * NT) begin failures++; $display("ERROR: %0d outputs", oidx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
