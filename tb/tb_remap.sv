// tb_remap: remap unit at NF = 32. Ten columns of random complex data, each
// with its own random interpolation points iiF (integer and fractional) and
// scale factors; expected out[j] = SFac*(X[i] + (X[i+1] - X[i])*frac).
// Columns arrive back to back (the case where the ping-pong data memory is
// refilled while it is read) and with gaps. Checks tlast and the latency
// from the last word of a column to its first output (1 + 38 cycles).
module tb_remap;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NF = 32, NCOLS = 10;
  logic clk = 0, rst_n = 0, v = 0, l = 0;
  cplx_t d, y;
  logic [63:0] lut;
  logic yv, yl;
  int checks = 0, failures = 0, cyc = 0;

  remap #(.NF(NF)) dut (.aclk(clk), .aresetn(rst_n), .en(1'b1), .s_axis_data_tdata(d),
    .s_axis_data_tdata_LUT(lut), .s_axis_data_tvalid(v), .s_axis_data_tlast(l),
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

  real xr [NCOLS][NF], xi [NCOLS][NF];
  logic [31:0] iif [NCOLS][NF], sf [NCOLS][NF];
  int last_in [NCOLS];
  int oidx = 0;

  always @(posedge clk) if (rst_n && yv) begin
    int c, j, i0;
    real fr, s, er, ei, vv;
    c = oidx / NF; j = oidx % NF;
    vv = f2r(iif[c][j]); i0 = int'($floor(vv)); fr = vv - real'(i0); s = f2r(sf[c][j]);
    er = s * (xr[c][i0] + (xr[c][i0 + 1] - xr[c][i0]) * fr);
    ei = s * (xi[c][i0] + (xi[c][i0 + 1] - xi[c][i0]) * fr);
    checks += 2;
    if (!close(f2r(y.re), er, 1e-5, 10.0) || !close(f2r(y.im), ei, 1e-5, 10.0)) begin
      failures++;
      if (failures < 10) $display("ERROR: c%0d j%0d got %g %g exp %g %g", c, j, f2r(y.re), f2r(y.im), er, ei);
    end
    if (yl != (j == NF - 1)) begin failures++; $display("ERROR: tlast at %0d", oidx); end
    if (j == 0) begin
      checks++;
      if (cyc - last_in[c] != 39) begin failures++; $display("ERROR: latency %0d", cyc - last_in[c]); end
    end
    oidx++;
  end

  initial begin
    foreach (xr[c, j]) begin
      xr[c][j] = f2r(r2f((real'($urandom % 20001) - 10000.0) / 100.0));
      xi[c][j] = f2r(r2f((real'($urandom % 20001) - 10000.0) / 100.0));
      iif[c][j] = r2f(real'($urandom % (NF - 1)) + ((j % 4 == 0) ? 0.0 : real'($urandom % 65536) / 65536.0));
      sf[c][j] = r2f(real'($urandom % 2000) / 1000.0);
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int c = 0; c < NCOLS; c++) begin
      for (int j = 0; j < NF; j++) begin
        @(negedge clk);
        v = 1; l = (j == NF - 1);
        d.re = r2f(xr[c][j]); d.im = r2f(xi[c][j]); lut = {iif[c][j], sf[c][j]};
        last_in[c] = cyc;
        if (c >= 6 && $urandom % 4 == 0) begin @(negedge clk); v = 0; end
      end
      if (c == 3) begin @(negedge clk); v = 0; repeat (50) @(negedge clk); end
    end
    @(negedge clk); v = 0;
    repeat (100) @(posedge clk);
    checks++; if (oidx != NCOLS * NF) begin failures++; $display("ERROR: %0d outputs", oidx); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
