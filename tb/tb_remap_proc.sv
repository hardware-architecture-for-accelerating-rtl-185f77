// tb_remap_proc: Remap/Compound process at NF = 32, NX = 16. Memories are
// modelled with one cycle of read latency. Three passes over the same kind
// of frame: the first without compound mode, then two in compound mode,
// where the read side of MemRC holds the previous pass's result (as after a
// ping-pong swap) and the new remapped image must be added to it. The RLUT
// stream pauses at random. Written words must equal
// SFac*(X[i] + (X[i+1]-X[i])*frac) (+ partial sum) at address j*NX + kx.
module tb_remap_proc;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NF = 32, NX = 16, HX = NX / 2, N = NF * NX;
  logic clk = 0, rst_n = 0, start = 0, cmode = 0, done, busy;
  logic rlut_req, rlut_valid, rlut_ready;
  logic [63:0] rlut1_data, rlut2_data;
  logic [8:0] x_ra, x_rb, c_ra, c_rb, wa, wb;
  cplx_t x_rda, x_rdb, c_rda, c_rdb, wda, wdb;
  logic wa_en, wb_en;
  int checks = 0, failures = 0, cyc = 0;

  remap_proc #(.NF(NF), .NX(NX)) dut (.clk, .rst_n, .start, .compound_mode(cmode), .done, .busy,
    .rlut_req, .rlut1_data, .rlut2_data, .rlut_valid, .rlut_ready,
    .x_ra_addr(x_ra), .x_rb_addr(x_rb), .x_ra_data(x_rda), .x_rb_data(x_rdb),
    .c_ra_addr(c_ra), .c_rb_addr(c_rb), .c_ra_data(c_rda), .c_rb_data(c_rdb),
    .wa_en, .wa_addr(wa), .wa_data(wda), .wb_en, .wb_addr(wb), .wb_data(wdb));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t mx [N], mc_rd [N], mc_wr [N];
  logic [31:0] iif [NX][NF], sf [NX][NF];
  int nw [N];
  int lptr = 0, n_pause = 0;
  always_comb begin
    rlut1_data = {iif[(lptr / NF) % HX][lptr % NF], sf[(lptr / NF) % HX][lptr % NF]};
    rlut2_data = {iif[(lptr / NF) % HX + HX][lptr % NF], sf[(lptr / NF) % HX + HX][lptr % NF]};
  end
  always @(negedge clk) rlut_valid = ($urandom % 5 != 0);
  always @(posedge clk) begin
    x_rda <= mx[x_ra]; x_rdb <= mx[x_rb];
    c_rda <= mc_rd[c_ra]; c_rdb <= mc_rd[c_rb];
    if (wa_en) begin mc_wr[wa] <= wda; nw[wa]++; end
    if (wb_en) begin mc_wr[wb] <= wdb; nw[wb]++; end
    if (rlut_valid && rlut_ready) lptr <= lptr + 1;
    if (rlut_req && !rlut_valid) n_pause++;
  end

  initial begin
    real pr [N], pi_ [N];
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (pr[i]) begin pr[i] = 0.0; pi_[i] = 0.0; end
    for (int pass = 0; pass < 3; pass++) begin
      foreach (mx[i]) begin mx[i].re = r2f(real'(int'($urandom % 2001) - 1000) / 10.0); mx[i].im = r2f(real'(int'($urandom % 2001) - 1000) / 10.0); end
      foreach (iif[k, j]) begin
        iif[k][j] = r2f(real'($urandom % (NF - 1)) + real'($urandom % 256) / 256.0);
        sf[k][j]  = r2f(real'($urandom % 1000) / 500.0);
      end
      foreach (nw[i]) nw[i] = 0;
      lptr = 0;
      @(negedge clk); start = 1; cmode = (pass > 0); @(negedge clk); start = 0; cmode = 0;
      @(posedge clk iff done);
      @(negedge clk);
      for (int kx = 0; kx < NX; kx++)
        for (int j = 0; j < NF; j++) begin
          real v, fr, s, er, ei;
          int i0;
          cplx_t g;
          v = f2r(iif[kx][j]); i0 = int'($floor(v)); fr = v - real'(i0); s = f2r(sf[kx][j]);
          er = s * (f2r(mx[kx * NF + i0].re) + (f2r(mx[kx * NF + i0 + 1].re) - f2r(mx[kx * NF + i0].re)) * fr);
          ei = s * (f2r(mx[kx * NF + i0].im) + (f2r(mx[kx * NF + i0 + 1].im) - f2r(mx[kx * NF + i0].im)) * fr);
          er += pr[j * NX + kx]; ei += pi_[j * NX + kx];
          g = mc_wr[j * NX + kx];
          checks += 2;
          if (!close(f2r(g.re), er, 1e-5, 10.0) || !close(f2r(g.im), ei, 1e-5, 10.0)) begin
            failures++;
            if (failures < 10) $display("ERROR: pass %0d kx %0d j %0d got %g %g exp %g %g", pass, kx, j, f2r(g.re), f2r(g.im), er, ei);
          end
          if (nw[j * NX + kx] != 1) begin failures++; $display("ERROR: write count at %0d", j * NX + kx); end
        end
      checks++; if (lptr != HX * NF) begin failures++; $display("ERROR: %0d LUT words", lptr); end
      // next pass reads this result as its partial sum
      foreach (mc_rd[i]) begin mc_rd[i] = mc_wr[i]; pr[i] = f2r(mc_wr[i].re); pi_[i] = f2r(mc_wr[i].im); end
    end
    checks++; if (n_pause == 0) begin failures++; $display("ERROR: LUT stream never paused"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
