// tb_tm_core: end-to-end test of the beamformer core at reduced size
// (NT = 64, NX = 16, NCOL = 8).
//
// Two runs: one plane-wave angle (angle = 0) with two back-to-back images,
// then three angles (angle = 2) with two images, so the controller passes
// through HALT/SETUP again and the Remap stage switches into compound mode.
// Raw RF data, phase angles and remap tables are random. The expected images
// are computed here directly from the definitions (DFTs, double spectrum,
// phase shift, lateral FFT with zero padding, linear interpolation with
// scale, sum over angles, inverse lateral FFT, inverse temporal FFT of the
// non-negative half) and every output sample is compared.
//
// The raw input pauses at random and the output channel is held not-ready
// when some images are about to start; the mechanisms below are counted and
// the test fails if any of them never happened.
module tb_tm_core;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NT = 64, NX = 16, NCOL = 8, NF = NT / 2;
  localparam int HC = NCOL / 2;
  localparam int NRUN = 2;
  localparam int ANG[NRUN]  = '{0, 2};
  localparam int NIMG[NRUN] = '{2, 2};
  localparam int MAXF = 6, MAXA = 3, MAXI = 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, nrst = 0, start = 0;
  logic [3:0] angle = '0;
  logic [63:0] lut1_tdata, lut2_tdata, raw_tdata;
  logic lut1_sel, lut_tready, lut_tvalid, lut_tlast;
  logic raw_tready, raw_tvalid, raw_tlast;
  logic [127:0] bf_tdata;
  logic bf_tvalid, bf_tlast, bf_tready;

  tm_core #(.NT(NT), .NX(NX), .NCOL(NCOL)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    #3000000;
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------- stimulus data
  logic [31:0] raw  [MAXF][NCOL][NT];
  logic [31:0] th   [MAXF][NCOL];
  logic [31:0] iif  [MAXA][NX][NF];
  logic [31:0] sfac [MAXA][NX][NF];
  real         exp_re [MAXI][NCOL][NT];
  real         exp_im [MAXI][NCOL][NT];
  real         peak   [MAXI];

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom % 65536) / 65536.0;
  endfunction

  task automatic make_data(int nang, int nimg);
    for (int f = 0; f < nang * nimg; f++)
      for (int c = 0; c < NCOL; c++) begin
        th[f][c] = r2f(urand(-1.9, 1.9) / 8.0);
        for (int n = 0; n < NT; n++) raw[f][c][n] = r2f(urand(-1.0, 1.0));
      end
    for (int a = 0; a < nang; a++)
      for (int kx = 0; kx < NX; kx++)
        for (int j = 0; j < NF; j++) begin
          int i0 = int'($urandom % (NF - 1));
          iif[a][kx][j]  = r2f(real'(i0) + real'($urandom % 256) / 256.0);
          sfac[a][kx][j] = r2f(urand(0.5, 1.5));
        end
  endtask

  // reference model of one run
  task automatic model(int nang, int nimg);
    real sr[NCOL][NF], si[NCOL][NF];
    real xr[NX][NF], xi[NX][NF];
    real cr[NX][NF], ci[NX][NF];
    real yr[NCOL][NF], yi[NCOL][NF];
    for (int m = 0; m < nimg; m++) begin
      foreach (cr[a, b]) begin cr[a][b] = 0.0; ci[a][b] = 0.0; end
      for (int a = 0; a < nang; a++) begin
        int f = m * nang + a;
        for (int c = 0; c < NCOL; c++)
          for (int k = 0; k < NF; k++) begin
            real ar = 0.0, ai = 0.0, p;
            for (int n = 0; n < NT; n++) begin
              ar += f2r(raw[f][c][n]) * $cos(2.0 * PI * k * n / NT);
              ai -= f2r(raw[f][c][n]) * $sin(2.0 * PI * k * n / NT);
            end
            p = real'(k + 1) * f2r(th[f][c]) * PI;
            sr[c][k] = ar * $cos(p) - ai * $sin(p);
            si[c][k] = ar * $sin(p) + ai * $cos(p);
          end
        for (int kx = 0; kx < NX; kx++)
          for (int k = 0; k < NF; k++) begin
            xr[kx][k] = 0.0; xi[kx][k] = 0.0;
            for (int x = 0; x < NCOL; x++) begin
              real w = -2.0 * PI * kx * x / NX;
              xr[kx][k] += sr[x][k] * $cos(w) - si[x][k] * $sin(w);
              xi[kx][k] += sr[x][k] * $sin(w) + si[x][k] * $cos(w);
            end
          end
        for (int kx = 0; kx < NX; kx++)
          for (int j = 0; j < NF; j++) begin
            real v = f2r(iif[a][kx][j]), s = f2r(sfac[a][kx][j]), fr;
            int i0 = int'($floor(v));
            fr = v - real'(i0);
            cr[kx][j] += s * (xr[kx][i0] + (xr[kx][i0 + 1] - xr[kx][i0]) * fr);
            ci[kx][j] += s * (xi[kx][i0] + (xi[kx][i0 + 1] - xi[kx][i0]) * fr);
          end
      end
      for (int x = 0; x < NCOL; x++)
        for (int j = 0; j < NF; j++) begin
          yr[x][j] = 0.0; yi[x][j] = 0.0;
          for (int kx = 0; kx < NX; kx++) begin
            real w = 2.0 * PI * kx * x / NX;
            yr[x][j] += cr[kx][j] * $cos(w) - ci[kx][j] * $sin(w);
            yi[x][j] += cr[kx][j] * $sin(w) + ci[kx][j] * $cos(w);
          end
        end
      peak[m] = 0.0;
      for (int x = 0; x < NCOL; x++)
        for (int n = 0; n < NT; n++) begin
          real orr = 0.0, oi = 0.0;
          for (int k = 0; k < NF; k++) begin
            real w = 2.0 * PI * k * n / NT;
            orr += yr[x][k] * $cos(w) - yi[x][k] * $sin(w);
            oi  += yr[x][k] * $sin(w) + yi[x][k] * $cos(w);
          end
          exp_re[m][x][n] = orr;
          exp_im[m][x][n] = oi;
          if (rabs(orr) > peak[m]) peak[m] = rabs(orr);
          if (rabs(oi) > peak[m]) peak[m] = rabs(oi);
        end
    end
  endtask

  // ---------------------------------------------------------- interface models
  int cur_nang = 1;
  int pptr, rptr, wptr;       // PLUT, RLUT and raw word pointers of the run
  logic raw_gap;
  always_comb begin
    int f, i, n, a, kx, j;
    // raw channel
    f = wptr / (HC * NT); i = (wptr / NT) % HC; n = wptr % NT;
    if (f >= MAXF) f = MAXF - 1;
    raw_tdata  = {raw[f][2 * i + 1][n], raw[f][2 * i][n]};
    raw_tlast  = (n == NT - 1);
    raw_tvalid = !raw_gap;
    // LUT channel: PLUT or RLUT1 on lut1, RLUT2 on lut2
    a = (rptr / (NX / 2 * NF)) % cur_nang; kx = (rptr / NF) % (NX / 2); j = rptr % NF;
    f = pptr / HC; i = pptr % HC;
    if (f >= MAXF) f = MAXF - 1;
    lut1_tdata = lut1_sel ? {th[f][2 * i + 1], th[f][2 * i]} : {iif[a][kx][j], sfac[a][kx][j]};
    lut2_tdata = {iif[a][kx + NX / 2][j], sfac[a][kx + NX / 2][j]};
    lut_tlast  = lut1_sel && (i == HC - 1);
    lut_tvalid = 1'b1;
  end

  always @(posedge clk) begin
    raw_gap <= ($urandom % 5 == 0);
    if (raw_tvalid && raw_tready) wptr <= wptr + 1;
    if (lut_tvalid && lut_tready) begin
      if (lut1_sel) pptr <= pptr + 1;
      else rptr <= rptr + 1;
    end
  end

  // output readiness: held low for a while after some ITFFT starts
  int hold = 0, n_go_it = 0;
  always @(posedge clk) begin
    if (dut.go_it) begin
      n_go_it <= n_go_it + 1;
      if (n_go_it % 2 == 0) hold <= 150;
    end else if (hold > 0) hold <= hold - 1;
  end
  assign bf_tready = (hold == 0);

  // ---------------------------------------------------------- mechanism counters
  int n_in_stall = 0, n_out_wait = 0, n_compound = 0, n_single = 0, n_lutsel = 0;
  int n_pp_swap = 0, n_overlap = 0, n_zero = 0, n_b2b = 0, n_restart = 0;
  logic lut1_sel_q = 0;
  logic [3:0] sel_q = '0;
  logic [1:0] gst_q = '0;
  always @(posedge clk) if (nrst) begin
    if (raw_tready && !raw_tvalid) n_in_stall++;
    if (dut.busy_it && !bf_tready && !bf_tvalid) n_out_wait++;
    if (dut.go_rc && dut.rc_cmp) n_compound++;
    if (dut.go_rc && !dut.rc_cmp) n_single++;
    if (lut1_sel != lut1_sel_q) n_lutsel++;
    if ({dut.sel_t, dut.sel_x, dut.sel_rc, dut.sel_ix} != sel_q) n_pp_swap++;
    if (int'(dut.busy_t) + int'(dut.busy_x) + int'(dut.busy_rc) + int'(dut.busy_ix) + int'(dut.busy_it) >= 3)
      n_overlap++;
    if (dut.u_xfft.feed_q && dut.u_xfft.zero_q) n_zero++;
    if (dut.go_t && dut.go_x) n_b2b++;
    if (gst_q == 2'd2 && dut.gstate == 2'd0) n_restart++;
    if (bf_tvalid && !bf_tready) begin
      failures++;
      $display("ERROR: output while not ready at cycle %0d", cyc);
    end
    lut1_sel_q <= lut1_sel;
    sel_q <= {dut.sel_t, dut.sel_x, dut.sel_rc, dut.sel_ix};
    gst_q <= dut.gstate;
  end

  // ---------------------------------------------------------- output check
  int optr = 0, run_nimg = 0, bad_print = 0;
  always @(posedge clk) if (nrst && bf_tvalid) begin
    int m, x, n;
    real g[4], e[4];
    m = optr / (HC * NT); x = (optr / NT) % HC; n = optr % NT;
    if (m >= run_nimg) begin
      failures++;
      $display("ERROR: extra output word %0d", optr);
    end else begin
      g[0] = f2r(bf_tdata[31:0]);   g[1] = f2r(bf_tdata[63:32]);
      g[2] = f2r(bf_tdata[95:64]);  g[3] = f2r(bf_tdata[127:96]);
      e[0] = exp_re[m][x][n];       e[1] = exp_im[m][x][n];
      e[2] = exp_re[m][x + HC][n];  e[3] = exp_im[m][x + HC][n];
      for (int q = 0; q < 4; q++) begin
        checks++;
        if (!close(g[q], e[q], 1e-4, peak[m])) begin
          failures++;
          if (bad_print < 10) begin
            bad_print++;
            $display("ERROR: img %0d x %0d n %0d part %0d got %g exp %g", m, x + (q / 2) * HC, n, q, g[q], e[q]);
          end
        end
      end
      checks++;
      if (bf_tlast != (x == HC - 1 && n == NT - 1)) begin
        failures++;
        $display("ERROR: tlast wrong at word %0d", optr);
      end
    end
    optr <= optr + 1;
  end

  // ---------------------------------------------------------- sequence
  int n_go_t = 0;
  always @(posedge clk) if (dut.go_t) n_go_t <= n_go_t + 1;

  initial begin
    repeat (5) @(posedge clk);
    nrst = 1;
    for (int r = 0; r < NRUN; r++) begin
      int nf;
      cur_nang = ANG[r] + 1;
      make_data(cur_nang, NIMG[r]);
      model(cur_nang, NIMG[r]);
      nf = cur_nang * NIMG[r];
      wait (dut.gstate == 2'd1);
      @(negedge clk);
      pptr = 0; rptr = 0; wptr = 0; optr = 0; n_go_t = 0;
      run_nimg = NIMG[r];
      angle = 4'(ANG[r]);
      start = 1;
      wait (n_go_t == nf);
      @(negedge clk);
      start = 0;
      wait (optr == NIMG[r] * HC * NT && dut.gstate == 2'd1);
      checks++;
      if (wptr != nf * HC * NT || pptr != nf * HC || rptr != nf * NX / 2 * NF) begin
        failures++;
        $display("ERROR: run %0d consumed raw %0d plut %0d rlut %0d", r, wptr, pptr, rptr);
      end
      $display("run %0d: %0d angle(s), %0d images done at cycle %0d", r, cur_nang, NIMG[r], cyc);
    end
    $display("mechanisms: in_stall=%0d out_wait=%0d compound=%0d single=%0d lut_sel=%0d pp_swap=%0d overlap=%0d zero_fill=%0d back_to_back=%0d restart=%0d",
             n_in_stall, n_out_wait, n_compound, n_single, n_lutsel, n_pp_swap, n_overlap, n_zero, n_b2b, n_restart);
    foreach (ANG[i]) ;
    checks++; if (n_in_stall == 0) begin failures++; $display("ERROR: no input stall"); end
    checks++; if (n_out_wait == 0) begin failures++; $display("ERROR: no output wait"); end
    checks++; if (n_compound == 0) begin failures++; $display("ERROR: no compound run"); end
    checks++; if (n_single == 0) begin failures++; $display("ERROR: no single-angle run"); end
    checks++; if (n_lutsel == 0) begin failures++; $display("ERROR: LUT select never switched"); end
    checks++; if (n_pp_swap == 0) begin failures++; $display("ERROR: no ping-pong swap"); end
    checks++; if (n_overlap == 0) begin failures++; $display("ERROR: stages never overlapped"); end
    checks++; if (n_zero == 0) begin failures++; $display("ERROR: no zero padding"); end
    checks++; if (n_b2b == 0) begin failures++; $display("ERROR: no back-to-back frames"); end
    checks++; if (n_restart == 0) begin failures++; $display("ERROR: controller never returned to HALT"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
