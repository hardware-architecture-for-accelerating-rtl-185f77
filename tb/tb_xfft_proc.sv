// tb_xfft_proc: lateral FFT process at NX = 16 over 32 rows, in both uses:
// forward with 8 source columns (zero padded to 16, XFFT) and inverse with 16
// source columns (IXFFT). The source memory is modelled with one cycle of
// read latency. Written words must equal the DFT / inverse DFT of each row,
// stored column-major (bin k of row r at k*32 + r). Two frames each; checks
// that every address is written once and the stage length (16 rows of 16
// points per core, fed on consecutive cycles).
module tb_xfft_proc;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NX = 16, NR = 32;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0, cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // forward unit: 8 source columns
  logic st_f = 0, dn_f, bz_f;
  logic [7:0] raf, rbf;
  cplx_t rdaf, rdbf;
  logic waf_en, wbf_en;
  logic [8:0] waf, wbf;
  cplx_t wdaf, wdbf;
  xfft_proc #(.NX(NX), .NROWS(NR), .SRC_COLS(8), .INV(1'b0)) dut_f (
    .clk, .rst_n, .start(st_f), .done(dn_f), .busy(bz_f),
    .ra_addr(raf), .rb_addr(rbf), .ra_data(rdaf), .rb_data(rdbf),
    .wa_en(waf_en), .wa_addr(waf), .wa_data(wdaf), .wb_en(wbf_en), .wb_addr(wbf), .wb_data(wdbf));
  // inverse unit: 16 source columns
  logic st_i = 0, dn_i, bz_i;
  logic [8:0] rai, rbi;
  cplx_t rdai, rdbi;
  logic wai_en, wbi_en;
  logic [8:0] wai, wbi;
  cplx_t wdai, wdbi;
  xfft_proc #(.NX(NX), .NROWS(NR), .SRC_COLS(NX), .INV(1'b1)) dut_i (
    .clk, .rst_n, .start(st_i), .done(dn_i), .busy(bz_i),
    .ra_addr(rai), .rb_addr(rbi), .ra_data(rdai), .rb_data(rdbi),
    .wa_en(wai_en), .wa_addr(wai), .wa_data(wdai), .wb_en(wbi_en), .wb_addr(wbi), .wb_data(wdbi));

  cplx_t srcf [NR * 8], srci [NR * NX], dstf [NR * NX], dsti [NR * NX];
  int nwf [NR * NX], nwi [NR * NX];
  always @(posedge clk) begin
    rdaf <= srcf[raf]; rdbf <= srcf[rbf];
    rdai <= srci[rai]; rdbi <= srci[rbi];
    if (waf_en) begin dstf[waf] <= wdaf; nwf[waf]++; end
    if (wbf_en) begin dstf[wbf] <= wdbf; nwf[wbf]++; end
    if (wai_en) begin dsti[wai] <= wdai; nwi[wai]++; end
    if (wbi_en) begin dsti[wbi] <= wdbi; nwi[wbi]++; end
  end
  int feed_f = 0, feed_i = 0;
  always @(posedge clk) begin
    if (dut_f.feed) feed_f++;
    if (dut_i.feed) feed_i++;
  end

  task automatic check(bit inv, int ncols);
    for (int r = 0; r < NR; r++)
      for (int k = 0; k < NX; k++) begin
        real er, ei, w, sg, xr, xi;
        cplx_t g;
        er = 0.0; ei = 0.0; sg = inv ? 1.0 : -1.0;
        for (int x = 0; x < ncols; x++) begin
          if (inv) begin xr = f2r(srci[r * NX + x].re); xi = f2r(srci[r * NX + x].im); end
          else     begin xr = f2r(srcf[r * 8 + x].re);  xi = f2r(srcf[r * 8 + x].im);  end
          w = sg * 2.0 * PI * k * x / NX;
          er += xr * $cos(w) - xi * $sin(w);
          ei += xr * $sin(w) + xi * $cos(w);
        end
        g = inv ? dsti[k * NR + r] : dstf[k * NR + r];
        checks += 2;
        if (!close(f2r(g.re), er, 1e-5, 10.0) || !close(f2r(g.im), ei, 1e-5, 10.0)) begin
          failures++;
          if (failures < 10) $display("ERROR: inv %0d row %0d bin %0d got %g %g exp %g %g", inv, r, k, f2r(g.re), f2r(g.im), er, ei);
        end
        if ((inv ? nwi[k * NR + r] : nwf[k * NR + r]) != 1) begin failures++; $display("ERROR: write count"); end
      end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      int t0, tf, ti;
      foreach (srcf[i]) begin srcf[i].re = r2f(real'(int'($urandom % 2001) - 1000) / 100.0); srcf[i].im = r2f(real'(int'($urandom % 2001) - 1000) / 100.0); end
      foreach (srci[i]) begin srci[i].re = r2f(real'(int'($urandom % 2001) - 1000) / 100.0); srci[i].im = r2f(real'(int'($urandom % 2001) - 1000) / 100.0); end
      foreach (nwf[i]) begin nwf[i] = 0; nwi[i] = 0; end
      feed_f = 0; feed_i = 0;
      @(negedge clk); st_f = 1; st_i = 1; t0 = cyc; @(negedge clk); st_f = 0; st_i = 0;
      fork
        begin @(posedge clk iff dn_f); tf = cyc; end
        begin @(posedge clk iff dn_i); ti = cyc; end
      join
      @(negedge clk);
      check(1'b0, 8);
      check(1'b1, NX);
      checks += 2;
      if (feed_f != NR / 2 * NX || feed_i != NR / 2 * NX) begin failures++; $display("ERROR: fed %0d %0d points", feed_f, feed_i); end
      if (bz_f || bz_i) begin failures++; $display("ERROR: busy after done"); end
      $display("frame %0d: XFFT %0d cycles, IXFFT %0d cycles", fr, tf - t0, ti - t0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
