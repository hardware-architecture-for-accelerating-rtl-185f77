// tb_itfft_proc: inverse temporal FFT process at NT = 64, NX = 16, 8 output
// columns. MemIX is modelled with one cycle of read latency. The output
// channel is not ready for a while after start; nothing may come out before
// it is. Each output word must hold, for columns x and x+4, the inverse DFT
// of the 32 stored bins with the upper 32 bins zero, and the frame must be
// delivered on consecutive cycles with tlast on its last word. Two frames.
module tb_itfft_proc;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NT = 64, NF = 32, NX = 16, NCOL = 8, HC = 4, TOTAL = HC * NT;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic [8:0] ra_addr, rb_addr;
  cplx_t ra_data, rb_data;
  logic [127:0] out_tdata;
  logic out_tvalid, out_tlast, out_tready = 0;
  int checks = 0, failures = 0, cyc = 0;

  itfft_proc #(.NT(NT), .NX(NX), .NCOL(NCOL)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cplx_t mem [NF * NX];
  always @(posedge clk) begin ra_data <= mem[ra_addr]; rb_data <= mem[rb_addr]; end

  int optr = 0, t_first = 0, t_last = 0;
  always @(posedge clk) if (rst_n && out_tvalid) begin
    int x, n;
    real g[4], e[4];
    x = optr / NT; n = optr % NT;
    if (optr == 0) t_first = cyc;
    t_last = cyc;
    for (int h = 0; h < 2; h++) begin
      real er, ei, w;
      er = 0.0; ei = 0.0;
      for (int k = 0; k < NF; k++) begin
        w = 2.0 * PI * k * n / NT;
        er += f2r(mem[(x + h * HC) * NF + k].re) * $cos(w) - f2r(mem[(x + h * HC) * NF + k].im) * $sin(w);
        ei += f2r(mem[(x + h * HC) * NF + k].re) * $sin(w) + f2r(mem[(x + h * HC) * NF + k].im) * $cos(w);
      end
      e[2 * h] = er; e[2 * h + 1] = ei;
    end
    for (int q = 0; q < 4; q++) begin
      g[q] = f2r(out_tdata[32 * q +: 32]);
      checks++;
      if (!close(g[q], e[q], 1e-5, 100.0)) begin
        failures++;
        if (failures < 10) $display("ERROR: word %0d part %0d got %g exp %g", optr, q, g[q], e[q]);
      end
    end
    checks += 2;
    if (!out_tready) begin failures++; $display("ERROR: output before ready"); end
    if (out_tlast != (optr == TOTAL - 1)) begin failures++; $display("ERROR: tlast at %0d", optr); end
    optr++;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      foreach (mem[i]) begin mem[i].re = r2f(real'(int'($urandom % 2001) - 1000) / 10.0); mem[i].im = r2f(real'(int'($urandom % 2001) - 1000) / 10.0); end
      optr = 0;
      @(negedge clk); start = 1; out_tready = 0; @(negedge clk); start = 0;
      repeat (100 + fr * 50) @(negedge clk);
      out_tready = 1;
      @(posedge clk iff done);
      @(negedge clk);
      checks += 3;
      if (optr != TOTAL) begin failures++; $display("ERROR: %0d words", optr); end
      if (t_last - t_first != TOTAL - 1) begin failures++; $display("ERROR: frame took %0d cycles", t_last - t_first + 1); end
      if (busy) begin failures++; $display("ERROR: busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
