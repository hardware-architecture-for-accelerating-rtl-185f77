// tb_tfft_proc: TFFT process (TFFT core + DSPS) at NT = 64 with 8 raw
// columns. Two frames: the first with random pauses on the raw input and
// the phase words, the second without pauses, where the NCOL/2 * NT input
// words must be taken on consecutive cycles. The words written to the MemT
// side are compared with the DFT of each real column times
// exp(j*(k+1)*angle*pi), at address k*NCOL + column.
module tb_tfft_proc;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam int NT = 64, NF = 32, NCOL = 8, HC = 4, TOTAL = HC * NT;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, start = 0, done, busy;
  logic plut_req, plut_valid, plut_ready, plut_last;
  logic [63:0] plut_data, in_tdata;
  logic in_tready, in_tvalid, in_tlast;
  logic mem_we;
  logic [7:0] mem_waddr;
  cplx_t mem_wdata;
  int checks = 0, failures = 0, cyc = 0;

  tfft_proc #(.NT(NT), .NCOL(NCOL), .PH_DEPTH(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [31:0] raw [NCOL][NT];
  logic [31:0] th [NCOL];
  cplx_t mt [NF * NCOL];
  bit written [NF * NCOL];
  int pptr, wptr, nwr, t_first, t_last;
  bit gaps;

  always_comb begin
    plut_data  = {th[2 * (pptr % HC) + 1], th[2 * (pptr % HC)]};
    plut_last  = (pptr % HC == HC - 1);
    in_tdata   = {raw[2 * ((wptr / NT) % HC) + 1][wptr % NT], raw[2 * ((wptr / NT) % HC)][wptr % NT]};
    in_tlast   = (wptr % NT == NT - 1);
  end
  always @(posedge clk) begin
    if (plut_valid && plut_ready) pptr <= pptr + 1;
    if (in_tvalid && in_tready) begin
      if (wptr == 0) t_first <= cyc;
      t_last <= cyc;
      wptr <= wptr + 1;
    end
    if (mem_we) begin
      checks++;
      if (written[mem_waddr]) begin failures++; $display("ERROR: address %0d written twice", mem_waddr); end
      mt[mem_waddr] <= mem_wdata; written[mem_waddr] <= 1; nwr <= nwr + 1;
    end
  end
  always @(negedge clk) begin
    plut_valid = gaps ? 1'($urandom) : 1'b1;
    in_tvalid  = gaps ? ($urandom % 4 != 0) : 1'b1;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int fr = 0; fr < 2; fr++) begin
      foreach (raw[c, n]) raw[c][n] = r2f((real'($urandom % 20001) - 10000.0) / 10000.0);
      foreach (th[c]) th[c] = r2f(real'(int'($urandom % 3801) - 1900) / 1024.0);
      foreach (written[i]) written[i] = 0;
      pptr = 0; wptr = 0; nwr = 0; gaps = (fr == 0);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      @(posedge clk iff done);
      checks += 3;
      if (wptr != TOTAL) begin failures++; $display("ERROR: %0d raw words taken", wptr); end
      if (pptr != HC) begin failures++; $display("ERROR: %0d phase words taken", pptr); end
      if (nwr != NF * NCOL) begin failures++; $display("ERROR: %0d words written", nwr); end
      if (!gaps) begin
        checks++;
        if (t_last - t_first != TOTAL - 1) begin failures++; $display("ERROR: input took %0d cycles", t_last - t_first + 1); end
      end
      @(negedge clk);
      for (int c = 0; c < NCOL; c++)
        for (int k = 0; k < NF; k++) begin
          real ar, ai, p, er, ei;
          ar = 0.0; ai = 0.0;
          for (int n = 0; n < NT; n++) begin
            ar += f2r(raw[c][n]) * $cos(2.0 * PI * k * n / NT);
            ai -= f2r(raw[c][n]) * $sin(2.0 * PI * k * n / NT);
          end
          p = real'(k + 1) * f2r(th[c]) * PI;
          er = ar * $cos(p) - ai * $sin(p); ei = ar * $sin(p) + ai * $cos(p);
          checks++;
          if (!close(f2r(mt[k * NCOL + c].re), er, 1e-4, 10.0) || !close(f2r(mt[k * NCOL + c].im), ei, 1e-4, 10.0)) begin
            failures++;
            if (failures < 10) $display("ERROR: frame %0d col %0d bin %0d got %g %g exp %g %g", fr, c, k,
                                         f2r(mt[k * NCOL + c].re), f2r(mt[k * NCOL + c].im), er, ei);
          end
        end
      checks++; if (busy) begin failures++; $display("ERROR: busy after done"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
