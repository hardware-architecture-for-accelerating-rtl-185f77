// tb_tm_core_full: one complete image through the beamformer core at its full
// size (4096-point temporal FFT, 256-point lateral FFT, 128 elements).
//
// Every element receives a tone, raw[c][n] = cos(2*pi*K0*n/4096 + phi_c), and
// a random phase-shift angle theta_c; the remap table is the identity
// (iiF[j] = j, SFac = 1) and one angle is used. The half spectrum of each
// column then holds only bin K0 with value 2048*exp(j*psi_c),
// psi_c = phi_c + (K0+1)*theta_c*pi; the lateral FFT pair returns the
// columns scaled by 256, and the inverse temporal FFT turns the single bin
// into an analytic tone, so the expected output is
//   out[x][n] = 256 * 2048 * exp(j*(psi_x + 2*pi*K0*n/4096)).
// All 128 x 4096 output samples are checked. The raw input pauses at random
// and the output channel starts not-ready.
module tb_tm_core_full;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NT = 4096, NX = 256, NCOL = 128, NF = NT / 2, HC = NCOL / 2;
  localparam int K0 = 300;
  localparam real PI = 3.14159265358979323846;

  logic clk = 0, nrst = 0, start = 0;
  logic [3:0] angle = '0;
  logic [63:0] lut1_tdata, lut2_tdata, raw_tdata;
  logic lut1_sel, lut_tready, lut_tvalid, lut_tlast;
  logic raw_tready, raw_tvalid, raw_tlast;
  logic [127:0] bf_tdata;
  logic bf_tvalid, bf_tlast, bf_tready;

  tm_core dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (3000000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real         phi [NCOL];
  logic [31:0] th  [NCOL];
  real         psi [NCOL];
  initial begin
    for (int c = 0; c < NCOL; c++) begin
      phi[c] = 2.0 * PI * real'($urandom % 1000) / 1000.0;
      th[c]  = r2f((real'($urandom % 2001) - 1000.0) / 1000.0 / real'(K0 + 1));
      psi[c] = phi[c] + real'(K0 + 1) * f2r(th[c]) * PI;
    end
  end

  int pptr = 0, rptr = 0, wptr = 0;
  logic raw_gap = 0;
  always_comb begin
    int i, n, c;
    i = (wptr / NT) % HC; n = wptr % NT;
    raw_tdata = {r2f($cos(2.0 * PI * K0 * n / NT + phi[2 * i + 1])),
                 r2f($cos(2.0 * PI * K0 * n / NT + phi[2 * i]))};
    raw_tlast  = (n == NT - 1);
    raw_tvalid = !raw_gap;
    c = pptr % HC;
    lut1_tdata = lut1_sel ? {th[2 * c + 1], th[2 * c]} : {r2f(real'(rptr % NF)), r2f(1.0)};
    lut2_tdata = {r2f(real'(rptr % NF)), r2f(1.0)};
    lut_tlast  = lut1_sel && (c == HC - 1);
    lut_tvalid = 1'b1;
  end

  int n_in_stall = 0, n_out_wait = 0;
  always @(posedge clk) begin
    raw_gap <= ($urandom % 10 == 0);
    if (raw_tvalid && raw_tready) wptr <= wptr + 1;
    if (raw_tready && !raw_tvalid) n_in_stall++;
    if (lut_tvalid && lut_tready) begin
      if (lut1_sel) pptr <= pptr + 1;
      else rptr <= rptr + 1;
    end
  end

  int hold = 0;
  always @(posedge clk) begin
    if (dut.go_it) hold <= 500;
    else if (hold > 0) hold <= hold - 1;
    if (dut.busy_it && !bf_tready && !bf_tvalid) n_out_wait++;
  end
  assign bf_tready = (hold == 0);

  int optr = 0, bad = 0;
  real pk = 256.0 * 2048.0;
  always @(posedge clk) if (nrst && bf_tvalid) begin
    int x, n;
    real g[4], e[4], w;
    x = optr / NT; n = optr % NT;
    w = 2.0 * PI * K0 * n / NT;
    g[0] = f2r(bf_tdata[31:0]);  g[1] = f2r(bf_tdata[63:32]);
    g[2] = f2r(bf_tdata[95:64]); g[3] = f2r(bf_tdata[127:96]);
    e[0] = pk * $cos(psi[x] + w);      e[1] = pk * $sin(psi[x] + w);
    e[2] = pk * $cos(psi[x + HC] + w); e[3] = pk * $sin(psi[x + HC] + w);
    for (int q = 0; q < 4; q++) begin
      checks++;
      if (!close(g[q], e[q], 1e-3, pk)) begin
        failures++;
        if (bad++ < 10) $display("ERROR: x %0d n %0d part %0d got %g exp %g", x + (q / 2) * HC, n, q, g[q], e[q]);
      end
    end
    checks++;
    if (bf_tvalid && !bf_tready) begin failures++; $display("ERROR: output while not ready"); end
    checks++;
    if (bf_tlast != (optr == HC * NT - 1)) begin failures++; $display("ERROR: tlast at word %0d", optr); end
    optr <= optr + 1;
  end

  initial begin
    repeat (5) @(posedge clk);
    nrst = 1;
    wait (dut.gstate == 2'd1);
    @(negedge clk);
    start = 1;
    wait (dut.go_t);
    @(negedge clk);
    start = 0;
    wait (optr == HC * NT && dut.gstate == 2'd1);
    checks++;
    if (wptr != HC * NT || pptr != HC || rptr != NX / 2 * NF) begin
      failures++;
      $display("ERROR: consumed raw %0d plut %0d rlut %0d", wptr, pptr, rptr);
    end
    $display("image done at cycle %0d; input stalls %0d, output wait cycles %0d", cyc, n_in_stall, n_out_wait);
    checks++; if (n_in_stall == 0) begin failures++; $display("ERROR: no input stall"); end
    checks++; if (n_out_wait == 0) begin failures++; $display("ERROR: no output wait"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
