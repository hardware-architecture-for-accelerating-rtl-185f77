// tb_sincos: phase accumulator with sine/cosine output. Columns of 64
// elements, each with its own angle (units of pi, positive and negative,
// large enough to wrap the accumulator several times); element k of a column
// (k = 1 ..) must give cos(k*angle*pi) and sin(k*angle*pi). Columns follow
// each other without gaps or with gaps. Checks the 36-cycle latency
// (4 float-to-fix + 2 accumulate + 26 DDS + 4 fix-to-float).
module tb_sincos;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  localparam int L = 64;
  logic clk = 0, rst_n = 0, en = 0, nc = 0, ov;
  logic [31:0] ang;
  cplx_t sc;
  int checks = 0, failures = 0, cyc = 0;

  sincos dut (.clk, .rst_n, .en, .new_col(nc), .angle(ang), .out_valid(ov), .sc);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real ph; int c; } exp_t;
  exp_t q[$];
  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    e = q.pop_front();
    checks += 2;
    if (!close(f2r(sc.re), $cos(e.ph), 2e-6, 1.0) || !close(f2r(sc.im), $sin(e.ph), 2e-6, 1.0)) begin
      failures++;
      if (failures < 10) $display("ERROR: ph %f got %f %f exp %f %f", e.ph, f2r(sc.re), f2r(sc.im), $cos(e.ph), $sin(e.ph));
    end
    if (cyc - e.c != 36) begin failures++; $display("ERROR: latency %0d", cyc - e.c); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int col = 0; col < 60; col++) begin
      real a;
      a = (real'($urandom % 3800001) - 1900000.0) / 1000000.0;
      a = real'(int'(a * 1048576.0)) / 1048576.0;          // exact in the fixed format
      if (col == 0) a = 1.0;
      if (col == 1) a = -0.5;
      for (int k = 1; k <= L; k++) begin
        exp_t e;
        @(negedge clk);
        en = 1; nc = (k == 1); ang = (k == 1) ? r2f(a) : $urandom;
        e.ph = real'(k) * f2r(r2f(a)) * PI; e.c = cyc;
        q.push_back(e);
      end
      if (col % 3 == 1) begin @(negedge clk); en = 0; nc = 0; repeat ($urandom % 5) @(negedge clk); end
    end
    @(negedge clk); en = 0; nc = 0;
    repeat (50) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
