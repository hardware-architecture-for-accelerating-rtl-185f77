// tb_phase_shift: complex rotation by (cos, sin) against real arithmetic;
// checks the 14-cycle latency (6 multiply + 8 add).
module tb_phase_shift;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, v = 0, ov;
  cplx_t ds, sc, ps;
  int checks = 0, failures = 0, cyc = 0;

  phase_shift dut (.clk, .rst_n, .in_valid(v), .ds, .sc, .out_valid(ov), .ps);

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { real re, im, mag; int c; } exp_t;
  exp_t q[$];
  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    e = q.pop_front();
    checks += 2;
    if (!close(f2r(ps.re), e.re, 1e-6, e.mag) || !close(f2r(ps.im), e.im, 1e-6, e.mag)) begin
      failures++; if (failures < 10) $display("ERROR: got %g %g exp %g %g", f2r(ps.re), f2r(ps.im), e.re, e.im);
    end
    if (cyc - e.c != 14) begin failures++; $display("ERROR: latency %0d", cyc - e.c); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      real a, c, s, xr, xi;
      @(negedge clk);
      v = ($urandom % 5 != 0);
      a  = 2.0 * PI * real'($urandom % 100000) / 100000.0;
      xr = (real'($urandom % 20001) - 10000.0) / 3.0;
      xi = (real'($urandom % 20001) - 10000.0) / 3.0;
      ds.re = r2f(xr); ds.im = r2f(xi);
      sc.re = r2f($cos(a)); sc.im = r2f($sin(a));
      c = f2r(sc.re); s = f2r(sc.im); xr = f2r(ds.re); xi = f2r(ds.im);
      if (v) begin
        e.re = xr * c - xi * s; e.im = xr * s + xi * c;
        e.mag = $sqrt(xr * xr + xi * xi); e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); v = 0;
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: results missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
