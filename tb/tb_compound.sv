// tb_compound: complex float sum of a Remap result and the stored partial
// sum, with gaps in the input; checks the values against real arithmetic,
// the 8-cycle latency and tlast.
module tb_compound;
  import fp_pkg::*;
  import tb_fp_pkg::*;
  logic clk = 0, rst_n = 0, v = 0, l = 0;
  cplx_t r, m, y;
  logic yv, yl;
  int checks = 0, failures = 0, cyc = 0;

  compound dut (.aclk(clk), .aresetn(rst_n), .en(1'b1), .s_axis_data_tdata_Remap(r),
                .s_axis_data_tdata_Mem(m), .s_axis_data_tvalid_Remap(v), .s_axis_data_tlast(l),
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

  typedef struct { real re, im; bit last; int c; } exp_t;
  exp_t q[$];
  always @(posedge clk) if (rst_n && yv) begin
    exp_t e;
    e = q.pop_front();
    checks += 3;
    if (!close(f2r(y.re), e.re, 2.5e-7, 1e-20) || !close(f2r(y.im), e.im, 2.5e-7, 1e-20)) begin
      failures++; $display("ERROR: got %g %g exp %g %g", f2r(y.re), f2r(y.im), e.re, e.im);
    end
    if (yl != e.last) begin failures++; $display("ERROR: tlast"); end
    if (cyc - e.c != 8) begin failures++; $display("ERROR: latency %0d", cyc - e.c); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      @(negedge clk);
      v = ($urandom % 4 != 0);
      r.re = tb_fp_pkg::r2f((real'($urandom % 20001) - 10000.0) / 37.0);
      r.im = tb_fp_pkg::r2f((real'($urandom % 20001) - 10000.0) / 37.0);
      m.re = tb_fp_pkg::r2f((real'($urandom % 20001) - 10000.0) / 11.0);
      m.im = tb_fp_pkg::r2f((real'($urandom % 20001) - 10000.0) / 11.0);
      l = (i % 16 == 15);
      if (v) begin
        e.re = f2r(r.re) + f2r(m.re); e.im = f2r(r.im) + f2r(m.im); e.last = l; e.c = cyc;
        q.push_back(e);
      end
    end
    @(negedge clk); v = 0;
    repeat (20) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: %0d results missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
