// tb_dds_sincos: CORDIC sine/cosine generator. Random phases over the whole
// turn plus the quadrant boundaries; outputs (26-bit, 25 fraction bits) are
// compared with $sin/$cos; checks the ITER + 2 = 26 cycle latency.
module tb_dds_sincos;
  localparam real PI = 3.14159265358979323846;
  logic clk = 0, rst_n = 0, v = 0, ov;
  logic [24:0] ph;
  logic signed [25:0] so, co;
  int checks = 0, failures = 0, cyc = 0;
  real maxerr = 0.0;

  dds_sincos dut (.clk, .rst_n, .in_valid(v), .phase(ph), .out_valid(ov), .sin_o(so), .cos_o(co));

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { logic [24:0] p; int c; } exp_t;
  exp_t q[$];
  always @(posedge clk) if (rst_n && ov) begin
    exp_t e;
    real a, es, ec, gs, gc, err;
    e = q.pop_front();
    a = 2.0 * PI * real'(e.p) / 33554432.0;
    es = $sin(a); ec = $cos(a);
    gs = real'(so) / 33554432.0; gc = real'(co) / 33554432.0;
    err = (gs > es) ? gs - es : es - gs;
    if (((gc > ec) ? gc - ec : ec - gc) > err) err = (gc > ec) ? gc - ec : ec - gc;
    if (err > maxerr) maxerr = err;
    checks += 2;
    if (err > 1e-6) begin
      failures++; if (failures < 10) $display("ERROR: phase %h got %f %f exp %f %f", e.p, gs, gc, es, ec);
    end
    if (cyc - e.c != 26) begin failures++; $display("ERROR: latency %0d", cyc - e.c); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      exp_t e;
      @(negedge clk);
      v = ($urandom % 4 != 0);
      ph = (i < 16) ? 25'(i * 25'h0200000 + (i % 3) - 1) : 25'($urandom);
      if (v) begin e.p = ph; e.c = cyc; q.push_back(e); end
    end
    @(negedge clk); v = 0;
    repeat (40) @(posedge clk);
    checks++; if (q.size() != 0) begin failures++; $display("ERROR: results missing"); end
    $display("max error %e", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
