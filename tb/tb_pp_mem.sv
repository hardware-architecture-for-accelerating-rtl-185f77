// tb_pp_mem: ping-pong memory pair. Random writes on both write ports and
// random reads on both read ports while sel toggles; a shadow model of the
// two memories gives the expected read data one cycle later. Checks that
// writes never reach the memory that is being read.
module tb_pp_mem;
  import fp_pkg::*;
  localparam int DEPTH = 64, AW = 6;
  logic clk = 0, sel = 0, wa_en = 0, wb_en = 0;
  logic [AW-1:0] wa_addr, wb_addr, ra_addr, rb_addr;
  cplx_t wa_data, wb_data, ra_data, rb_data;
  int checks = 0, failures = 0;

  pp_mem #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] m [2][DEPTH];
  bit          ok [2][DEPTH];
  logic [63:0] exp_a, exp_b;
  bit          ve_a, ve_b;
  int          n_swaps = 0;

  initial begin
    foreach (ok[i, j]) ok[i][j] = 0;
    // fill both memories through sel = 0 and sel = 1
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < DEPTH; i += 2) begin
        @(negedge clk);
        sel = s[0]; wa_en = 1; wb_en = 1; wa_addr = AW'(i); wb_addr = AW'(i + 1);
        wa_data = {$urandom, $urandom}; wb_data = {$urandom, $urandom};
        m[s][i] = wa_data; m[s][i + 1] = wb_data; ok[s][i] = 1; ok[s][i + 1] = 1;
      end
    for (int t = 0; t < 20000; t++) begin
      @(negedge clk);
      if ($urandom % 50 == 0) begin sel = ~sel; n_swaps++; end
      wa_en = 1'($urandom); wb_en = 1'($urandom);
      wa_addr = AW'($urandom); wb_addr = AW'($urandom);
      if (wb_addr == wa_addr) wb_en = 0;
      wa_data = {$urandom, $urandom}; wb_data = {$urandom, $urandom};
      ra_addr = AW'($urandom); rb_addr = AW'($urandom);
      // expected read data (memory not written this cycle)
      exp_a = m[~sel][ra_addr]; exp_b = m[~sel][rb_addr];
      ve_a = ok[~sel][ra_addr]; ve_b = ok[~sel][rb_addr];
      if (wa_en) m[sel][wa_addr] = wa_data;
      if (wb_en) m[sel][wb_addr] = wb_data;
      @(posedge clk); #1;
      checks++; if (ve_a && ra_data != exp_a) begin failures++; if (failures < 10) $display("ERROR: ra %0d got %h exp %h", ra_addr, ra_data, exp_a); end
      checks++; if (ve_b && rb_data != exp_b) begin failures++; if (failures < 10) $display("ERROR: rb %0d got %h exp %h", rb_addr, rb_data, exp_b); end
    end
    checks++; if (n_swaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
