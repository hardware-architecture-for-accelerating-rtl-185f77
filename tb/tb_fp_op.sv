// tb_fp_op: binary32 adder, subtractor and multiplier against real
// arithmetic, including cancellation, zero operands and small values that
// flush to zero; checks the 8-cycle add/sub and 6-cycle multiply latencies.
module tb_fp_op;
  import fp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 0, rst_n = 0, iv = 0;
  logic [31:0] a, b, y_add, y_sub, y_mul;
  logic v_add, v_sub, v_mul;
  int checks = 0, failures = 0;

  fp_op #(.OP(0), .LAT(8)) u_add (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(v_add), .y(y_add));
  fp_op #(.OP(1), .LAT(8)) u_sub (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(v_sub), .y(y_sub));
  fp_op #(.OP(2), .LAT(6)) u_mul (.clk, .rst_n, .in_valid(iv), .a, .b, .out_valid(v_mul), .y(y_mul));

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    $display("ERROR: watchdog expired");
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int N = 2000;
  logic [31:0] ta [N], tb_ [N];
  int in_cyc [N];
  int cyc = 0, ia = 0, is = 0, im = 0;
  always @(posedge clk) cyc <= cyc + 1;

  function automatic logic [31:0] rnd();
    int e = 127 + int'($urandom % 41) - 20;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  task automatic chk(string nm, logic [31:0] got, real exp, int lat, int idx);
    checks++;
    if (!((exp == 0.0 && got[30:0] == 0) || close(f2r(got), exp, 2.5e-7, 1e-30))) begin
      failures++;
      if (failures < 10) $display("ERROR: %s %0d: got %h (%g) exp %g", nm, idx, got, f2r(got), exp);
    end
    checks++;
    if (cyc - in_cyc[idx] != lat) begin
      failures++;
      $display("ERROR: %s latency %0d", nm, cyc - in_cyc[idx]);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (v_add) begin chk("add", y_add, f2r(ta[ia]) + f2r(tb_[ia]), 8, ia); ia++; end
    if (v_sub) begin chk("sub", y_sub, f2r(ta[is]) - f2r(tb_[is]), 8, is); is++; end
    if (v_mul) begin
      real p;
      p = f2r(ta[im]) * f2r(tb_[im]);
      if (rabs(p) < 1.2e-38) p = 0.0;
      chk("mul", y_mul, p, 6, im); im++;
    end
  end

  initial begin
    for (int i = 0; i < N; i++) begin
      ta[i] = rnd(); tb_[i] = rnd();
      case (i % 10)
        1: tb_[i] = ta[i];                                   // a - a = 0
        2: tb_[i] = {~ta[i][31], ta[i][30:0]};               // a + (-a) = 0
        3: tb_[i] = 32'h0;                                   // zero operand
        4: tb_[i] = {ta[i][31], ta[i][30:23] - 8'd1, ta[i][22:0] ^ 23'd1}; // near cancellation
        5: begin ta[i] = {1'b0, 8'd3, 23'($urandom)}; tb_[i] = {1'b0, 8'd5, 23'($urandom)}; end // underflow
        default: ;
      endcase
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      a = ta[i]; b = tb_[i]; iv = 1; in_cyc[i] = cyc;
      if (i % 7 == 3) begin @(negedge clk); iv = 0; end
      @(posedge clk); #1 iv = iv;
    end
    @(negedge clk); iv = 0;
    repeat (20) @(posedge clk);
    checks++;
    if (ia != N || is != N || im != N) begin failures++; $display("ERROR: result counts %0d %0d %0d", ia, is, im); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
