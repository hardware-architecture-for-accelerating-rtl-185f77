// fp_op: pipelined single-precision operator (add, subtract or multiply).
//
// Stands for one instance of the floating-point operator cores of the design
// (Float Add, Float Sub, Float Mul in the DSPS, Phase Shift and Remap units).
// The result is computed in the first stage and carried through LAT-1 further
// registers, so the operator has exactly LAT cycles of latency and accepts one
// operand pair per cycle. The default latencies (8 for add/subtract, 6 for
// multiply) are the ones stated for the Remap unit; the arithmetic itself is
// that of fp_pkg (round to nearest even, subnormals flushed to zero).
module fp_op
  import fp_pkg::*;
#(
  parameter int unsigned OP  = 0,   // 0 add, 1 subtract (a - b), 2 multiply
  parameter int unsigned LAT = 8
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  input  f32_t a,
  input  f32_t b,
  output logic out_valid,
  output f32_t y
);
  f32_t r;
  always_comb begin
    case (OP)
      0:       r = fp_add(a, b);
      1:       r = fp_sub(a, b);
      default: r = fp_mul(a, b);
    endcase
  end

  logic [LAT-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[LAT-2:0], in_valid};
  end
  assign out_valid = vpipe[LAT-1];

  delay_line #(.W(32), .D(LAT)) u_d (.clk(clk), .d(r), .q(y));
endmodule
