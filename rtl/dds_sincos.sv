// dds_sincos: phase to sine/cosine converter, the part played by the DDS
// Compiler core inside the Sin/Cos unit.
//
// Interface as the design uses it: a 25-bit two's complement phase in
// fractions of a full turn (phase/2^25 * 2*pi radians) in, 26-bit two's
// complement sine and cosine with 25 fractional bits out, one conversion per
// clock. The document only gives this function and the widths; the insides
// here are this design's own: a fully pipelined rotation-mode CORDIC with ITER
// micro-rotations on 32-bit Q2.30 values. Phases in the left half plane are
// first rotated by half a turn and the result negated. The arctangent table
// holds round(atan(2^-i) / (2*pi) * 2^32). Outputs are rounded and clipped to
// +/-(2^25 - 1). Latency: ITER + 2 cycles; valid follows in_valid.
module dds_sincos #(
  parameter int unsigned ITER = 24
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               in_valid,
  input  logic        [24:0] phase,
  output logic               out_valid,
  output logic signed [25:0] sin_o,
  output logic signed [25:0] cos_o
);
  localparam logic [31:0] ATAN [28] = '{
      32'h20000000, 32'h12E4051E, 32'h09FB385B, 32'h051111D4, 32'h028B0D43,
      32'h0145D7E1, 32'h00A2F61E, 32'h00517C55, 32'h0028BE53, 32'h00145F2F,
      32'h000A2F98, 32'h000517CC, 32'h00028BE6, 32'h000145F3, 32'h0000A2FA,
      32'h0000517D, 32'h000028BE, 32'h0000145F, 32'h00000A30, 32'h00000518,
      32'h0000028C, 32'h00000146, 32'h000000A3, 32'h00000051, 32'h00000029,
      32'h00000014, 32'h0000000A, 32'h00000005};
  localparam logic signed [31:0] KINV = 32'sh26DD3B6A;  // 0.607252935 in Q2.30

  logic signed [31:0] x [ITER+1];
  logic signed [31:0] y [ITER+1];
  logic signed [31:0] z [ITER+1];
  logic               ng [ITER+1];
  logic [ITER+1:0]    vld;

  // stage 0: fold into [-1/4, 1/4] turn
  always_ff @(posedge clk) begin
    logic [31:0] zi;
    zi = {phase, 7'd0};
    if (zi[31] != zi[30]) begin
      z[0]  <= $signed(zi ^ 32'h8000_0000);
      ng[0] <= 1'b1;
    end else begin
      z[0]  <= $signed(zi);
      ng[0] <= 1'b0;
    end
    x[0] <= KINV;
    y[0] <= '0;
  end

  for (genvar i = 0; i < int'(ITER); i++) begin : g_it
    always_ff @(posedge clk) begin
      if (z[i] >= 0) begin
        x[i+1] <= x[i] - (y[i] >>> i);
        y[i+1] <= y[i] + (x[i] >>> i);
        z[i+1] <= z[i] - $signed(ATAN[i]);
      end else begin
        x[i+1] <= x[i] + (y[i] >>> i);
        y[i+1] <= y[i] - (x[i] >>> i);
        z[i+1] <= z[i] + $signed(ATAN[i]);
      end
      ng[i+1] <= ng[i];
    end
  end

  function automatic logic signed [25:0] to_out(input logic signed [31:0] v, input logic n);
    logic signed [32:0] r;
    r = (n ? -33'(v) : 33'(v)) + 33'sd16;
    r = r >>> 5;
    if (r > 33'sd33554431)  return 26'sd33554431;
    if (r < -33'sd33554431) return -26'sd33554431;
    return r[25:0];
  endfunction

  always_ff @(posedge clk) begin
    cos_o <= to_out(x[ITER], ng[ITER]);
    sin_o <= to_out(y[ITER], ng[ITER]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) vld <= '0;
    else        vld <= {vld[ITER:0], in_valid};
  end
  assign out_valid = vld[ITER+1];
endmodule
