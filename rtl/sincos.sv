// sincos: phase accumulator and sine/cosine generator of the DSPS unit.
//
// For each column of the frequency/space spectrum the column's shift angle is
// latched when new_col is high, and on every enabled cycle the phase
// PS = PS + angle is advanced (the first element of a column already gets
// PS = angle), kept inside one turn, and its cosine and sine are produced as
// floats. Structure as in the design: Float to Fix (27 bits: sign, one integer
// bit, 25 fraction bits), Reg Angle, accumulation of the absolute value with a
// compare-and-subtract against 2*pi, conversion back to a signed angle using
// the stored sign, DDS (dds_sincos) and two Fix to Float converters.
//
// Angle unit (this design's reading of the fixed-point format): the float
// angle is given in units of pi radians, so the 1.25 unsigned accumulator
// spans exactly one turn and "2*pi" is the value 2.0. The signed result is
// passed to the DDS as a fraction of a turn.
//
// Interface: en marks an element, new_col marks the first element of a
// column (angle must be valid in that cycle). Output: sc.re = cos(PS),
// sc.im = sin(PS), valid LAT = F2F_LAT + 2 + DDS latency + I2F_LAT cycles after
// en. The stream is gapless across columns.
module sincos
  import fp_pkg::*;
#(
  parameter int unsigned F2F_LAT  = 4,
  parameter int unsigned I2F_LAT  = 4,
  parameter int unsigned DDS_ITER = 24,
  localparam int unsigned LAT     = F2F_LAT + 2 + DDS_ITER + 2 + I2F_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  new_col,
  input  f32_t  angle,
  output logic  out_valid,
  output cplx_t sc
);
  localparam logic [26:0] TWO_PI = 27'h400_0000;   // 2.0 in units of pi, 25 fraction bits

  // Float to Fix
  logic signed [63:0] fx_full;
  logic signed [26:0] fx_d;
  logic [1:0]         ctl_d;   // {en, new_col}
  assign fx_full = fp_to_fix(angle, 25);
  delay_line #(.W(27), .D(F2F_LAT)) u_fx  (.clk(clk), .d(fx_full[26:0]), .q(fx_d));
  ctl_delay #(.W(2),  .D(F2F_LAT)) u_ctl (.clk(clk), .rst_n(rst_n), .d({en, new_col}), .q(ctl_d));

  // Reg Angle, ABS, Acc with Comp/Sub
  logic signed [26:0] reg_angle;
  logic [25:0]        acc;
  logic               sgn_q, acc_v;
  function automatic logic [25:0] abs26(input logic signed [26:0] a);
    logic [26:0] m;
    m = a[26] ? 27'(-a) : 27'(a);
    return m[26] ? 26'h3FF_FFFF : m[25:0];
  endfunction

  always_ff @(posedge clk) begin
    logic [26:0]        sum;
    logic signed [26:0] ang;
    if (!rst_n) begin
      acc_v     <= 1'b0;
      acc       <= '0;
      sgn_q     <= 1'b0;
      reg_angle <= '0;
    end else begin
      acc_v <= ctl_d[1];
      if (ctl_d[1]) begin
        ang = ctl_d[0] ? fx_d : reg_angle;
        if (ctl_d[0]) reg_angle <= fx_d;
        sum = (ctl_d[0] ? 27'd0 : {1'b0, acc}) + {1'b0, abs26(ang)};
        if (sum >= TWO_PI) sum = sum - TWO_PI;
        acc   <= sum[25:0];
        sgn_q <= ang[26];
      end
    end
  end

  // Unsigned to Signed, then to a 25-bit fraction of a turn
  logic [24:0] ps_angle;
  logic        ps_v;
  always_ff @(posedge clk) begin
    logic signed [26:0] sa;
    sa = sgn_q ? -$signed({1'b0, acc}) : $signed({1'b0, acc});
    ps_angle <= sa[25:1];
  end
  always_ff @(posedge clk) begin
    if (!rst_n) ps_v <= 1'b0;
    else        ps_v <= acc_v;
  end

  // DDS and Fix to Float
  logic               dds_v;
  logic signed [25:0] s26, c26;
  dds_sincos #(.ITER(DDS_ITER)) u_dds (
    .clk(clk), .rst_n(rst_n), .in_valid(ps_v), .phase(ps_angle),
    .out_valid(dds_v), .sin_o(s26), .cos_o(c26));

  cplx_t sc_now;
  assign sc_now.re = fix_to_fp(64'(c26), 25);
  assign sc_now.im = fix_to_fp(64'(s26), 25);
  delay_line #(.W(64), .D(I2F_LAT)) u_out (.clk(clk), .d(sc_now), .q(sc));

  logic [I2F_LAT-1:0] vpipe;
  always_ff @(posedge clk) begin
    if (!rst_n) vpipe <= '0;
    else        vpipe <= {vpipe[I2F_LAT-2:0], dds_v};
  end
  assign out_valid = vpipe[I2F_LAT-1];
endmodule
