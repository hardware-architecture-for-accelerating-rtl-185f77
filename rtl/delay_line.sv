// delay_line: W-bit shift register of D clock cycles (D = 0 is a wire).
// Used to align side signals (addresses, valid flags, interpolation fractions,
// scale factors) with the latency of the floating-point operators, as the
// delayed Frac and SFac paths of the Remap unit require. No reset: the data
// is qualified by a separately delayed valid flag that is reset.
module delay_line #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
    end
    assign q = sr[D-1];
  end
endmodule
