// ctl_delay: W-bit shift register of D clock cycles with synchronous reset,
// used for valid, tlast and select bits that travel next to the data delay
// lines; after reset they read as zero, so no stale flags appear.
module ctl_delay #(
  parameter int unsigned W = 1,
  parameter int unsigned D = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_reg
    logic [W-1:0] sr [D];
    always_ff @(posedge clk) begin
      if (!rst_n) begin
        for (int i = 0; i < int'(D); i++) sr[i] <= '0;
      end else begin
        sr[0] <= d;
        for (int i = 1; i < int'(D); i++) sr[i] <= sr[i-1];
      end
    end
    assign q = sr[D-1];
  end
endmodule
