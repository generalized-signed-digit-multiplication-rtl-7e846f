// gsd_delay: D-cycle delay line for a W-bit value (D = 0 is a wire).
// Used by the systolic arrays to give each arc the number of register
// stages its schedule requires. The stages hold data only and are not reset.
module gsd_delay #(
  parameter int W = 4,
  parameter int D = 1
) (
  input  logic         clk,
  input  logic [W-1:0] d,
  output logic [W-1:0] q
);
  if (D == 0) begin : g_wire
    assign q = d;
  end else begin : g_regs
    logic [D-1:0][W-1:0] sr;
    always_ff @(posedge clk) begin
      sr[0] <= d;
      for (int i = 1; i < D; i++) sr[i] <= sr[i-1];
    end
    assign q = sr[D-1];
  end
endmodule
