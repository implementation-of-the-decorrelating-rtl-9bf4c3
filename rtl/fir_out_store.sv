// fir_out_store: 16-bit flip-flop output register (OUT_STORE).
//
// Captures the rounded filter output once per output sample and holds it until the next.
// The register follows the design description; the valid flag next to it, high for the one
// cycle after each load, is this design's addition so that a consumer knows when a new
// output sample appears.
//
// Interface and timing: q <= d at the rising edge when ld is high; q_valid is high in the
// cycle after that edge.
module fir_out_store #(
  parameter int W = fir_pkg::OUT_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q,
  output logic                q_valid
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q       <= '0;
      q_valid <= 1'b0;
    end else begin
      q_valid <= ld;
      if (ld) q <= d;
    end
  end

endmodule
