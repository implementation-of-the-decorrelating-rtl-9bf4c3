// fir_gamma_mem: flip-flop register for the multiplier's data operand (GAMMA_MEM).
//
// It takes the word read from X_RAM and holds it for one multiply, so that the MAC's
// operands change only at the clock edge.  16 bits wide, as in the design description.
// The load enable and the asynchronous clear to zero are this design's choices.
//
// Interface and timing: q takes d at the rising clock edge when ld is high.
module fir_gamma_mem #(
  parameter int W = fir_pkg::X_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                ld,
  input  logic signed [W-1:0] d,
  output logic signed [W-1:0] q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  q <= '0;
    else if (ld) q <= d;
  end

endmodule
