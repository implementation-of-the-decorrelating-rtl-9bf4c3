// fir_round: output rounding (ROUND).
//
// Reduces the 17-bit result to the 16-bit output word by dropping one bit with rounding to
// nearest, ties towards +infinity (add half an LSB, then shift).  The single case where that
// overflows, the largest positive input, saturates to the largest 16-bit value.  The word
// lengths follow the design description; the rounding mode and the saturation are this
// design's choices.
//
// Interface and timing: combinational, r -> q.
module fir_round #(
  parameter int IN_W  = fir_pkg::RND_W,
  parameter int OUT_W = fir_pkg::OUT_W
) (
  input  logic signed [IN_W-1:0]  r,
  output logic signed [OUT_W-1:0] q
);

  localparam int SH = IN_W - OUT_W;

  logic signed [IN_W:0] sum;
  logic signed [IN_W:0] shifted;

  assign sum     = (IN_W+1)'(r) + (IN_W+1)'(1 <<< (SH - 1));
  assign shifted = sum >>> SH;
  assign q       = (shifted > (IN_W+1)'((1 <<< (OUT_W - 1)) - 1))
                   ? OUT_W'((1 <<< (OUT_W - 1)) - 1) : shifted[OUT_W-1:0];

endmodule
