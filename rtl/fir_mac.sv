// fir_mac: multiply-accumulate unit (MAC) of the sequential FIR core.
//
// Four parts, as in the design description: a signed multiplier (mult) of the data and
// coefficient operands, an adder (add), an accumulator register (acc) and the clearing
// logic (clacc), a multiplexer that feeds the accumulator back to the adder or, while the
// 'valid' input is high, feeds zero so that the product starts a new sum.  The product is
// sign-extended to the 32-bit accumulator.  With CLEAR_EN = 0 the clearing logic is left out:
// the first order DECOR core uses this simpler MAC, whose running sum then also carries the
// previous output Y_{j-1}.  The multiplier architecture is left to synthesis.
//
// Interface and timing: when en is high, y <= x*h + (valid ? 0 : y) at the rising edge.
module fir_mac #(
  parameter int X_W      = fir_pkg::X_W,
  parameter int C_W      = fir_pkg::C_W,
  parameter int ACC_W    = fir_pkg::ACC_W,
  parameter bit CLEAR_EN = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    valid,
  input  logic signed [X_W-1:0]   x,
  input  logic signed [C_W-1:0]   h,
  output logic signed [ACC_W-1:0] y
);

  logic signed [X_W+C_W-1:0] prod;
  logic signed [ACC_W-1:0]   ain1, ain2, d;

  assign prod = x * h;
  assign ain1 = ACC_W'(prod);
  assign ain2 = (CLEAR_EN && valid) ? '0 : y;
  assign d    = ain1 + ain2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  y <= '0;
    else if (en) y <= d;
  end

endmodule
