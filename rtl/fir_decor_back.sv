// fir_decor_back: DECOR output recursion (DECOR_BACK).
//
// The DECOR transformation divides the filter by (1 + ALPHA z^-BETA)^M, which turns into a
// recursion on past outputs: Y_j = S_j - sum_{i=1..M} binom(M,i) ALPHA^i Y_{j-BETA*i}, where
// S_j is the MAC's sum over the differential coefficients.  For the low-pass case ALPHA = -1,
// BETA = 1 this adds 2Y_{j-1} - Y_{j-2} for M = 2 and 3Y_{j-1} - 3Y_{j-2} + Y_{j-3} for M = 3.
// The block keeps the last BETA*M outputs in registers and adds their weighted combination to
// S_j with constant-weight adders, as the design description says.  All arithmetic is modulo 2^W; because the recursion is exact in
// integer arithmetic, Y_j equals the direct-form sum whenever that fits in W bits.
// The first order low-pass core does not use this block (its MAC keeps Y_{j-1} in the
// accumulator).
//
// Interface and timing: when en is high, Y_j is formed from s and stored at the rising
// edge; y shows the newest stored output Y_j from the next cycle on.
module fir_decor_back #(
  parameter int M     = 3,
  parameter int ALPHA = -1,
  parameter int BETA  = 1,
  parameter int W     = fir_pkg::ACC_W
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic signed [W-1:0] s,
  output logic signed [W-1:0] y
);

  typedef logic signed [W-1:0] word_t;

  localparam int D = BETA * M;   // outputs kept

  word_t hist [1:D];
  word_t ynew;

  always_comb begin
    ynew = s;
    for (int i = 1; i <= M; i++)
      ynew = ynew + W'(hist[BETA*i] * word_t'(fir_pkg::back_weight(M, i, ALPHA)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 1; i <= D; i++) hist[i] <= '0;
    end else if (en) begin
      hist[1] <= ynew;
      for (int i = 2; i <= D; i++) hist[i] <= hist[i-1];
    end
  end

  assign y = hist[1];

endmodule
