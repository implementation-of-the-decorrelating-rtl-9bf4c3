// fir_decor_top: sequential 73-tap FIR filter core with the DECOR transformation.
//
// The filter Y_j = sum_k c_k X_{j-k} is computed with a single multiply-accumulate unit, one
// product per clock.  DECOR multiplies and divides the filter by T(z) = (1 + ALPHA z^-BETA)^M.
// The coefficients are replaced by the differential coefficients of B_COEFF_ROM, which need
// fewer bits, so the MAC's multiplier is only 16 x COEF_W; the price is BETA*M extra products
// per output and the DECOR_BACK block that adds the binomial combination of past outputs
// (see fir_pkg and fir_decor_back).  The defaults are the low-pass case the design is built
// for: ALPHA = -1, BETA = 1, third order.  The first order low-pass core (M = 1) has no
// DECOR_BACK: its MAC never clears, so the accumulator carries Y_{j-1} into Y_j.  M = 0
// gives the conventional direct-form core with 16-bit coefficients.
//
// Datapath, as in the design description: X_RAM and B_COEFF_ROM -> GAMMA_MEM and BETA_MEM
// -> MAC (32-bit) -> [DECOR_BACK] -> 17 bits -> ROUND -> OUT_STORE (16-bit), sequenced by
// CONTROL.  Data and coefficients are Q15; the 17 bits handed to ROUND are accumulator bits
// 30..14 (the Q15 result and one rounding bit), which is this design's choice.
//
// Interface and timing: a sample is taken when in_valid and in_ready are both high; one
// sample is taken every L = 73 + BETA*M cycles at most.  The output appears on y_out with a
// one cycle y_valid pulse, L+4 cycles after the cycle in which the sample was taken (L+3
// without DECOR_BACK: M = 0 and the first order low-pass core); with samples offered
// continuously, one output every L cycles.
module fir_decor_top #(
  parameter int M     = 3,
  parameter int ALPHA = -1,
  parameter int BETA  = 1
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  output logic                              in_ready,
  input  logic signed [fir_pkg::X_W-1:0]    x_in,
  output logic signed [fir_pkg::OUT_W-1:0]  y_out,
  output logic                              y_valid
);

  import fir_pkg::*;

  localparam int L      = NTAPS + BETA * M;
  localparam int TW     = $clog2(L);
  localparam int COEF_W = (M == 0) ? C_W : coef_width(M, ALPHA, BETA);
  // Only Y_{j-1} with weight +1 can be left in a never-cleared accumulator.
  localparam bit RUNNING_SUM = (M == 1) && (ALPHA == -1) && (BETA == 1);

  if (M < 0 || M > MAX_M || (ALPHA != 1 && ALPHA != -1) || BETA < 1) begin : g_bad_param
    $error("fir_decor_top: need 0 <= M <= %0d, ALPHA = +1 or -1, BETA >= 1", MAX_M);
  end

  logic                     x_we, ld_ops, mac_en, mac_clr, acc_done, back_done;
  logic [TW-1:0]            tap;
  logic signed [X_W-1:0]    x_rd, x_op;
  logic signed [COEF_W-1:0] c_rd, c_op;
  logic signed [ACC_W-1:0]  acc, y_full;
  logic signed [RND_W-1:0]  y_rnd_in;
  logic signed [OUT_W-1:0]  y_rounded;
  logic                     out_ld;

  fir_control #(.L(L)) u_control (
    .clk, .rst_n, .in_valid, .in_ready, .x_we, .tap, .ld_ops,
    .mac_en, .mac_clr, .acc_done, .back_done
  );

  fir_x_ram #(.DEPTH(L), .W(X_W)) u_x_ram (
    .clk, .rst_n, .we(x_we), .din(x_in), .tap, .dout(x_rd)
  );

  fir_coeff_rom #(.M(M), .ALPHA(ALPHA), .BETA(BETA), .COEF_W(COEF_W), .DEPTH(L)) u_coeff_rom (
    .addr(tap), .data(c_rd)
  );

  fir_beta_mem #(.W(COEF_W)) u_beta_mem (
    .clk, .rst_n, .ld(ld_ops), .d(c_rd), .q(c_op)
  );

  fir_gamma_mem #(.W(X_W)) u_gamma_mem (
    .clk, .rst_n, .ld(ld_ops), .d(x_rd), .q(x_op)
  );

  fir_mac #(.X_W(X_W), .C_W(COEF_W), .ACC_W(ACC_W), .CLEAR_EN(!RUNNING_SUM)) u_mac (
    .clk, .rst_n, .en(mac_en), .valid(mac_clr), .x(x_op), .h(c_op), .y(acc)
  );

  if (M >= 1 && !RUNNING_SUM) begin : g_back
    fir_decor_back #(.M(M), .ALPHA(ALPHA), .BETA(BETA), .W(ACC_W)) u_decor_back (
      .clk, .rst_n, .en(acc_done), .s(acc), .y(y_full)
    );
    assign out_ld = back_done;
  end else begin : g_noback
    assign y_full = acc;
    assign out_ld = acc_done;
  end

  assign y_rnd_in = y_full[RND_LSB +: RND_W];

  fir_round #(.IN_W(RND_W), .OUT_W(OUT_W)) u_round (
    .r(y_rnd_in), .q(y_rounded)
  );

  fir_out_store #(.W(OUT_W)) u_out_store (
    .clk, .rst_n, .ld(out_ld), .d(y_rounded), .q(y_out), .q_valid(y_valid)
  );

endmodule
