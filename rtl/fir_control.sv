// fir_control: counter-based controller of the sequential DECOR FIR core (CONTROL).
//
// One output sample takes L clock cycles, one per product, L = number of (differenced)
// coefficients.  A tap counter walks 0..L-1 and addresses X_RAM and B_COEFF_ROM together;
// two single-bit pipeline flags follow the operands through BETA_MEM/GAMMA_MEM and the MAC
// so that the MAC clears its accumulator on the first product and the result stages load
// once the last product has been accumulated.  A counter-based controller that generates
// every control signal is what the design description calls for; the input handshake, the
// cycle-level schedule and the overlap of consecutive samples are this design's choices.
//
// Interface and timing:
//   in_valid/in_ready  sample handshake.  A sample is taken in a cycle where both are high
//                      (x_we pulses in that cycle).  in_ready is high while idle and in the
//                      cycle of the last tap, so a continuous stream is taken every L cycles.
//   tap, ld_ops        tap index for X_RAM/B_COEFF_ROM and the load enable of BETA_MEM and
//                      GAMMA_MEM, in the L cycles after the sample is taken.
//   mac_en, mac_clr    one cycle later: accumulate, and clear on the first product (the MAC's
//                      "valid" input).
//   acc_done           high in the cycle the accumulator holds the finished sum.
//   back_done          acc_done one cycle later (DECOR_BACK register holds the output).
module fir_control #(
  parameter int L = fir_pkg::NTAPS + 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  output logic                 in_ready,
  output logic                 x_we,
  output logic [$clog2(L)-1:0] tap,
  output logic                 ld_ops,
  output logic                 mac_en,
  output logic                 mac_clr,
  output logic                 acc_done,
  output logic                 back_done
);

  localparam int TW = $clog2(L);
  localparam logic [TW-1:0] LAST = TW'(L - 1);

  logic busy;
  logic accept;
  logic s1_valid, s1_first, s1_last;

  assign in_ready = !busy || (tap == LAST);
  assign accept   = in_valid && in_ready;
  assign x_we     = accept;
  assign ld_ops   = busy;
  assign mac_en   = s1_valid;
  assign mac_clr  = s1_first;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      tap  <= '0;
    end else if (accept) begin
      busy <= 1'b1;
      tap  <= '0;
    end else if (busy) begin
      if (tap == LAST) busy <= 1'b0;
      else             tap  <= tap + 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_first  <= 1'b0;
      s1_last   <= 1'b0;
      acc_done  <= 1'b0;
      back_done <= 1'b0;
    end else begin
      s1_valid  <= ld_ops;
      s1_first  <= ld_ops && (tap == '0);
      s1_last   <= ld_ops && (tap == LAST);
      acc_done  <= s1_last;
      back_done <= acc_done;
    end
  end

  a_tap_range: assert property (@(posedge clk) disable iff (!rst_n) tap <= LAST);

endmodule
