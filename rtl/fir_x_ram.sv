// fir_x_ram: input sample memory (X_RAM), a circular buffer of DEPTH sample registers.
//
// As in the design description it has three parts: a bank of 16-bit registers, a write
// demultiplexer and a read multiplexer.  A write pointer marks the newest sample; each write
// advances it and overwrites the oldest entry, so no data moves between registers (the point
// of a circular buffer: only one word changes per sample).  A read names a sample by its age:
// tap k returns X_{j-k}, where X_j is the newest sample.  Reset clears the bank so that the
// filter starts from an all-zero history, which the DECOR output recursion relies on.
//
// Bank realisation (LATCH_BANK):
//   1 (default)  latch bank, as the design description specifies to save power.  The write
//                data and the one-hot word select are captured in flip-flops at the write
//                edge; the selected word latch is then transparent while the clock is low,
//                so it stores the stable captured data.  The latches, and the clock in their
//                enables, are therefore intended; a gate-level implementation would use a
//                clock-gating cell for 'sel_q & ~clk'.
//   0            edge-triggered registers with per-word write enables.
//
// Interface and timing (both realisations): we/din write at the rising clock edge.  tap ->
// dout is combinational.  A read in the cycle of a write returns the old contents; the new
// sample is readable in the next cycle (with the latch bank, from the falling edge of that
// cycle on, in time for the register that samples dout at its end).
module fir_x_ram #(
  parameter int DEPTH      = fir_pkg::NTAPS + 3,
  parameter int W          = fir_pkg::X_W,
  parameter bit LATCH_BANK = 1'b1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     we,
  input  logic signed [W-1:0]      din,
  input  logic [$clog2(DEPTH)-1:0] tap,
  output logic signed [W-1:0]      dout
);

  localparam int AW = $clog2(DEPTH);
  localparam logic [AW-1:0] TOP = AW'(DEPTH - 1);

  logic signed [W-1:0] bank [DEPTH];
  logic [AW-1:0]       wptr, wptr_nxt, raddr;
  logic [DEPTH-1:0]    sel;

  assign wptr_nxt = (wptr == TOP) ? '0 : wptr + 1'b1;

  // Write demultiplexer: one enable per word.
  always_comb begin
    sel = '0;
    sel[wptr_nxt] = we;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  wptr <= TOP;
    else if (we) wptr <= wptr_nxt;
  end

  if (LATCH_BANK) begin : g_latch
    logic signed [W-1:0] wdata_q;
    logic [DEPTH-1:0]    sel_q;

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        wdata_q <= '0;
        sel_q   <= '0;
      end else begin
        sel_q <= sel;
        if (we) wdata_q <= din;
      end
    end

    for (genvar i = 0; i < DEPTH; i++) begin : g_word
      logic open_w;
      assign open_w = sel_q[i] & ~clk;
      always_latch begin
        if (!rst_n)      bank[i] = '0;
        else if (open_w) bank[i] = wdata_q;
      end
    end
  end else begin : g_flop
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        for (int i = 0; i < DEPTH; i++) bank[i] <= '0;
      end else begin
        for (int i = 0; i < DEPTH; i++)
          if (sel[i]) bank[i] <= din;
      end
    end
  end

  // Read multiplexer: age k lives at (wptr - k) mod DEPTH.
  always_comb begin
    if (wptr >= tap) raddr = wptr - tap;
    else             raddr = AW'(DEPTH + int'(wptr) - int'(tap));
  end
  assign dout = bank[raddr];

  a_tap_range: assert property (@(posedge clk) disable iff (!rst_n) tap <= TOP);

endmodule
