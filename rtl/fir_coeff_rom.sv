// fir_coeff_rom: coefficient ROM (B_COEFF_ROM).
//
// Holds the NTAPS+BETA*M coefficients the MAC multiplies with, in tap order: for M = 0 the
// plain filter coefficients c_k, for M >= 1 the differential coefficients
// d_k = sum_i binom(M,i) ALPHA^i c_{k-BETA*i} of the DECOR transformation (see fir_pkg);
// with the low-pass defaults ALPHA = -1, BETA = 1 these are the M-th order differences of
// adjacent coefficients.  The table is computed at elaboration from fir_pkg::BASE_COEF, so it
// becomes a constant ROM.
// The word length is the smallest that holds every d_k (16 bits for M = 0); the narrower
// coefficient word is what lets the DECOR core use a 16 x COEF_W multiplier.
//
// Interface and timing: combinational read, addr -> data; addresses past the table read 0.
module fir_coeff_rom #(
  parameter int M      = 3,
  parameter int ALPHA  = -1,
  parameter int BETA   = 1,
  parameter int COEF_W = (M == 0) ? fir_pkg::C_W : fir_pkg::coef_width(M, ALPHA, BETA),
  parameter int DEPTH  = fir_pkg::NTAPS + BETA * M
) (
  input  logic [$clog2(DEPTH)-1:0] addr,
  output logic signed [COEF_W-1:0] data
);

  typedef logic signed [COEF_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int k = 0; k < DEPTH; k++) r[k] = COEF_W'(fir_pkg::diff_coef(M, k, ALPHA, BETA));
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = (int'(addr) < DEPTH) ? ROM[addr] : '0;

endmodule
