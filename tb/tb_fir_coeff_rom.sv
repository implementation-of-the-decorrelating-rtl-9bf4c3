// tb_fir_coeff_rom: reads every word of the ROM for orders 0..4 and compares with
// differences formed here by repeated first differencing of the base coefficients
// (d^(m)_k = d^(m-1)_k - d^(m-1)_{k-1}), a different route from the binomial formula.
// Also checks the coefficient word lengths: 16 bits for the conventional core and
// 10, 8, 7, 8 bits for orders 1 to 4.  A sixth instance uses the general transform
// (1 + z^-2)^2 (ALPHA = +1, BETA = 2), formed here as d_k + d_{k-2} twice.
module tb_fir_coeff_rom;
  localparam int N = fir_pkg::NTAPS;
  int checks = 0, failures = 0;
  logic [6:0] addr = '0;
  logic signed [15:0] d0;
  logic signed [9:0]  d1;
  logic signed [7:0]  d2;
  logic signed [6:0]  d3;
  logic signed [7:0]  d4;
  logic signed [15:0] dg;
  int diff [5][N+4];
  int gen [3][N+4];

  fir_coeff_rom #(.M(0)) r0 (.addr, .data(d0));
  fir_coeff_rom #(.M(1)) r1 (.addr, .data(d1));
  fir_coeff_rom #(.M(2)) r2 (.addr, .data(d2));
  fir_coeff_rom #(.M(3)) r3 (.addr, .data(d3));
  fir_coeff_rom #(.M(4)) r4 (.addr, .data(d4));
  fir_coeff_rom #(.M(2), .ALPHA(1), .BETA(2), .COEF_W(16)) rg (.addr, .data(dg));

  task automatic chk(input int got, input int expv, input int m, input int k);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures < 10) $display("ERROR M=%0d k=%0d got %0d exp %0d", m, k, got, expv);
    end
  endtask

  initial begin
    for (int k = 0; k < N + 4; k++) diff[0][k] = (k < N) ? fir_pkg::BASE_COEF[k] : 0;
    for (int m = 1; m <= 4; m++)
      for (int k = 0; k < N + 4; k++)
        diff[m][k] = diff[m-1][k] - ((k > 0) ? diff[m-1][k-1] : 0);
    for (int k = 0; k < N + 4; k++) gen[0][k] = diff[0][k];
    for (int m = 1; m <= 2; m++)
      for (int k = 0; k < N + 4; k++)
        gen[m][k] = gen[m-1][k] + ((k > 1) ? gen[m-1][k-2] : 0);
    chk($bits(r0.data), 16, 0, -1);
    chk($bits(r1.data), 10, 1, -1);
    chk($bits(r2.data), 8, 2, -1);
    chk($bits(r3.data), 7, 3, -1);
    chk($bits(r4.data), 8, 4, -1);
    for (int k = 0; k < N + 4; k++) begin
      addr = 7'(k);
      #1;
      if (k < N)     chk(int'(d0), diff[0][k], 0, k);
      if (k < N + 1) chk(int'(d1), diff[1][k], 1, k);
      if (k < N + 2) chk(int'(d2), diff[2][k], 2, k);
      if (k < N + 3) chk(int'(d3), diff[3][k], 3, k);
      chk(int'(d4), diff[4][k], 4, k);
      chk(int'(dg), gen[2][k], 22, k);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
