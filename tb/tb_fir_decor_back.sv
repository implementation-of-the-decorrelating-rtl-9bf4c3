// tb_fir_decor_back: checks DECOR_BACK for M = 2, 3 and 4.  The recursion
// Y_j = S_j + sum_i (-1)^(i+1) binom(M,i) Y_{j-i} is the inverse of (1 - z^-1)^M, so the
// model is M cascaded running sums of S, which uses no binomial weights at all.
// A fourth instance uses the general transform with ALPHA = +1, BETA = 2, M = 2, i.e. the
// inverse of (1 + z^-2)^2, modelled as two cascaded sections u_j = in_j - u_{j-2}.
module tb_fir_decor_back;
  int checks = 0, failures = 0, updates = 0;
  logic clk = 0, rst_n = 0, en = 0;
  logic signed [31:0] s = '0;
  logic signed [31:0] y2, y3, y4, yg;
  longint a [1:4];
  longint u [1:2][0:2];   // u[section][age], age 0 = newest

  fir_decor_back #(.M(2), .W(32)) dut2 (.clk, .rst_n, .en, .s, .y(y2));
  fir_decor_back #(.M(3), .W(32)) dut3 (.clk, .rst_n, .en, .s, .y(y3));
  fir_decor_back #(.M(4), .W(32)) dut4 (.clk, .rst_n, .en, .s, .y(y4));
  fir_decor_back #(.M(2), .ALPHA(1), .BETA(2), .W(32)) dutg (.clk, .rst_n, .en, .s, .y(yg));

  always #5 clk = ~clk;

  task automatic check(input logic signed [31:0] got, input longint expv, input int m);
    checks++;
    if (got !== 32'(expv)) begin
      failures++;
      if (failures < 10) $display("ERROR M=%0d y=%0d exp=%0d", m, got, 32'(expv));
    end
  endtask

  initial begin
    for (int i = 1; i <= 4; i++) a[i] = 0;
    for (int q = 1; q <= 2; q++) for (int g = 0; g <= 2; g++) u[q][g] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      // small values keep the sums meaningful, large ones exercise the wrap-around
      s  = (i < 1000) ? 32'(int'($urandom % 2001) - 1000) : 32'($urandom);
      @(posedge clk);
      if (en) begin
        updates++;
        a[1] += s;
        for (int k = 2; k <= 4; k++) a[k] += a[k-1];
        for (int q = 1; q <= 2; q++) begin
          u[q][2] = u[q][1];
          u[q][1] = u[q][0];
          u[q][0] = ((q == 1) ? longint'(s) : u[1][0]) - u[q][2];
        end
      end
      #1;
      check(y2, a[2], 2);
      check(y3, a[3], 3);
      check(y4, a[4], 4);
      check(yg, u[2][0], 22);
    end
    if (updates == 0) failures++;
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
