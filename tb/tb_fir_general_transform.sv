// tb_fir_general_transform: the core with transforms other than the low-pass (1 - z^-1)^M:
// (1 + z^-1)^1 (ALPHA = +1, BETA = 1, which needs DECOR_BACK even at first order) and
// (1 - z^-2)^2 (ALPHA = -1, BETA = 2, 77 products per output).  Both must still produce the
// direct-form output exactly, 1000 random samples each (see tb_fir_driver).
module tb_fir_general_transform;
  logic clk = 0, rst_n = 0;
  logic [1:0] in_valid, in_ready, y_valid, done;
  logic signed [15:0] x_in [2];
  logic signed [15:0] y_out [2];
  int chk [2];
  int fl [2];

  fir_decor_top #(.M(1), .ALPHA(1), .BETA(1)) dut0 (.clk, .rst_n, .in_valid(in_valid[0]),
    .in_ready(in_ready[0]), .x_in(x_in[0]), .y_out(y_out[0]), .y_valid(y_valid[0]));
  fir_decor_top #(.M(2), .ALPHA(-1), .BETA(2)) dut1 (.clk, .rst_n, .in_valid(in_valid[1]),
    .in_ready(in_ready[1]), .x_in(x_in[1]), .y_out(y_out[1]), .y_valid(y_valid[1]));

  tb_fir_driver #(.M(1), .ALPHA(1), .BETA(1)) drv0 (.clk, .rst_n, .in_valid(in_valid[0]),
    .in_ready(in_ready[0]), .x_in(x_in[0]), .y_out(y_out[0]), .y_valid(y_valid[0]),
    .mac_clr(dut0.u_control.mac_clr), .back_en(dut0.u_control.acc_done),
    .coef_op(16'($unsigned(dut0.u_beta_mem.q))), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_fir_driver #(.M(2), .ALPHA(-1), .BETA(2)) drv1 (.clk, .rst_n, .in_valid(in_valid[1]),
    .in_ready(in_ready[1]), .x_in(x_in[1]), .y_out(y_out[1]), .y_valid(y_valid[1]),
    .mac_clr(dut1.u_control.mac_clr), .back_en(dut1.u_control.acc_done),
    .coef_op(16'($unsigned(dut1.u_beta_mem.q))), .done(done[1]), .checks(chk[1]), .failures(fl[1]));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1]);
    $finish;
  end

  initial begin
    #3000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", chk[0] + chk[1], fl[0] + fl[1] + 1);
    $finish;
  end
endmodule
