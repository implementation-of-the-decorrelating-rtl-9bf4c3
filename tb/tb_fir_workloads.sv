// tb_fir_workloads: the evaluated configurations side by side: the conventional core
// (M = 0) and DECOR of orders 1 to 4, each filtering the same kind of input, 1000 uniformly
// distributed random samples through the 73-tap low-pass filter, every output checked
// against the direct-form filter (see tb_fir_driver).  The coefficient-operand bit toggles
// printed per order show how the narrower differential coefficients lower multiplier input
// activity.
module tb_fir_workloads;
  logic clk = 0, rst_n = 0;
  logic [4:0] in_valid, in_ready, y_valid, done;
  logic signed [15:0] x_in [5];
  logic signed [15:0] y_out [5];
  int chk [5];
  int fl [5];

  fir_decor_top #(.M(0)) dut0 (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
                               .x_in(x_in[0]), .y_out(y_out[0]), .y_valid(y_valid[0]));
  fir_decor_top #(.M(1)) dut1 (.clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
                               .x_in(x_in[1]), .y_out(y_out[1]), .y_valid(y_valid[1]));
  fir_decor_top #(.M(2)) dut2 (.clk, .rst_n, .in_valid(in_valid[2]), .in_ready(in_ready[2]),
                               .x_in(x_in[2]), .y_out(y_out[2]), .y_valid(y_valid[2]));
  fir_decor_top #(.M(3)) dut3 (.clk, .rst_n, .in_valid(in_valid[3]), .in_ready(in_ready[3]),
                               .x_in(x_in[3]), .y_out(y_out[3]), .y_valid(y_valid[3]));
  fir_decor_top #(.M(4)) dut4 (.clk, .rst_n, .in_valid(in_valid[4]), .in_ready(in_ready[4]),
                               .x_in(x_in[4]), .y_out(y_out[4]), .y_valid(y_valid[4]));

  tb_fir_driver #(.M(0)) drv0 (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .x_in(x_in[0]), .y_out(y_out[0]), .y_valid(y_valid[0]), .mac_clr(dut0.u_control.mac_clr),
    .back_en(1'b0), .coef_op(16'($unsigned(dut0.u_beta_mem.q))), .done(done[0]), .checks(chk[0]), .failures(fl[0]));
  tb_fir_driver #(.M(1)) drv1 (.clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .x_in(x_in[1]), .y_out(y_out[1]), .y_valid(y_valid[1]), .mac_clr(dut1.u_control.mac_clr),
    .back_en(1'b0), .coef_op(16'($unsigned(dut1.u_beta_mem.q))), .done(done[1]), .checks(chk[1]), .failures(fl[1]));
  tb_fir_driver #(.M(2)) drv2 (.clk, .rst_n, .in_valid(in_valid[2]), .in_ready(in_ready[2]),
    .x_in(x_in[2]), .y_out(y_out[2]), .y_valid(y_valid[2]), .mac_clr(dut2.u_control.mac_clr),
    .back_en(dut2.u_control.acc_done), .coef_op(16'($unsigned(dut2.u_beta_mem.q))), .done(done[2]), .checks(chk[2]), .failures(fl[2]));
  tb_fir_driver #(.M(3)) drv3 (.clk, .rst_n, .in_valid(in_valid[3]), .in_ready(in_ready[3]),
    .x_in(x_in[3]), .y_out(y_out[3]), .y_valid(y_valid[3]), .mac_clr(dut3.u_control.mac_clr),
    .back_en(dut3.u_control.acc_done), .coef_op(16'($unsigned(dut3.u_beta_mem.q))), .done(done[3]), .checks(chk[3]), .failures(fl[3]));
  tb_fir_driver #(.M(4)) drv4 (.clk, .rst_n, .in_valid(in_valid[4]), .in_ready(in_ready[4]),
    .x_in(x_in[4]), .y_out(y_out[4]), .y_valid(y_valid[4]), .mac_clr(dut4.u_control.mac_clr),
    .back_en(dut4.u_control.acc_done), .coef_op(16'($unsigned(dut4.u_beta_mem.q))), .done(done[4]), .checks(chk[4]), .failures(fl[4]));

  always #5 clk = ~clk;

  function automatic int total(input int v [5]);
    int s;
    s = 0;
    foreach (v[i]) s += v[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl));
    $finish;
  end

  initial begin
    #3000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fl) + 1);
    $finish;
  end
endmodule
