// tb_fir_decor_top: end-to-end test of the DECOR FIR core at its default configuration
// (third order DECOR, 73 taps): 1000 uniformly distributed random samples, each output
// checked against the direct-form filter, with latency, throughput and mechanism counts
// (see tb_fir_driver).
module tb_fir_decor_top;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, y_valid, done;
  logic signed [15:0] x_in, y_out;
  int checks, failures;

  fir_decor_top dut (.clk, .rst_n, .in_valid, .in_ready, .x_in, .y_out, .y_valid);

  tb_fir_driver #(.M(3), .NS(1000)) drv (
    .clk, .rst_n, .in_valid, .in_ready, .x_in, .y_out, .y_valid,
    .mac_clr(dut.u_control.mac_clr), .back_en(dut.u_control.acc_done),
    .coef_op(16'($unsigned(dut.u_beta_mem.q))), .done, .checks, .failures);

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    wait (done);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
