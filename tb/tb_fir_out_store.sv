// tb_fir_out_store: random load / hold sequence against a register model.
module tb_fir_out_store;
  localparam int W = 16;
  int checks = 0, failures = 0, loads = 0, holds = 0;
  logic clk = 0, rst_n = 0, ld = 0, qv;
  logic signed [W-1:0] d = '0, q, exp_q;
  logic exp_v;

  fir_out_store #(.W(W)) dut (.clk, .rst_n, .ld, .d, .q, .q_valid(qv));

  always #5 clk = ~clk;

  initial begin
    qv = 1'b0;
    exp_q = '0;
    exp_v = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    checks++;
    if (q !== '0) failures++;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      ld = ($urandom % 3) != 0;
      d  = W'($urandom);
      @(posedge clk);
      if (ld) begin exp_q = d; loads++; end else holds++;
      exp_v = ld;
      #1;
      checks++;
      if (q !== exp_q) begin
        failures++;
        if (failures < 10) $display("ERROR cycle %0d q=%0h exp=%0h", i, q, exp_q);
      end
      checks++;
      if (qv !== exp_v) failures++;
    end
    if (loads == 0 || holds == 0) failures++;
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
