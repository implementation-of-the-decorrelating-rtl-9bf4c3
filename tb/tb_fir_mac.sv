// tb_fir_mac: drives random operands and clear pulses into a clearing MAC and a MAC
// without clearing logic, and compares both accumulators with a 64-bit model reduced
// modulo 2^32.  Checks that the clear starts a new sum and that en low holds the sum.
module tb_fir_mac;
  int checks = 0, failures = 0, clears = 0, idles = 0;
  logic clk = 0, rst_n = 0, en = 0, valid = 0;
  logic signed [15:0] x = '0;
  logic signed [9:0]  h = '0;
  logic signed [31:0] y_clr, y_run;
  longint m_clr, m_run;

  fir_mac #(.X_W(16), .C_W(10), .ACC_W(32), .CLEAR_EN(1'b1)) dut_clr
    (.clk, .rst_n, .en, .valid, .x, .h, .y(y_clr));
  fir_mac #(.X_W(16), .C_W(10), .ACC_W(32), .CLEAR_EN(1'b0)) dut_run
    (.clk, .rst_n, .en, .valid, .x, .h, .y(y_run));

  always #5 clk = ~clk;

  initial begin
    m_clr = 0;
    m_run = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en    = ($urandom % 8) != 0;
      valid = ($urandom % 10) == 0;
      // push operands to the corners now and then
      x = (i % 50 == 0) ? -16'sd32768 : 16'($urandom);
      h = (i % 50 == 0) ? -10'sd512   : 10'($urandom);
      @(posedge clk);
      if (en) begin
        m_clr = (valid ? 0 : m_clr) + longint'(x) * longint'(h);
        m_run = m_run + longint'(x) * longint'(h);
        if (valid) clears++;
      end else idles++;
      #1;
      checks += 2;
      if (y_clr !== 32'(m_clr)) begin
        failures++;
        if (failures < 10) $display("ERROR clr i=%0d y=%0d exp=%0d", i, y_clr, 32'(m_clr));
      end
      if (y_run !== 32'(m_run)) begin
        failures++;
        if (failures < 10) $display("ERROR run i=%0d y=%0d exp=%0d", i, y_run, 32'(m_run));
      end
    end
    if (clears == 0 || idles == 0) failures++;
    $display("clears=%0d idle cycles=%0d", clears, idles);
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
