// tb_fir_round: exhaustive check of the ROUND stage over all 2^17 inputs against
// floor((r+1)/2) with saturation at +32767.
module tb_fir_round;
  int checks = 0, failures = 0, sat_seen = 0;
  logic signed [16:0] r;
  logic signed [15:0] q;

  fir_round dut (.r, .q);

  initial begin
    for (int v = -65536; v <= 65535; v++) begin
      r = 17'(v);
      #1;
      checks++;
      if (int'(q) != tb_fir_ref_pkg::round17(v)) begin
        failures++;
        if (failures < 10) $display("ERROR r=%0d q=%0d exp=%0d", v, q, tb_fir_ref_pkg::round17(v));
      end
      if (v == 65535) begin
        sat_seen++;
        checks++;
        if (q != 16'sd32767) failures++;
      end
    end
    if (sat_seen != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
