// tb_fir_control: drives the controller with isolated samples, random gaps and a
// continuous stream, and checks every control output in every cycle against the schedule
// derived from the cycle in which each sample was taken (age = cycles since acceptance):
// ld_ops/tap at ages 1..L, mac_en at 2..L+1, mac_clr at 2, acc_done at L+2, back_done at L+3.
module tb_fir_control;
  localparam int L = 76;
  int checks = 0, failures = 0, accepted = 0, back_to_back = 0, cyc = 0;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic in_ready, x_we, ld_ops, mac_en, mac_clr, acc_done, back_done;
  logic [6:0] tap;
  int last_acc [3];   // acceptance cycles of the three latest samples

  fir_control #(.L(L)) dut (.clk, .rst_n, .in_valid, .in_ready, .x_we, .tap, .ld_ops,
                            .mac_en, .mac_clr, .acc_done, .back_done);

  always #5 clk = ~clk;

  task automatic chk(input logic got, input logic expv, input string what);
    checks++;
    if (got !== expv) begin
      failures++;
      if (failures < 10) $display("ERROR cycle %0d %s=%0b exp %0b", cyc, what, got, expv);
    end
  endtask

  // Compare outputs with the schedule, just before the rising edge.
  always @(negedge clk) if (rst_n) begin
    logic e_ld, e_en, e_clr, e_done, e_back, e_rdy;
    int e_tap;
    e_ld = 0; e_en = 0; e_clr = 0; e_done = 0; e_back = 0; e_tap = 0; e_rdy = 1;
    for (int i = 0; i < 3; i++) begin
      int age;
      age = cyc - last_acc[i];
      if (age >= 1 && age <= L) begin e_ld = 1; e_tap = age - 1; end
      if (age >= 1 && age <= L - 1) e_rdy = 0;
      if (age >= 2 && age <= L + 1) e_en = 1;
      if (age == 2) e_clr = 1;
      if (age == L + 2) e_done = 1;
      if (age == L + 3) e_back = 1;
    end
    chk(in_ready, e_rdy, "in_ready");
    chk(ld_ops, e_ld, "ld_ops");
    chk(mac_en, e_en, "mac_en");
    chk(mac_clr, e_clr, "mac_clr");
    chk(acc_done, e_done, "acc_done");
    chk(back_done, e_back, "back_done");
    chk(x_we, in_valid && e_rdy, "x_we");
    if (e_ld) begin
      checks++;
      if (int'(tap) != e_tap) begin
        failures++;
        if (failures < 10) $display("ERROR cycle %0d tap=%0d exp %0d", cyc, tap, e_tap);
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    if (in_valid && in_ready) begin
      if (cyc - last_acc[0] == L) back_to_back++;
      last_acc[2] = last_acc[1];
      last_acc[1] = last_acc[0];
      last_acc[0] = cyc;
      accepted++;
    end
    cyc++;
  end

  initial begin
    for (int i = 0; i < 3; i++) last_acc[i] = -1000;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // phase 1: random offering with gaps
    repeat (1500) begin
      @(negedge clk);
      in_valid = ($urandom % 40) == 0 ? 1'b1 : (in_valid && !in_ready);
    end
    // phase 2: continuous stream
    @(negedge clk) in_valid = 1;
    repeat (600) @(negedge clk);
    in_valid = 0;
    repeat (L + 10) @(negedge clk);
    $display("accepted=%0d back_to_back=%0d", accepted, back_to_back);
    if (accepted < 10 || back_to_back < 5) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
