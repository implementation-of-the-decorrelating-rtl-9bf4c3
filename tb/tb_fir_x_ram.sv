// tb_fir_x_ram: writes random samples into the circular buffer (with idle cycles between
// writes), and after each cycle reads every age 0..DEPTH-1, comparing with a model history
// that starts all zero after reset.  Also checks that a read in the cycle of a write returns
// the old contents.  Both bank realisations run side by side: the latch bank (default) and
// the flip-flop bank.
module tb_fir_x_ram;
  localparam int DEPTH = 76;
  int checks = 0, failures = 0, writes = 0, wraps = 0;
  logic clk = 0, rst_n = 0, we = 0;
  logic signed [15:0] din = '0, dout, dout_ff;
  logic [6:0] tap = '0;
  int hist [DEPTH];   // hist[k] = X_{j-k}

  fir_x_ram #(.DEPTH(DEPTH), .W(16)) dut (.clk, .rst_n, .we, .din, .tap, .dout);
  fir_x_ram #(.DEPTH(DEPTH), .W(16), .LATCH_BANK(1'b0)) dut_ff (.clk, .rst_n, .we, .din, .tap,
                                                                .dout(dout_ff));

  always #5 clk = ~clk;

  task automatic read_all();
    for (int k = 0; k < DEPTH; k++) begin
      tap = 7'(k);
      #1;
      checks++;
      if (int'(dout) != hist[k]) begin
        failures++;
        if (failures < 10) $display("ERROR latch bank, write %0d age %0d dout=%0d exp=%0d", writes, k, dout, hist[k]);
      end
      checks++;
      if (int'(dout_ff) != hist[k]) begin
        failures++;
        if (failures < 10) $display("ERROR flop bank, write %0d age %0d dout=%0d exp=%0d", writes, k, dout_ff, hist[k]);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < DEPTH; k++) hist[k] = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1;
    read_all();
    for (int i = 0; i < 400; i++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      din = 16'($urandom);
      tap = 7'(DEPTH - 1);
      #1;
      // read-before-write: the oldest entry is still visible in the write cycle
      checks += 2;
      if (int'(dout) != hist[DEPTH-1]) failures++;
      if (int'(dout_ff) != hist[DEPTH-1]) failures++;
      @(posedge clk);
      if (we) begin
        for (int k = DEPTH - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = int'(din);
        writes++;
        if (writes % DEPTH == 0) wraps++;
      end
      @(negedge clk);
      we = 0;
      read_all();
    end
    if (wraps < 2) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
