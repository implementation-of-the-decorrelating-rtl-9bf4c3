// tb_fir_driver: stimulus and checker for one FIR core instance, used by the end-to-end
// testbenches.  It offers NS uniformly distributed random 16-bit samples: the first third with
// random idle gaps (the core waits), the rest as a continuous stream (the core takes one
// sample every L = 73+BETA*M cycles).  Each output is compared with the direct-form model of
// tb_fir_ref_pkg, its latency with L+4 cycles (L+3 without DECOR_BACK), and the spacing of accepted
// samples with L.  It counts how often each mechanism occurred: accumulator clears, DECOR_BACK
// updates, idle waits, back-to-back samples and outputs that were rounded up; one that never
// occurred counts as a failure.  The activity of the coefficient operand register (bit
// toggles) is reported for comparing orders.
module tb_fir_driver #(
  parameter int M     = 3,
  parameter int ALPHA = -1,
  parameter int BETA  = 1,
  parameter int NS    = 1000
) (
  input  logic               clk,
  input  logic               rst_n,
  output logic               in_valid,
  input  logic               in_ready,
  output logic signed [15:0] x_in,
  input  logic signed [15:0] y_out,
  input  logic               y_valid,
  input  logic               mac_clr,
  input  logic               back_en,
  input  logic [15:0]        coef_op,
  output logic               done,
  output int                 checks,
  output int                 failures
);
  localparam int L   = fir_pkg::NTAPS + BETA * M;
  localparam bit HAS_BACK = (M >= 1) && !(M == 1 && ALPHA == -1 && BETA == 1);
  // cycles from the one in which a sample is taken to the one in which y_valid shows its output
  localparam int LAT = HAS_BACK ? L + 4 : L + 3;

  int xs [fir_pkg::NTAPS];
  int exp_y [$];
  int acc_cyc [$];
  int gap = 0;
  int cyc = 0, sent = 0, got = 0, last_accept = -1;
  int n_clear = 0, n_back = 0, n_wait = 0, n_b2b = 0, n_round_up = 0;
  longint coef_toggles = 0;
  logic [15:0] coef_prev = '0;
  logic took = 1'b0;   // the sample on x_in was taken at the last rising edge

  always @(posedge clk) took <= in_valid && in_ready;

  task automatic fail(input string msg);
    failures++;
    if (failures < 10) $display("ERROR M=%0d: %s", M, msg);
  endtask

  always @(posedge clk) if (rst_n) begin
    cyc++;
    coef_toggles += $countones(coef_op ^ coef_prev);
    coef_prev = coef_op;
    if (mac_clr) n_clear++;
    if (back_en) n_back++;
    if (!in_valid && in_ready && sent > 0 && sent < NS) n_wait++;
    if (in_valid && in_ready) begin
      for (int k = fir_pkg::NTAPS - 1; k > 0; k--) xs[k] = xs[k-1];
      xs[0] = int'(x_in);
      exp_y.push_back(tb_fir_ref_pkg::direct_form(xs));
      if (tb_fir_ref_pkg::rounds_up(xs)) n_round_up++;
      acc_cyc.push_back(cyc);
      if (last_accept >= 0) begin
        checks++;
        if (cyc - last_accept < L) fail($sformatf("samples %0d cycles apart", cyc - last_accept));
        if (cyc - last_accept == L) n_b2b++;
      end
      last_accept = cyc;
      sent++;
    end
    if (y_valid) begin
      if (exp_y.size() == 0) fail("output without a sample");
      else begin
        int e, a;
        e = exp_y.pop_front();
        a = acc_cyc.pop_front();
        checks += 2;
        if (int'(y_out) != e) fail($sformatf("output %0d: y=%0d expected %0d", got, y_out, e));
        if (cyc - a != LAT) fail($sformatf("output %0d latency %0d expected %0d", got, cyc - a, LAT));
        got++;
      end
    end
  end

  initial begin
    for (int k = 0; k < fir_pkg::NTAPS; k++) xs[k] = 0;
    checks = 0;
    failures = 0;
    done = 0;
    in_valid = 0;
    x_in = '0;
    wait (rst_n);
    forever begin
      @(negedge clk);
      if (sent >= NS) begin
        in_valid = 0;
        break;
      end
      if (took) begin
        in_valid = 0;
        // during the first third, leave a random gap of 0 .. 2L-1 cycles after each sample
        gap = (sent < NS / 3) ? int'($urandom % (2 * L)) : 0;
      end
      if (!in_valid) begin
        if (gap > 0) gap--;
        else begin
          in_valid = 1;
          x_in = 16'($urandom);
        end
      end
    end
    repeat (LAT + 5) @(negedge clk);
    checks += 5;
    if (got != NS) fail($sformatf("%0d outputs for %0d samples", got, NS));
    if (n_clear == 0 && M != 1) fail("accumulator never cleared");
    if (n_back == 0 && HAS_BACK) fail("DECOR_BACK never updated");
    if (n_wait == 0) fail("core never waited for a sample");
    if (n_b2b == 0) fail("no back-to-back samples");
    if (n_round_up == 0) fail("no output was rounded up");
    $display("M=%0d ALPHA=%0d BETA=%0d samples=%0d outputs=%0d clears=%0d decor_back=%0d waits=%0d back_to_back=%0d rounded_up=%0d coef_bit_toggles=%0d",
             M, ALPHA, BETA, sent, got, n_clear, n_back, n_wait, n_b2b, n_round_up, coef_toggles);
    done = 1;
  end


endmodule
