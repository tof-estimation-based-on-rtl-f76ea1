// tb_sifh_sweep: static characteristic of the estimator. The true ToF is
// stepped through every code from 1 to 32766 (0 and 32767 lie outside the
// fixed end-bin windows), one estimate each, and every estimate is compared
// with the peak of a complete 32768-bin histogram of the same readings, built
// here in software. Readings are sent back to back, 15 clocks each (300 ns at
// 50 MHz), the tightest spacing the serial format allows. M is reduced to 100
// readings per pass so that the 32766 estimates take about a minute.
module tb_sifh_sweep;
  import sifh_pkg::*;
  localparam int unsigned M = 100;

  logic clk = 0, rst = 1, start = 0, sd = 0, ws = 0;
  logic [7:0] addr = '0;
  logic wait0, wait1, wait2, rd_hist, tof_valid;
  logic [11:0] bin;
  logic [14:0] tof;
  int data [M];
  int full [32768];
  int reach [32768];  // index of the reading that gave a bin its final count
  int checks = 0, failures = 0, n_est = 0, n_bad = 0, worst = 0;

  sifh_top #(.M(M)) dut (.*);

  always #10 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (200000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // readings: 40 % around t (t, t+-1, t+-2), the rest uniform noise
  task automatic make_data(input int t);
    for (int i = 0; i < M; i++) begin
      int v;
      if ($urandom_range(0, 99) < 40) begin
        int r = $urandom_range(0, 9);
        v = t + (r < 6 ? 0 : (r < 8 ? 1 : -1) * (r % 2 + 1));
        if (v < 1) v = 1;
        if (v > 32766) v = 32766;
      end else v = $urandom_range(0, 32767);
      data[i] = v;
    end
  endtask

  // only the bins this file touches are cleared and searched; among equal
  // counts the peak is the bin that reached that count first
  function automatic int complete_peak();
    int mx = -1, p = 0;
    foreach (data[i]) full[data[i]] = 0;
    foreach (data[i]) begin full[data[i]]++; reach[data[i]] = i; end
    foreach (data[i])
      if (full[data[i]] > mx || (full[data[i]] == mx && reach[data[i]] < reach[p])) begin
        mx = full[data[i]]; p = data[i];
      end
    return p;
  endfunction

  task automatic send_pass();
    wait (wait0);
    wait (!wait0);
    foreach (data[i])
      for (int b = 14; b >= 0; b--) begin
        @(negedge clk);
        sd = data[i][b];
        ws = (b == 0);
      end
    @(negedge clk);
    ws = 0;
  endtask

  task automatic estimate(input int t);
    int ref_tof;
    make_data(t);
    ref_tof = complete_peak();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    send_pass();
    send_pass();
    wait (tof_valid);
    @(negedge clk);
    checks++;
    n_est++;
    if (int'(tof) != ref_tof) begin
      failures++;
      n_bad++;
      if (n_bad < 10) $display("FAIL: true %0d: SiFH %0d, complete histogram %0d", t, tof, ref_tof);
    end
    if (int'(tof) - t > worst) worst = int'(tof) - t;
    if (t - int'(tof) > worst) worst = t - int'(tof);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int t = 1; t <= 32766; t++) estimate(t);
    check(n_est == 32766, "every code from 1 to 32766 estimated");
    $display("estimates %0d, mismatches %0d, largest |SiFH - true| %0d", n_est, n_bad, worst);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
