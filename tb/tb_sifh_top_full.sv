// tb_sifh_top_full: one complete estimate with the estimator at its default
// parameters (M = 32240 readings per histogram, signaled clearing), on a test
// file shaped like the document's example: true ToF 2089, coarse peak in bin
// 16, thresholds 1920 and 2176.
//
// The testbench plays the pattern generator and the logic analyzer of the
// reference measurement: it makes a test file of M 15-bit readings (a narrow
// peak around a chosen true ToF on top of uniform noise), sends it serially
// twice (16 clocks per reading), reads out all 256 bins of the coarse and of
// the fine histogram through ADDR/BIN and compares them, the thresholds and
// the ToF with a software model of the method written independently here.
module tb_sifh_top_full;
  import sifh_pkg::*;
  logic clk = 0, rst = 1;
  longint cyc = 0;
  int checks = 0, failures = 0;
  bit done [1];

  always #10 clk = ~clk;   // 50 MHz
  always @(posedge clk) cyc++;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned M = 32240;
  localparam bit SEQ = 0;
  begin : g_inst

    logic start = 0, sd = 0, ws = 0;
    logic [7:0] addr = '0;
    logic wait0, wait1, wait2, rd_hist, tof_valid;
    logic [11:0] bin;
    logic [14:0] tof;
    int data [];
    int ch [256], fh [256], ch_reach [256], fh_reach [256];
    int x_ref, lo_ref, hi_ref, d_ref, xf_ref, tof_ref, true_tof;
    int n_reject, n_first, n_again, n_endbin, n_stale, n_runs, n_sweep;

    sifh_top dut (.*);

    logic [14:0] h_lo, h_hi, h_d;
    assign h_lo = dut.th_lo;
    assign h_hi = dut.th_hi;
    assign h_d  = dut.delta;

    // mechanism counters, read from inside the design
    always @(posedge clk) begin
      if (dut.u_sel.pix_valid && dut.u_sel.acq && dut.hs && !dut.u_df.pass) n_reject++;
      if (dut.u_hb.state == 1 && dut.u_hb.sel_q == 0) n_first++;
      if (dut.u_hb.state == 1 && dut.u_hb.sel_q == 1) n_again++;
      if (dut.u_ctl.clr_mem && dut.u_hb.clr_done) n_sweep++;
    end

    // a "test file": M readings, a peak around true_tof over uniform noise
    task automatic make_data(input int t, input int sig_pct);
      data = new[M];
      true_tof = t;
      for (int i = 0; i < M; i++) begin
        int v;
        if ($urandom_range(0, 99) < sig_pct) begin
          int r = $urandom_range(0, 9);
          v = t + (r < 6 ? 0 : (r < 8 ? 1 : -1) * (r % 2 + 1));
          if (v < 0) v = 0;
          if (v > 32767) v = 32767;
        end else v = $urandom_range(0, 32767);
        data[i] = v;
      end
    endtask

    // software SiFH on the same data: peak = bin that first reached the max
    task automatic reference();
      int mx;
      foreach (ch[i]) begin ch[i] = 0; fh[i] = 0; ch_reach[i] = 0; fh_reach[i] = 0; end
      for (int i = 0; i < M; i++) begin ch[data[i] >> 7]++; ch_reach[data[i] >> 7] = i; end
      mx = -1; x_ref = 0;
      for (int b = 0; b < 256; b++)
        if (ch[b] > mx || (ch[b] == mx && ch_reach[b] < ch_reach[x_ref])) begin mx = ch[b]; x_ref = b; end
      if (x_ref == 0)        begin lo_ref = 0;     hi_ref = 256; end
      else if (x_ref == 255) begin lo_ref = 32511; hi_ref = 32767; end
      else                   begin lo_ref = 128 * x_ref - 128; hi_ref = 128 * x_ref + 128; end
      d_ref = lo_ref;
      if (x_ref == 0 || x_ref == 255) n_endbin++;
      for (int i = 0; i < M; i++)
        if (data[i] > lo_ref && data[i] < hi_ref) begin
          fh[data[i] - d_ref]++; fh_reach[data[i] - d_ref] = i;
        end
      mx = -1; xf_ref = 0;
      for (int b = 0; b < 256; b++)
        if (fh[b] > mx || (fh[b] == mx && fh_reach[b] < fh_reach[xf_ref])) begin mx = fh[b]; xf_ref = b; end
      tof_ref = xf_ref + d_ref;
    endtask

    task automatic send_pass();
      wait (wait0);
      wait (!wait0);
      for (int i = 0; i < M; i++) begin
        for (int b = 14; b >= 0; b--) begin
          @(negedge clk);
          sd = data[i][b];
          ws = (b == 0);
        end
        @(negedge clk);   // 16th clock: gap, 320 ns per reading at 50 MHz
        ws = 0; sd = 0;
      end
    endtask

    task automatic read_hist(input bit fine, input string nm);
      int exp_b, bad;
      wait (rd_hist);
      @(negedge clk);
      bad = 0;
      for (int a = 0; a < 256; a++) begin
        addr = 8'(a);
        @(posedge clk); #1;
        exp_b = fine ? fh[a] : ch[a];
        checks++;
        if (int'(bin) != exp_b) begin
          bad++;
          if (bad < 5) $display("FAIL: %s %s bin %0d = %0d expected %0d", nm, fine ? "FH" : "CH", a, bin, exp_b);
        end
        if (fine && exp_b == 0 && ch[a] != 0) n_stale++;  // old data must read as 0
        @(negedge clk);
      end
      failures += bad;
    endtask

    task automatic run_one(input int t, input int sig_pct, input string nm);
      longint c0, c1;
      make_data(t, sig_pct);
      reference();
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      c0 = cyc;
      send_pass();
      read_hist(0, nm);
      send_pass();
      read_hist(1, nm);
      wait (tof_valid);
      c1 = cyc;
      @(negedge clk);
      check(int'(tof) == tof_ref, $sformatf("%s: ToF %0d expected %0d (true %0d)", nm, tof, tof_ref, true_tof));
      check(tof_ref == true_tof, $sformatf("%s: reference ToF %0d equals the true peak %0d", nm, tof_ref, true_tof));
      check(h_lo == 15'(lo_ref) && h_hi == 15'(hi_ref) && h_d == 15'(d_ref),
            $sformatf("%s: thresholds for x=%0d", nm, x_ref));
      // cycle budget: 2 passes x M readings x 16 clocks, 2 readouts, dead
      // times, plus a 256-clock sweep per pass with sequential clearing
      check(c1 - c0 <= longint'(2 * M * 16 + 2 * 256 + 64 + (SEQ ? 2 * 260 : 0)),
            $sformatf("%s: %0d clocks", nm, c1 - c0));
      $display("%s: true %0d  x_pc %0d  delta %0d  x_pf %0d  ToF %0d  (%0d clocks)",
               nm, true_tof, x_ref, d_ref, xf_ref, tof, c1 - c0);
      n_runs++;
    endtask

    initial begin
      n_reject = 0; n_first = 0; n_again = 0; n_endbin = 0; n_stale = 0; n_runs = 0; n_sweep = 0;
      wait (!rst);
      run_one(2089, 2, "full");
      check(x_ref == 16 && d_ref == 1920 && hi_ref == 2176, "coarse peak 16, delta 1920, TH+ 2176");
      check(n_reject > 0 && n_first > 0 && n_again > 0, "filter, first hits and repeat hits all seen");
      done[0] = 1;
    end
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done[0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
