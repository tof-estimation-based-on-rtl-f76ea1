// tb_peak_detector: feeds the update stream of random histograms (a bin's
// count grows by one per update) for a coarse and then a fine histogram, and
// checks the reported peak against the bin that first reached the final
// maximum, computed from a software histogram after the stream ends. Flat
// histograms without a dominant bin make ties common, to check that rule. RST
// clears only the peak of the selected histogram.
module tb_peak_detector;
  localparam int unsigned NS = 8, BIN_W = 12, NB = 1 << NS;
  logic clk = 0, rst = 1, hist_rst = 0, hs = 0, upd_valid = 0;
  logic [NS-1:0] upd_addr = '0, pnoc_c, pnoc_f;
  logic [BIN_W-1:0] upd_count = '0, noc_max;
  int hist [NB];
  int reach [NB];   // update index at which the bin got its final count
  int checks = 0, failures = 0;

  peak_detector #(.NS(NS), .BIN_W(BIN_W)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_histogram(input bit fine, input bit flat, output int peak);
    int a, mx, centre, n;
    @(negedge clk);
    hs = fine; hist_rst = 1;
    @(negedge clk);
    hist_rst = 0;
    foreach (hist[i]) begin hist[i] = 0; reach[i] = 0; end
    centre = $urandom_range(0, NB - 1);
    n = $urandom_range(300, 3000);
    for (int k = 0; k < n; k++) begin
      a = (!flat && $urandom_range(0, 3) == 0) ? (centre + $urandom_range(0, 2)) % NB
                                      : $urandom_range(0, NB - 1);
      hist[a]++;
      reach[a] = k;
      upd_valid = 1; upd_addr = NS'(a); upd_count = BIN_W'(hist[a]);
      @(negedge clk);
      upd_valid = ($urandom_range(0, 1) == 0);  // junk stream while invalid
      upd_addr = NS'($urandom); upd_count = '1;
      upd_valid = 0;
      repeat ($urandom_range(0, 2)) @(negedge clk);
    end
    // reference: largest count; among equals, the one that got there first
    mx = -1; peak = 0;
    for (int i = 0; i < NB; i++)
      if (hist[i] > mx || (hist[i] == mx && reach[i] < reach[peak])) begin
        mx = hist[i]; peak = i;
      end
    check(int'(noc_max) == mx, $sformatf("NoC max %0d expected %0d", noc_max, mx));
  endtask

  initial begin
    int pc, pf;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int r = 0; r < 16; r++) begin
      run_histogram(0, r[0], pc);
      check(int'(pnoc_c) == pc, $sformatf("coarse peak %0d expected %0d", pnoc_c, pc));
      run_histogram(1, r[1], pf);
      check(int'(pnoc_f) == pf, $sformatf("fine peak %0d expected %0d", pnoc_f, pf));
      check(int'(pnoc_c) == pc, "coarse peak kept during fine histogram");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
