// tb_hist_builder: runs a signaled-clearing and a sequential-clearing builder
// side by side on the same hits. For several histograms in a row it checks
// every bin update (value and address, three clocks after the request), the
// read-out of all 256 bins against a software histogram (bins never hit must
// read 0 although the memory still holds the previous histogram), and the
// 256-clock length of the sequential sweep.
module tb_hist_builder;
  import sifh_pkg::*;
  localparam int unsigned NS = 8, BIN_W = 12, NB = 1 << NS;
  logic clk = 0, rst = 1, hist_rst = 0, clr_mem = 0, req = 0, rd_en = 0;
  logic [NS-1:0] addr = '0, rd_addr = '0;
  logic clr_done_s, clr_done_q, busy_s, busy_q, upd_valid_s, upd_valid_q;
  logic [NS-1:0] upd_addr_s, upd_addr_q;
  logic [BIN_W-1:0] upd_count_s, upd_count_q, rd_bin_s, rd_bin_q;
  int model [NB];
  int checks = 0, failures = 0;
  int sig_first = 0, sig_again = 0;

  hist_builder #(.NS(NS), .BIN_W(BIN_W), .CLR_MODE(CLR_SIG)) dut_sig (
    .clk, .rst, .hist_rst, .clr_mem(1'b0), .clr_done(clr_done_s), .req, .addr,
    .busy(busy_s), .upd_valid(upd_valid_s), .upd_addr(upd_addr_s),
    .upd_count(upd_count_s), .rd_en, .rd_addr, .rd_bin(rd_bin_s));

  hist_builder #(.NS(NS), .BIN_W(BIN_W), .CLR_MODE(CLR_SEQ)) dut_seq (
    .clk, .rst, .hist_rst(1'b0), .clr_mem, .clr_done(clr_done_q), .req, .addr,
    .busy(busy_q), .upd_valid(upd_valid_q), .upd_addr(upd_addr_q),
    .upd_count(upd_count_q), .rd_en, .rd_addr, .rd_bin(rd_bin_q));

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
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic new_histogram();
    int n;
    @(negedge clk);
    hist_rst = 1; clr_mem = 1;
    @(negedge clk);
    hist_rst = 0;
    n = 1;
    while (!clr_done_q) begin
      @(negedge clk);
      n++;
    end
    @(negedge clk);
    clr_mem = 0;
    check(n + 1 == NB, $sformatf("sweep took %0d clocks", n + 1));
    foreach (model[i]) model[i] = 0;
  endtask

  task automatic hit(input logic [NS-1:0] a);
    @(negedge clk);
    req = 1; addr = a;
    @(negedge clk);
    req = 0; addr = NS'($urandom);
    // clock 1 (memory read) has just ended; clock 2 loads the adder
    check(busy_s && busy_q && !upd_valid_s && !upd_valid_q, "load step in the second clock");
    @(negedge clk);
    // clock 3 writes back
    model[a]++;
    if (model[a] == 1) sig_first++; else sig_again++;
    check(upd_valid_s && upd_valid_q, "update in the third clock");
    check(upd_addr_s == a && upd_addr_q == a, "update address");
    check(int'(upd_count_s) == model[a], $sformatf("sig count %0d expected %0d at %0d", upd_count_s, model[a], a));
    check(int'(upd_count_q) == model[a], $sformatf("seq count %0d expected %0d at %0d", upd_count_q, model[a], a));
    @(negedge clk);
    check(!busy_s && !busy_q, "idle again after three clocks");
    repeat ($urandom_range(0, 10)) @(negedge clk);
  endtask

  task automatic readout();
    @(negedge clk);
    rd_en = 1;
    for (int a = 0; a < NB; a++) begin
      rd_addr = NS'(a);
      @(posedge clk); #1;
      check(int'(rd_bin_s) == model[a], $sformatf("sig readout bin %0d = %0d expected %0d", a, rd_bin_s, model[a]));
      check(int'(rd_bin_q) == model[a], $sformatf("seq readout bin %0d = %0d expected %0d", a, rd_bin_q, model[a]));
      @(negedge clk);
    end
    rd_en = 0;
  endtask

  initial begin
    int centre;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int h = 0; h < 4; h++) begin
      new_histogram();
      centre = $urandom_range(0, NB - 1);
      for (int n = 0; n < 1500; n++) begin
        if ($urandom_range(0, 2) == 0) hit(NS'(centre + $urandom_range(0, 4)));
        else if (h == 2) hit(NS'($urandom_range(0, NB / 2 - 1)));  // leave half untouched
        else hit(NS'($urandom));
      end
      readout();
    end
    check(sig_first > 0 && sig_again > 0, "both first-hit and repeat-hit cases seen");
    $display("first hits %0d, repeat hits %0d", sig_first, sig_again);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
