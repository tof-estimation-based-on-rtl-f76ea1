// tb_sifh_controller: runs a signaled-clearing and a sequential-clearing
// controller, each with its own small pattern source (readings every 16
// clocks after WAIT0 falls, a 3-clock busy per reading, and for the
// sequential one a 256-clock sweep answered by CLR_DONE). Every clock's
// outputs are logged; afterwards the log is cut into runs of each signal and
// checked: number and length of WAIT0/WAIT1/WAIT2 (4 clocks each) and RD_HIST
// (256), HIST_RST and CLR_MEM placement, ACQ high for every one of the M
// readings, HS low for the first pass and high for the second, ALG_LOAD once
// at the end of the coarse pass, TOF_VALID at the end.
module tb_sifh_controller;
  import sifh_pkg::*;
  localparam int unsigned M = 37, DEAD = 4, RD = 256;

  logic clk = 0, rst = 1;
  int checks = 0, failures = 0;
  bit done [2];

  always #5 clk = ~clk;

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", msg);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic hs, hist_rst, clr_mem, acq, alg_load, wait0, wait1, wait2, rd_hist, tof_valid, pix_valid;
  } obs_t;

  for (genvar g = 0; g < 2; g++) begin : g_dut
    localparam clr_mode_e MODE = g ? CLR_SEQ : CLR_SIG;
    logic start = 0, pix_valid = 0, busy, clr_done;
    obs_t o;
    obs_t log_q [$];
    int bcnt = 0, ccnt = 0;

    sifh_controller #(.M(M), .DEAD_CYC(DEAD), .RD_CYC(RD), .CLR_MODE(MODE)) dut (
      .clk, .rst, .start, .pix_valid, .busy, .clr_done,
      .hs(o.hs), .hist_rst(o.hist_rst), .clr_mem(o.clr_mem), .acq(o.acq),
      .alg_load(o.alg_load), .wait0(o.wait0), .wait1(o.wait1), .wait2(o.wait2),
      .rd_hist(o.rd_hist), .tof_valid(o.tof_valid));
    assign o.pix_valid = pix_valid;

    // busy for 3 clocks after each reading; sweep answered after 256 clocks
    always @(posedge clk) begin
      if (pix_valid) bcnt <= 2; else if (bcnt > 0) bcnt <= bcnt - 1;
      if (o.clr_mem) ccnt <= ccnt + 1; else ccnt <= 0;
      if (!rst) log_q.push_back(o);
    end
    assign busy = (bcnt > 0);
    assign clr_done = o.clr_mem && (ccnt == 255);

    // pattern source: Start, then for each pass wait for WAIT0 to fall and
    // send M readings 16 clocks apart
    initial begin
      wait (!rst);
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      for (int pass = 0; pass < 2; pass++) begin
        wait (o.wait0);
        wait (!o.wait0);
        for (int k = 0; k < M; k++) begin
          repeat (15) @(negedge clk);
          pix_valid = 1;
          @(negedge clk);
          pix_valid = 0;
        end
      end
      wait (o.tof_valid);
      repeat (5) @(negedge clk);
      analyse();
      done[g] = 1;
    end

    task automatic runs(input int sig, output int st[$], output int len[$]);
      bit prev = 0;
      st = {}; len = {};
      for (int i = 0; i < log_q.size(); i++) begin
        bit v = log_q[i][sig];
        if (v && !prev) begin st.push_back(i); len.push_back(1); end
        else if (v) len[len.size()-1]++;
        prev = v;
      end
    endtask

    // bit positions in obs_t, LSB first
    localparam int PV = 0, TV = 1, RH = 2, W2 = 3, W1 = 4, W0 = 5, AL = 6, AQ = 7, CM = 8, HR = 9, HS = 10;

    task automatic analyse();
      int s0[$], l0[$], s1[$], l1[$], s2[$], l2[$], sr[$], lr[$], sh[$], lh[$];
      int sa[$], la[$], sc[$], lc[$], sp[$], lp[$], st[$], lt[$], npix;
      string nm = g ? "seq" : "sig";
      runs(W0, s0, l0); runs(W1, s1, l1); runs(W2, s2, l2); runs(RH, sr, lr);
      runs(HR, sh, lh); runs(AL, sa, la); runs(CM, sc, lc); runs(PV, sp, lp);
      runs(TV, st, lt);
      check(s0.size() == 2 && l0[0] == DEAD && l0[1] == DEAD, {nm, ": two WAIT0 of 4 clocks"});
      check(s1.size() == 2 && l1[0] == DEAD && l1[1] == DEAD, {nm, ": two WAIT1 of 4 clocks"});
      check(s2.size() == 1 && l2[0] == DEAD, {nm, ": one WAIT2 of 4 clocks"});
      check(sr.size() == 2 && lr[0] == RD && lr[1] == RD, {nm, ": two readouts of 256 clocks"});
      check(sh.size() == 2 && lh[0] == 1 && lh[1] == 1, {nm, ": two RST pulses"});
      check(sh.size() == 2 && sh[0] == s0[0] && sh[1] == s0[1], {nm, ": RST on first WAIT0 clock"});
      check(sa.size() == 1 && la[0] == 1, {nm, ": one ALG_LOAD"});
      check(sa.size() == 1 && sa[0] + 1 == s1[0] && !log_q[sa[0]][HS], {nm, ": ALG_LOAD ends the coarse pass"});
      check(sr.size() == 2 && sr[0] == s1[0] + DEAD && sr[1] == s1[1] + DEAD, {nm, ": readout after WAIT1"});
      check(s2.size() == 1 && s2[0] == sr[1] + RD, {nm, ": WAIT2 after second readout"});
      check(st.size() == 1 && st[0] == s2[0] + DEAD && st[0] + lt[0] == log_q.size(), {nm, ": ToF valid stays"});
      if (g) begin
        check(sc.size() == 2 && lc[0] == 256 && lc[1] == 256, {nm, ": two 256-clock sweeps"});
        check(sc.size() == 2 && s0[0] == sc[0] + 256 && s0[1] == sc[1] + 256, {nm, ": WAIT0 after sweep"});
        check(sc.size() == 2 && sc[1] == sr[0] + RD, {nm, ": second sweep after coarse readout"});
      end else begin
        check(sc.size() == 0, {nm, ": no sweep"});
        check(s0[1] == sr[0] + RD, {nm, ": fine pass starts right after coarse readout"});
      end
      npix = 0;
      for (int i = 0; i < sp.size(); i++) begin
        bit pass2 = (sp[i] > s0[1]);
        check(log_q[sp[i]][AQ], {nm, ": ACQ high for every reading"});
        check(log_q[sp[i]][HS] == pass2, {nm, ": HS selects the pass"});
        npix++;
      end
      check(npix == 2 * M, {nm, ": 2M readings"});
      check(s1[0] == sp[M-1] + 4 && s1[1] == sp[2*M-1] + 4, {nm, ": WAIT1 once the last update is done"});
    endtask
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
