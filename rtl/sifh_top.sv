// sifh_top: single-pixel time-of-flight estimator using shifted inter-frame
// histograms (SiFH).
//
// The same stream of M pixel readings (NP = 15-bit time codes) is sent twice.
// Pass 1 builds a coarse histogram of the NS = 8 most significant bits of each
// reading and tracks its peak x. From x the algebraic block derives a window
// TH- < PIXV < TH+ of 2**NS codes and a shift DELTA. Pass 2 builds a fine
// histogram, in the same 256 x 12-bit memory, of the readings inside the
// window, shifted down by DELTA. Its peak plus DELTA is the ToF, with the full
// NP-bit resolution but 2**(NP-NS) = 128 times less histogram memory than a
// complete histogram of all 2**NP codes.
//
// Data path: s2p -> digital_filter / hist_selector -> hist_builder ->
// peak_detector -> algebraic_block (thresholds) and tof_adder (result);
// sifh_controller sequences the passes.
// Interface (all on CLK, 50 MHz in the reference setup):
//   SD, WS      serial reading, MSB first, WS with the last bit; at least 4
//               clocks apart (a read-modify-write takes 3), 15-16 in practice
//   START       begins an estimate; WAIT0 high then low means "send the M
//               readings now"; WAIT1 marks the end of an acquisition, WAIT2
//               the end of the estimate
//   RD_HIST     high for 256 clocks after each WAIT1: drive ADDR, and BIN
//               gives that bin of the current histogram one clock later
//   TOF         valid while TOF_VALID is high (after WAIT2, until next START)
// CLR_MODE selects the clearing mechanism between histograms (signaled by
// default, which adds no latency; sequential adds a 256-clock sweep before
// each histogram). Structure and numbers follow the document; the port
// handshakes are this design's choice.
module sifh_top
  import sifh_pkg::*;
#(
  parameter int unsigned M        = 32240,
  parameter int unsigned DEAD_CYC = 4,
  parameter clr_mode_e   CLR_MODE = CLR_SIG
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             start,
  input  logic             sd,
  input  logic             ws,
  input  logic [NS-1:0]    addr,      // readout address from the pattern source
  output logic             wait0,
  output logic             wait1,
  output logic             wait2,
  output logic             rd_hist,
  output logic [BIN_W-1:0] bin,
  output logic [NP-1:0]    tof,
  output logic             tof_valid
);

  pixv_t pixv;
  logic  pix_valid;
  logic  hs, hist_rst, clr_mem, clr_done, acq, alg_load, busy;
  addr_t sa, h_addr;
  logic  sa_pass, req;
  pixv_t th_lo, th_hi, delta;
  logic             upd_valid;
  addr_t            upd_addr;
  bin_t             upd_count;
  addr_t            pnoc_c, pnoc_f;

  s2p #(.NP(NP)) u_s2p (
    .clk, .rst, .sd, .ws, .pixv, .pix_valid
  );

  digital_filter #(.NP(NP), .NS(NS)) u_df (
    .en (hs), .pixv, .th_lo, .th_hi, .delta, .sa, .pass (sa_pass)
  );

  hist_selector #(.NS(NS)) u_sel (
    .hs, .ac (pixv[NP-1 -: NS]), .sa, .sa_pass, .pix_valid, .acq,
    .addr (h_addr), .req
  );

  hist_builder #(.NS(NS), .BIN_W(BIN_W), .CLR_MODE(CLR_MODE)) u_hb (
    .clk, .rst, .hist_rst, .clr_mem, .clr_done,
    .req, .addr (h_addr), .busy,
    .upd_valid, .upd_addr, .upd_count,
    .rd_en (rd_hist), .rd_addr (addr), .rd_bin (bin)
  );

  peak_detector #(.NS(NS), .BIN_W(BIN_W)) u_pd (
    .clk, .rst, .hist_rst, .hs, .upd_valid, .upd_addr, .upd_count,
    .noc_max (), .pnoc_c, .pnoc_f
  );

  algebraic_block #(.NP(NP), .NS(NS)) u_alg (
    .clk, .rst, .load (alg_load), .x_pc (pnoc_c), .th_lo, .th_hi, .delta
  );

  tof_adder #(.NP(NP), .NS(NS)) u_add (
    .pnoc_f, .delta, .tof
  );

  sifh_controller #(.M(M), .DEAD_CYC(DEAD_CYC), .RD_CYC(NBINS), .CLR_MODE(CLR_MODE)) u_ctl (
    .clk, .rst, .start, .pix_valid, .busy, .clr_done,
    .hs, .hist_rst, .clr_mem, .acq, .alg_load,
    .wait0, .wait1, .wait2, .rd_hist, .tof_valid
  );

endmodule
