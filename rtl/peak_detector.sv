// peak_detector: finds the histogram peak while the histogram is being built.
//
// Every bin update (UPD_VALID, UPD_ADDR, UPD_COUNT = new bin value) is
// compared with the largest count seen so far (NoC). A strictly larger count
// replaces it and its address becomes the peak position: PNOC_C while HS is
// low (coarse histogram), PNOC_F while HS is high (fine histogram). Because
// bins only grow by one, the peak reported is the bin that first reached the
// final maximum. HIST_RST (RST) clears the running maximum and the peak
// position of the histogram selected by HS; the other one is kept. The peak is
// valid one clock after the last update, with no search over the bins.
module peak_detector #(
  parameter int unsigned NS    = sifh_pkg::NS,
  parameter int unsigned BIN_W = sifh_pkg::BIN_W
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             hist_rst,
  input  logic             hs,
  input  logic             upd_valid,
  input  logic [NS-1:0]    upd_addr,
  input  logic [BIN_W-1:0] upd_count,
  output logic [BIN_W-1:0] noc_max,  // largest count so far
  output logic [NS-1:0]    pnoc_c,   // coarse peak position
  output logic [NS-1:0]    pnoc_f    // fine peak position
);

  always_ff @(posedge clk) begin
    if (rst) begin
      noc_max <= '0;
      pnoc_c  <= '0;
      pnoc_f  <= '0;
    end else if (hist_rst) begin
      noc_max <= '0;
      if (hs) pnoc_f <= '0;
      else    pnoc_c <= '0;
    end else if (upd_valid && upd_count > noc_max) begin
      noc_max <= upd_count;
      if (hs) pnoc_f <= upd_addr;
      else    pnoc_c <= upd_addr;
    end
  end

endmodule
