// digital_filter (DF): window filter and address shifter for the fine histogram.
//
// When EN (the histogram select HS) is high, a reading passes if
// TH_LO < PIXV < TH_HI, both bounds excluded as in the document. DELTA is then
// subtracted and the low NS bits of the difference are the fine-histogram
// address SA. Because TH_HI - TH_LO = 2**NS and DELTA = TH_LO, a passing
// reading always maps to 1 .. 2**NS-1. Purely combinational.
module digital_filter #(
  parameter int unsigned NP = sifh_pkg::NP,
  parameter int unsigned NS = sifh_pkg::NS
) (
  input  logic          en,     // HS: fine histogram being built
  input  logic [NP-1:0] pixv,
  input  logic [NP-1:0] th_lo,  // TH-
  input  logic [NP-1:0] th_hi,  // TH+
  input  logic [NP-1:0] delta,  // shift toward bin 0
  output logic [NS-1:0] sa,     // fine address
  output logic          pass    // reading lies inside the window
);

  logic [NP-1:0] diff;

  always_comb begin
    diff = pixv - delta;
    sa   = diff[NS-1:0];
    pass = en && (pixv > th_lo) && (pixv < th_hi);
  end

endmodule
