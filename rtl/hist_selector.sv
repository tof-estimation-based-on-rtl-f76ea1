// hist_selector: picks the histogram address and decides whether a reading
// is counted.
//
// HS low (coarse histogram): the address is AC, the NS most significant bits
// of PIXV, and every reading counts. HS high (fine histogram): the address is
// SA from the digital filter and only readings that passed it count. REQ is
// PIX_VALID gated by this rule and by ACQ, the acquisition window of the
// controller. Purely combinational. The gating of REQ is this design's choice;
// the address multiplexer follows the document.
module hist_selector #(
  parameter int unsigned NS = sifh_pkg::NS
) (
  input  logic          hs,        // 0: coarse, 1: fine
  input  logic [NS-1:0] ac,        // PIXV MSBs
  input  logic [NS-1:0] sa,        // filtered, shifted address
  input  logic          sa_pass,   // DF accepted the reading
  input  logic          pix_valid, // new reading
  input  logic          acq,       // acquisition window open
  output logic [NS-1:0] addr,
  output logic          req        // count one hit at ADDR
);

  always_comb begin
    addr = hs ? sa : ac;
    req  = pix_valid && acq && (!hs || sa_pass);
  end

endmodule
