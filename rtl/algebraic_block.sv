// algebraic_block: fine-window thresholds and shift from the coarse peak.
//
// From the coarse peak x = PNoCc (NS bits) it computes, with K = 2**(NP-NS)
// and SB = 2**(NS-1):
//   TH+ = K*x + SB,   TH- = K*x - SB,
//   DELTA = (floor(TH+ / 2**NS) - 1) * 2**NS + (TH+ mod 2**NS) = TH+ - 2**NS.
// At the two end bins the window would leave the NP-bit code range, so fixed
// windows of the same width are used instead:
//   x = 0        : TH- = 0,               TH+ = 2**NS
//   x = 2**NS-1  : TH- = 2**NP-1 - 2**NS, TH+ = 2**NP - 1
// DELTA is always formed from TH+ by eq. (2), which gives DELTA = TH- and so
// maps the window onto fine bins 1 .. 2**NS-1.
// The results are registered when LOAD is high (the end of the coarse
// histogram) and held for the fine one. Example: x = 16 gives TH+ = 2176,
// TH- = 1920, DELTA = 1920. The equations follow the document; the values at
// the end bins are this design's choice.
module algebraic_block #(
  parameter int unsigned NP = sifh_pkg::NP,
  parameter int unsigned NS = sifh_pkg::NS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          load,
  input  logic [NS-1:0] x_pc,
  output logic [NP-1:0] th_lo,
  output logic [NP-1:0] th_hi,
  output logic [NP-1:0] delta
);

  localparam int unsigned SB = 1 << (NS - 1);

  logic [NP:0]   base;      // K*x, one spare bit
  logic [NP:0]   hi_full;   // K*x + SB before clamping
  logic [NP-1:0] hi_c, lo_c, d_c;

  always_comb begin
    base    = {1'b0, x_pc, {(NP-NS){1'b0}}};
    hi_full = base + (NP+1)'(SB);
    if (x_pc == '0) begin                        // bottom end bin
      lo_c = '0;
      hi_c = NP'(1 << NS);
    end else if (hi_full[NP]) begin              // top end bin
      hi_c = '1;
      lo_c = '1 - NP'(1 << NS);
    end else begin
      hi_c = hi_full[NP-1:0];
      lo_c = NP'(base - (NP+1)'(SB));
    end
    // eq. (2): (floor(TH+/2**NS) - 1) * 2**NS + TH+ mod 2**NS
    d_c = {hi_c[NP-1:NS] - 1'b1, hi_c[NS-1:0]};
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      th_lo <= '0;
      th_hi <= '0;
      delta <= '0;
    end else if (load) begin
      th_lo <= lo_c;
      th_hi <= hi_c;
      delta <= d_c;
    end
  end

endmodule
