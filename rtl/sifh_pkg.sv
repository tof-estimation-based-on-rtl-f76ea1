// sifh_pkg: sizes and types shared by the shifted inter-frame histogram (SiFH)
// time-of-flight estimator.
//
// A pixel reading (PIXV) is an NP-bit time code. Both histograms, the coarse
// one (CH) and the fine one (FH), have 2**NS bins of BIN_W bits each and share
// one memory. SB is the half-width of the fine window around the coarse peak.
// NP = 15, NS = 8 and 12-bit bins are the values of the single-pixel
// implementation this design follows; the enum of clearing mechanisms names
// the two ways the shared memory is emptied between histograms.
package sifh_pkg;

  localparam int unsigned NP    = 15;            // bits of a pixel reading
  localparam int unsigned NS    = 8;             // bits of a histogram address
  localparam int unsigned BIN_W = 12;            // bits of a histogram bin
  localparam int unsigned NBINS = 1 << NS;       // bins per histogram
  localparam int unsigned SB    = 1 << (NS - 1); // half-width of the fine window

  typedef logic [NP-1:0]    pixv_t;
  typedef logic [NS-1:0]    addr_t;
  typedef logic [BIN_W-1:0] bin_t;

  // How the histogram memory is emptied before a new histogram.
  typedef enum logic {
    CLR_SIG = 1'b0, // signaled clearing: per-bin "hit" flags, no latency
    CLR_SEQ = 1'b1  // sequential clearing: sweep all bins writing zero
  } clr_mode_e;

endpackage
