// hist_bram: single-port block RAM holding the histogram bins.
//
// One port, read-before-write: on an enabled clock DO takes the word stored
// at ADDR before this clock's write (if WE is high DI is written). Read
// latency is one clock. The memory has no reset, like an FPGA block RAM; the
// histogram builder's clearing mechanisms deal with its stale content.
// 2**AW words of DW bits: 256 x 12 bits (3 kbit) by default.
module hist_bram #(
  parameter int unsigned AW = sifh_pkg::NS,
  parameter int unsigned DW = sifh_pkg::BIN_W
) (
  input  logic          clk,
  input  logic          en,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] di,
  output logic [DW-1:0] dout
);

  logic [DW-1:0] mem [1 << AW];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= di;
      dout <= mem[addr];
    end
  end

endmodule
