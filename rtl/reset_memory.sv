// reset_memory: one "hit" flag per histogram bin, for the signaled clearing
// mechanism.
//
// Each flag plays the role of an SR latch: RST clears all flags before a new
// histogram; a write (WEN) to a bin sets that bin's flag, as a demultiplexer
// steered by ADDR would. SEL is the flag of the bin at ADDR, read through a
// multiplexer steered by the same ADDR: 0 means the bin has not been hit in
// the current histogram, so the stored word is stale and must be taken as 0.
// Flags are flip-flops clocked on CLK rather than latches (this design's
// choice); SEL is combinational from ADDR and the flags.
module reset_memory #(
  parameter int unsigned AW = sifh_pkg::NS
) (
  input  logic          clk,
  input  logic          rst,   // clear all flags (synchronous)
  input  logic          wen,   // bin at ADDR is written this clock
  input  logic [AW-1:0] addr,
  output logic          sel    // bin at ADDR already hit
);

  logic [(1 << AW)-1:0] hit;

  always_ff @(posedge clk) begin
    if (rst)      hit       <= '0;
    else if (wen) hit[addr] <= 1'b1;
  end

  assign sel = hit[addr];

endmodule
