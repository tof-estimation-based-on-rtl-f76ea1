// s2p: serial-to-parallel converter for pixel readings.
//
// The pixel reading arrives MSB first on SD, one bit per rising clock edge.
// WS is high on the clock that carries the last bit (the LSB) and marks the
// end of the reading. On that edge the NP bits are moved into PIXV, which then
// holds still until the next WS, and PIX_VALID pulses for one clock.
// Latency: PIXV is valid the clock after the one that carried the LSB.
// The document gives the function (serial input SD, end marker WS, stable
// PIXV); bit order and the one-clock PIX_VALID strobe are this design's choice.
module s2p #(
  parameter int unsigned NP = sifh_pkg::NP
) (
  input  logic          clk,
  input  logic          rst,       // synchronous, active high
  input  logic          sd,        // serial data, MSB first
  input  logic          ws,        // high with the last bit of a reading
  output logic [NP-1:0] pixv,      // last complete reading
  output logic          pix_valid  // one-clock strobe: new PIXV
);

  logic [NP-2:0] shreg;

  always_ff @(posedge clk) begin
    if (rst) begin
      shreg     <= '0;
      pixv      <= '0;
      pix_valid <= 1'b0;
    end else begin
      shreg     <= {shreg[NP-3:0], sd};
      pix_valid <= ws;
      if (ws) pixv <= {shreg, sd};
    end
  end

endmodule
