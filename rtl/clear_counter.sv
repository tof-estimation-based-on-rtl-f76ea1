// clear_counter (CNT8): address counter of the sequential clearing mechanism.
//
// While EN is high it steps through 0 .. 2**AW-1, one address per clock, and
// LAST is high on the clock that presents the final address. It returns to 0
// after the final address and whenever EN is low, so every sweep starts at
// bin 0. Rising-edge clocking is this design's choice.
module clear_counter #(
  parameter int unsigned AW = sifh_pkg::NS
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          en,
  output logic [AW-1:0] cnt,
  output logic          last
);

  always_ff @(posedge clk) begin
    if (rst || !en) cnt <= '0;
    else            cnt <= cnt + 1'b1;
  end

  assign last = en && (cnt == '1);

endmodule
