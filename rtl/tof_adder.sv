// tof_adder: shifts the fine-histogram peak back to a full time code,
// ToF = PNoCf + DELTA (eq. 3 of the method). Combinational NP-bit adder;
// the fine peak is zero-extended. The sum cannot overflow because the fine
// window never extends past 2**NP - 1.
module tof_adder #(
  parameter int unsigned NP = sifh_pkg::NP,
  parameter int unsigned NS = sifh_pkg::NS
) (
  input  logic [NS-1:0] pnoc_f,
  input  logic [NP-1:0] delta,
  output logic [NP-1:0] tof
);

  assign tof = delta + NP'(pnoc_f);

endmodule
