// ibq_dff_register -- N-bit rising-edge register (L and R endpoint registers).
//
// Each bit is a master/slave flip-flop that captures D on the rising edge of
// clk. The register has no reset of its own: it is initialised through its
// input multiplexor, which selects the reset value while the registered RST is
// high, so the first rising edge after RST loads 0 (L) or all ones (R).
//
// Timing: q changes only on the rising edge of clk, at the end of the clock
// low phase in which the comparators evaluated the midpoint.
`timescale 1ns / 1ps
module ibq_dff_register #(
  parameter int unsigned N = ibq_pkg::IBQ_N
) (
  input  logic         clk,
  input  logic [N-1:0] d,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) q <= d;

endmodule
