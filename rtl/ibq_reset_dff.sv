// ibq_reset_dff -- falling-edge flip-flop that synchronises the reset request.
//
// The quantizer's endpoint registers load their reset values on the rising
// clock edge. The external RST is therefore sampled on the falling edge, half
// a cycle earlier, so that the select lines of the endpoint multiplexors are
// stable before the registers clock. rst_q is RST delayed to the falling edge;
// rst_qn is its complement (the NRST control of the multiplexor's reset
// transmission gate).
//
// Timing: rst_q changes only on the falling edge of clk. A falling-edge
// flip-flop for synchronous reset follows the original design; there is no asynchronous
// reset, as in the original transistor-level cell.
`timescale 1ns / 1ps
module ibq_reset_dff (
  input  logic clk,
  input  logic rst,
  output logic rst_q,
  output logic rst_qn
);

  always_ff @(negedge clk) rst_q <= rst;

  assign rst_qn = ~rst_q;

endmodule
