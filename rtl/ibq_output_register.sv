// ibq_output_register -- holds the converted output word.
//
// An N-bit flip-flop register clocked by the rising edge of RDY rather than by
// the system clock: when the convergence logic reports CONV during the clock
// low phase, RDY rises and the register captures the current midpoint. Only
// bit 0 has an input selector: it takes the midpoint's bit 0 normally and a
// constant 1 when top_code is set, so the top code (all ones), which the
// midpoint adder cannot produce, can still be output.
//
// Timing: code changes on the rising edge of rdy; mid and top_code are stable
// at that instant because they were settled before the clock went low. No
// reset, as in the original.
`timescale 1ns / 1ps
module ibq_output_register #(
  parameter int unsigned N = ibq_pkg::IBQ_N
) (
  input  logic         rdy,
  input  logic [N-1:0] mid,
  input  logic         top_code,
  output logic [N-1:0] code
);

  logic [N-1:0] d;

  always_comb begin
    d    = mid;
    d[0] = top_code ? 1'b1 : mid[0];
  end

  always_ff @(posedge rdy) code <= d;

endmodule
