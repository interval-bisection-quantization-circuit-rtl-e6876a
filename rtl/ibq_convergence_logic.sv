// ibq_convergence_logic -- decides that the conversion has converged.
//
//   conv     = HL & ~HR  |  HR & mid[N-1:1] == all ones
//   top_code = HR & mid[N-1:1] == all ones
//
// HL = 1 with HR = 0 means the DAC voltage of the midpoint lies within LSB/2
// of the input. The second term covers the top code (255 for N = 8): the
// midpoint floor((L+R)/2) can never reach it, so when the midpoint is one
// below it (its upper N-1 bits all ones) and the input is still above it by
// more than LSB/2, the conversion also ends and the output register's LSB is
// forced to 1 (top_code drives that selection).
//
// The original splits the seven-input AND into two four-input NANDs and a NOR
// and combines the two terms with a NAND of their complements; the function is
// written here directly. Purely combinational. The comparator outputs are only
// meaningful while CLK is low; the RDY latch downstream accounts for that.
`timescale 1ns / 1ps
module ibq_convergence_logic #(
  parameter int unsigned N = ibq_pkg::IBQ_N
) (
  input  logic         hl,
  input  logic         hr,
  input  logic [N-1:0] mid,
  output logic         conv,
  output logic         top_code
);

  always_comb begin
    top_code = hr & (&mid[N-1:1]);
    conv     = (hl & ~hr) | top_code;
  end

endmodule
