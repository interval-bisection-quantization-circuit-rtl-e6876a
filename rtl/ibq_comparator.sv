// ibq_comparator -- behavioural model of the offset comparators.
// This is a behavioural model of an analog block, not synthesizable logic.
//
// Each comparator compares the analog input v_I with the DAC output v_D moved
// by half an LSB:
//   L-comparator (OFFSET_SIGN = -1): h = 1 when v_I > v_D - LSB/2
//   R-comparator (OFFSET_SIGN = +1): h = 1 when v_I > v_D + LSB/2
// with LSB = VREF / 2^N. In silicon this is input and offset differential
// amplifiers, current mirrors, a regenerative latch and an output amplifier;
// the model keeps only the ideal decision (no offset error, no delay).
// Equality, which the comparison rules leave open, resolves to 0 here.
//
// Timing: combinational. The decision is only meaningful while the DAC output
// is valid (clock low).
`timescale 1ns / 1ps
module ibq_comparator #(
  parameter int unsigned N           = ibq_pkg::IBQ_N,
  parameter real         VREF        = ibq_pkg::IBQ_VREF,
  parameter int          OFFSET_SIGN = -1    // -1: L-comparator, +1: R-comparator
) (
  input  real  vin,
  input  real  vdac,
  output logic h
);

  localparam real LSB = ibq_pkg::ibq_lsb(VREF, N);

  always_comb h = (vin > vdac + real'(OFFSET_SIGN) * LSB / 2.0);

endmodule
