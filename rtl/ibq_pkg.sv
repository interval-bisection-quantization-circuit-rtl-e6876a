// ibq_pkg -- shared constants of the interval-bisection quantizer.
//
// The quantizer resolves N = 8 bits against a reference equal to the 5 V
// supply. Both numbers are the design's nominal configuration; every module
// takes its own width parameter (defaulting to IBQ_N) so the same RTL can be
// elaborated at other resolutions. ibq_lsb() gives the analog size of one
// code step, Vref / 2**N, used by the DAC and comparator models.
`timescale 1ns / 1ps
package ibq_pkg;

  localparam int unsigned IBQ_N    = 8;    // resolution in bits
  localparam real         IBQ_VREF = 5.0;  // reference voltage (supply), volts

  // Analog size of one least significant bit for an n-bit converter.
  function automatic real ibq_lsb(real vref, int unsigned n);
    return vref / real'(64'd1 << n);
  endfunction

endpackage
