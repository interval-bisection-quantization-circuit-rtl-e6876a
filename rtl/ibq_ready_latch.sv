// ibq_ready_latch -- gated D-latch that produces the conversion-complete flag.
//
// RDY follows CONV while CLK is low and holds its value while CLK is high.
// The DAC output, and with it the comparator outputs and CONV, is only valid
// while CLK is low, so the latch closes on the rising edge with the decision
// taken on the evaluated midpoint and keeps it through the precharge phase.
//
// The original is four NOR gates: two form S = ~CONV nor CLK and
// R = CONV nor CLK, two form an S-R latch. Written here as the S/R pair and a
// level-sensitive hold, which is the same function (S and R are never both 1).
// RDY and NRDY also clock the output register. The latch has no reset, as in
// the original: its first value is whatever the first clock-low phase decides.
// The latch is intended.
`timescale 1ns / 1ps
module ibq_ready_latch (
  input  logic clk,
  input  logic conv,
  output logic rdy,
  output logic nrdy
);

  logic set_n, reset_n;   // S and R inputs of the S-R latch

  always_comb begin
    set_n   = ~(~conv | clk);  // S = 1 when CLK low and CONV high
    reset_n = ~( conv | clk);  // R = 1 when CLK low and CONV low
  end

  // S-R latch: set or reset while either input is active, else hold
  always_latch begin
    if (set_n | reset_n) rdy = set_n;
  end

  assign nrdy = ~rdy;

endmodule
