// ibq_quantizer -- interval-bisection quantizer for an N-bit (8-bit) ADC.
//
// The converter keeps an interval [L, R] of candidate codes, starting at
// [0, 2^N - 1], and tests its midpoint floor((L+R)/2) every clock cycle:
//   * the midpoint goes through a charge-scaling DAC,
//   * two comparators check the input against the DAC voltage -LSB/2 (HL)
//     and +LSB/2 (HR),
//   * HL = HR = 1 (input above the midpoint): L takes the midpoint,
//     HL = HR = 0 (input below the midpoint): R takes the midpoint,
//     HL = 1, HR = 0: the midpoint is within LSB/2 of the input; both take it,
//     so the midpoint stays put, and RDY rises.
// Unlike a successive-approximation converter the whole code is updated at
// once, so a conversion takes between 1 and N midpoint tests, fewer on
// average. The top code (all ones) cannot be a midpoint; it is recognised
// when the midpoint is one below it and HR is still 1.
//
// Clocking. One midpoint test per clock period:
//   clk high : DAC capacitors grounded; the adder settles the new midpoint.
//   clk low  : DAC output valid, comparators decide, RDY latch transparent.
//   clk rise : L and R registers load from their multiplexors; RDY holds.
// RST is sampled on the falling edge; the rising edge that follows loads
// L = 0, R = all ones, and the first midpoint (2^(N-1) - 1) is tested in the
// next clock-low phase if RST was released by the following falling edge.
// The output register is clocked by RDY's rising edge.
//
// Using it: hold vin (from an external sample-and-hold) from the falling edge
// at which RST is sampled until RDY has been seen high at a rising clock edge;
// then code holds the result. The number of clock-low phases from release of
// reset to RDY is the conversion time. vin is an analog (real) voltage in
// 0 .. VREF; the DAC and comparators are behavioural models.
//
// The block structure, the reset values, the multiplexor selection rules, the
// convergence equation and the RDY latch follow the original design; the generic N,
// the model timing and the output port mid (for observation) are this
// design's.
`timescale 1ns / 1ps
module ibq_quantizer #(
  parameter int unsigned N    = ibq_pkg::IBQ_N,
  parameter real         VREF = ibq_pkg::IBQ_VREF
) (
  input  logic         clk,
  input  logic         rst,
  input  real          vin,
  output logic [N-1:0] code,
  output logic         rdy,
  output logic         nrdy,
  output logic [N-1:0] mid
);

  logic         rst_q, rst_qn;
  logic [N-1:0] l_q, r_q, l_d, r_d;
  logic         hl, hr, conv, top_code;
  real          vdac;

  // Falling-edge reset flip-flop
  ibq_reset_dff u_rst (.clk, .rst, .rst_q, .rst_qn);

  // Endpoint multiplexors: L <- mid when HL, R <- mid when not HR
  ibq_endpoint_mux #(.N(N)) u_lmux (
    .h(hl), .rst(rst_q), .v_h(mid), .v_nh(l_q), .v_rst('0), .q(l_d));
  ibq_endpoint_mux #(.N(N)) u_rmux (
    .h(hr), .rst(rst_q), .v_h(r_q), .v_nh(mid), .v_rst('1), .q(r_d));

  // Endpoint registers
  ibq_dff_register #(.N(N)) u_lreg (.clk, .d(l_d), .q(l_q));
  ibq_dff_register #(.N(N)) u_rreg (.clk, .d(r_d), .q(r_q));

  // Addition and division by two
  ibq_midpoint_adder #(.N(N)) u_add (.l(l_q), .r(r_q), .mid);

  // Charge-scaling DAC
  ibq_charge_dac #(.N(N), .VREF(VREF)) u_dac (.clk, .code(mid), .vout(vdac));

  // L- and R-comparators
  ibq_comparator #(.N(N), .VREF(VREF), .OFFSET_SIGN(-1)) u_lcmp (
    .vin, .vdac, .h(hl));
  ibq_comparator #(.N(N), .VREF(VREF), .OFFSET_SIGN(+1)) u_rcmp (
    .vin, .vdac, .h(hr));

  // Convergence determination logic and RDY latch
  ibq_convergence_logic #(.N(N)) u_conv (.hl, .hr, .mid, .conv, .top_code);
  ibq_ready_latch u_rdy (.clk, .conv, .rdy, .nrdy);

  // Output register, clocked by RDY
  ibq_output_register #(.N(N)) u_out (.rdy, .mid, .top_code, .code);

endmodule
