// ibq_charge_dac -- behavioural model of the N-bit charge-scaling DAC.
// This is a behavioural model of an analog block, not synthesizable logic.
//
// The converter is two binary-weighted capacitor arrays joined by a coupling
// capacitor. The lower array (K = N/2 bits, caps C/2^(K-1) .. C plus a
// terminating C/2^(K-1), total 2C) has Thevenin voltage Vref*low/2^K. The upper
// array (M = N-K bits, caps C/2^(M-1) .. C, no terminator) has Thevenin
// voltage Vref*high/(2^M - 1) and capacitance (2^M - 1)C/2^(M-1); the coupling
// capacitor Cs = 1/(2^(M-1)/C - 1/(2C)) (2C/15 for N = 8) terminates it. By
// superposition
//   vout = V_LSB / 2^M + (2^M - 1)/2^M * V_MSB = Vref * code / 2^N.
// The model evaluates exactly those array equations (ideal capacitors).
//
// Timing: while CLK is high all capacitor plates are grounded (vout = 0)
// while the next code is computed; while CLK is low the output is valid. The
// grounding switch closes T_SW after CLK rises (its control gate delay) and
// opens as CLK falls, so the output is valid over the whole low phase and
// still valid at the instant of the rising edge that ends it. T_SW is this
// model's choice; the original design gives no switch delay.
`timescale 1ns / 1ps
module ibq_charge_dac #(
  parameter int unsigned N    = ibq_pkg::IBQ_N,
  parameter real         VREF = ibq_pkg::IBQ_VREF,
  parameter real         T_SW = 1.0          // grounding switch delay, ns
) (
  input  logic         clk,
  input  logic [N-1:0] code,
  output real          vout
);

  localparam int unsigned K = N / 2;      // bits of the LSB array
  localparam int unsigned M = N - K;      // bits of the MSB array

  logic grounded_ctl;  // clock as seen by the grounding switch
  real  v_lsb, v_msb, v_valid;

  initial grounded_ctl = 1'b0;

  // Grounding switch: closes T_SW after CLK rises, opens when CLK falls.
  always @(clk) begin
    if (clk) grounded_ctl <= #(T_SW) 1'b1;
    else     grounded_ctl <= 1'b0;
  end

  always_comb begin
    v_lsb   = VREF * real'(code[K-1:0]) / real'(64'd1 << K);
    v_msb   = VREF * real'(code[N-1:K]) / real'((64'd1 << M) - 1);
    v_valid = v_lsb / real'(64'd1 << M)
            + v_msb * real'((64'd1 << M) - 1) / real'(64'd1 << M);
    vout    = (clk && grounded_ctl) ? 0.0 : v_valid;
  end

endmodule
