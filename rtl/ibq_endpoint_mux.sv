// ibq_endpoint_mux -- three-way selector in front of an endpoint register.
//
// Two transmission-gate pairs in the original cell: the first passes VH when
// the comparator output H is high and VNH when it is low; the second passes
// that result when RST is low and VRST when RST is high. The same cell is used
// on both sides of the interval, only the connections differ:
//   L side: VH = midpoint, VNH = L register, VRST = all zeros
//   R side: VH = R register, VNH = midpoint, VRST = all ones
// so the interval shrinks from below when HL = 1 and from above when HR = 0.
//
// Purely combinational; N bits wide, one cell per bit in the original layout.
`timescale 1ns / 1ps
module ibq_endpoint_mux #(
  parameter int unsigned N = ibq_pkg::IBQ_N
) (
  input  logic         h,      // comparator output H
  input  logic         rst,    // registered reset (RST)
  input  logic [N-1:0] v_h,    // passed when H is high
  input  logic [N-1:0] v_nh,   // passed when H is low
  input  logic [N-1:0] v_rst,  // passed while RST is high
  output logic [N-1:0] q
);

  logic [N-1:0] first_stage;

  always_comb begin
    first_stage = h ? v_h : v_nh;
    q           = rst ? v_rst : first_stage;
  end

endmodule
