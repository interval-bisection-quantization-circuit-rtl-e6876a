// ibq_midpoint_adder -- addition and division by two: mid = floor((l + r) / 2).
//
// The sum of the two endpoints needs N+1 bits; dividing by two keeps the upper
// N of them. So sum bit 0 is never formed, and the final carry out becomes the
// MSB of the midpoint. Bit 0 therefore only contributes its generate signal.
//
// Carries use the two-bit "super-carry" scheme (bit indices below are 0-based;
// bit 0 is the LSB):
//   p[i] = l[i] | r[i]            propagate
//   g[i] = l[i] & r[i]            generate
//   C(1) = g[1] | p[1] g[0]       first super-carry (no carry into bit 0)
//   C(i) = g[i] | p[i] g[i-1] | p[i] p[i-1] C(i-2)    for odd i >= 3
//   c(i) = g[i] | p[i] C(i-1)     own carry of even bits i >= 2
// A super-carry closes every pair of bits (1..2, 3..4, ...), the even bit
// inside the next pair makes its own carry from the previous super-carry, and
// the carry out of the last bit is the midpoint MSB. Every sum bit is the
// three-input parity of l, r and its carry in (the adder cell truth table).
// For odd N the last group is a single bit closed by its own carry gate.
//
// Purely combinational. The structure and the equations follow the original design;
// the generic N is this design's (the original is 8 bits).
`timescale 1ns / 1ps
module ibq_midpoint_adder #(
  parameter int unsigned N = ibq_pkg::IBQ_N
) (
  input  logic [N-1:0] l,
  input  logic [N-1:0] r,
  output logic [N-1:0] mid
);

  logic [N-1:0] p, g;
  logic [N-1:0] cout;   // carry out of each bit (super-carry for odd bits)
  logic [N-1:1] sum;    // sum bits; bit 0 is never formed

  always_comb begin
    p       = l | r;
    g       = l & r;
    cout    = '0;
    sum     = '0;
    cout[0] = g[0];
    for (int unsigned i = 1; i < N; i++) begin
      // Adder cell: Y = C'(LR' + L'R) + C(L'R' + LR)
      sum[i] = l[i] ^ r[i] ^ cout[i-1];
      if (i % 2 == 1) begin
        if (i == 1) cout[i] = g[1] | (p[1] & g[0]);
        else        cout[i] = g[i] | (p[i] & g[i-1]) | (p[i] & p[i-1] & cout[i-2]);
      end else begin
        cout[i] = g[i] | (p[i] & cout[i-1]);
      end
    end
    mid = {cout[N-1], sum[N-1:1]};
  end

endmodule
