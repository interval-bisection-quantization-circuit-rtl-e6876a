// tb_ibq_comparator -- L- and R-comparator decisions against the rules
// HL = vin > vdac - LSB/2 and HR = vin > vdac + LSB/2, with inputs just
// inside and just outside the half-LSB offsets and random inputs over 0..5 V.
`timescale 1ns / 1ps
module tb_ibq_comparator;
  int checks = 0, failures = 0;
  real vin, vdac;
  logic hl, hr;
  localparam real LSB = 5.0 / 256.0;

  ibq_comparator #(.N(8), .VREF(5.0), .OFFSET_SIGN(-1)) u_l (.vin, .vdac, .h(hl));
  ibq_comparator #(.N(8), .VREF(5.0), .OFFSET_SIGN(+1)) u_r (.vin, .vdac, .h(hr));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic try(input real vi, input real vd, input logic ehl, input logic ehr);
    vin = vi; vdac = vd;
    #1 checks += 2;
    if (hl !== ehl) begin failures++; $display("FAIL HL vin=%f vdac=%f hl=%0b", vi, vd, hl); end
    if (hr !== ehr) begin failures++; $display("FAIL HR vin=%f vdac=%f hr=%0b", vi, vd, hr); end
  endtask

  initial begin
    real d;
    d = 2.5;
    try(d + 0.4 * LSB, d, 1'b1, 1'b0);   // within LSB/2 above: converged
    try(d - 0.4 * LSB, d, 1'b1, 1'b0);   // within LSB/2 below: converged
    try(d + 0.6 * LSB, d, 1'b1, 1'b1);   // above
    try(d - 0.6 * LSB, d, 1'b0, 1'b0);   // below
    try(0.0, 0.0, 1'b1, 1'b0);
    try(5.0, 5.0 - LSB, 1'b1, 1'b1);
    for (int i = 0; i < 2000; i++) begin
      vin  = 5.0 * real'($urandom_range(0, 100000)) / 100000.0;
      vdac = 5.0 * real'($urandom_range(0, 255)) / 256.0;
      try(vin, vdac, vin > vdac - LSB / 2.0, vin > vdac + LSB / 2.0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
