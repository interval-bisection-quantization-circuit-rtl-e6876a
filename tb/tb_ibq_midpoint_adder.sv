// tb_ibq_midpoint_adder -- exhaustive check of floor((l+r)/2) for the 8-bit
// adder (all 65536 operand pairs) and for 7- and 6-bit instances (odd and
// even group endings of the carry scheme), then the count-down and count-up
// sequences: repeatedly replacing R (or L) by the previous midpoint from
// [0, 255] must step 127, 63, ..., 0 (or 127, 191, ..., 254) in 8 steps.
`timescale 1ns / 1ps
module tb_ibq_midpoint_adder;
  int checks = 0, failures = 0;
  logic [7:0] l8, r8, m8;
  logic [6:0] l7, r7, m7;
  logic [5:0] l6, r6, m6;

  ibq_midpoint_adder #(.N(8)) u8 (.l(l8), .r(r8), .mid(m8));
  ibq_midpoint_adder #(.N(7)) u7 (.l(l7), .r(r7), .mid(m7));
  ibq_midpoint_adder #(.N(6)) u6 (.l(l6), .r(r6), .mid(m6));

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_dn[8] = '{127, 63, 31, 15, 7, 3, 1, 0};
    int exp_up[8] = '{127, 191, 223, 239, 247, 251, 253, 254};
    for (int a = 0; a < 256; a++)
      for (int b = 0; b < 256; b++) begin
        l8 = 8'(a); r8 = 8'(b);
        l7 = 7'(a); r7 = 7'(b);
        l6 = 6'(a); r6 = 6'(b);
        #1;
        checks++;
        if (int'(m8) != (a + b) / 2) begin
          failures++;
          if (failures < 10) $display("FAIL N=8 %0d+%0d -> %0d", a, b, m8);
        end
        if (a < 128 && b < 128) begin
          checks++;
          if (int'(m7) != (a + b) / 2) begin failures++; $display("FAIL N=7 %0d+%0d -> %0d", a, b, m7); end
        end
        if (a < 64 && b < 64) begin
          checks++;
          if (int'(m6) != (a + b) / 2) begin failures++; $display("FAIL N=6 %0d+%0d -> %0d", a, b, m6); end
        end
      end
    // Count down: right endpoint takes the previous result.
    l8 = 8'd0; r8 = 8'd255;
    for (int i = 0; i < 8; i++) begin
      #1; checks++;
      if (int'(m8) != exp_dn[i]) begin failures++; $display("FAIL count down step %0d: %0d", i, m8); end
      r8 = m8;
    end
    // Count up: left endpoint takes the previous result.
    l8 = 8'd0; r8 = 8'd255;
    for (int i = 0; i < 8; i++) begin
      #1; checks++;
      if (int'(m8) != exp_up[i]) begin failures++; $display("FAIL count up step %0d: %0d", i, m8); end
      l8 = m8;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
