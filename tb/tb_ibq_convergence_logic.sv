// tb_ibq_convergence_logic -- exhaustive check over HL, HR and all 256
// midpoints: conv = HL & ~HR, or HR with the midpoint at 254/255 (upper seven
// bits set); top_code is that second term alone. A timed pulse stimulus of
// the two comparator outputs follows.
`timescale 1ns / 1ps
module tb_ibq_convergence_logic;
  int checks = 0, failures = 0;
  logic hl, hr, conv, top_code;
  logic [7:0] mid;

  ibq_convergence_logic #(.N(8)) dut (.hl, .hr, .mid, .conv, .top_code);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic e_top, e_conv;
    for (int m = 0; m < 256; m++)
      for (int c = 0; c < 4; c++) begin
        mid = 8'(m); hl = c[1]; hr = c[0];
        #1;
        e_top  = hr && (m == 254 || m == 255);
        e_conv = (hl && !hr) || e_top;
        checks += 2;
        if (top_code !== e_top) begin failures++; $display("FAIL top_code m=%0d hl=%0b hr=%0b", m, hl, hr); end
        if (conv !== e_conv)    begin failures++; $display("FAIL conv m=%0d hl=%0b hr=%0b", m, hl, hr); end
      end
    // Gate-level stimulus, one step per microsecond: HL is high in the second
    // half of each 20 us period, NHR in the second half of each 40 us period,
    // so CONV is high for 30-40 us, 70-80 us, ... From 200 us HR and the
    // seven upper midpoint bits are high, and CONV stays high.
    for (int t = 0; t < 300; t++) begin
      hl  = (t % 20) >= 10;
      hr  = (t >= 200) ? 1'b1 : !((t % 40) >= 20);
      mid = (t >= 200) ? 8'hFE : 8'h00;
      #1;
      e_conv = (t >= 200) || (((t % 20) >= 10) && ((t % 40) >= 20));
      checks++;
      if (conv !== e_conv) begin failures++; $display("FAIL gate stimulus t=%0d conv=%0b", t, conv); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
