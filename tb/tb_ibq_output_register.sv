// tb_ibq_output_register -- the output word must change only on a rising
// edge of RDY, take the midpoint, and take bit 0 = 1 when top_code is set.
`timescale 1ns / 1ps
module tb_ibq_output_register;
  int checks = 0, failures = 0;
  logic rdy = 1'b0, top_code = 1'b0;
  logic [7:0] mid, code;

  ibq_output_register #(.N(8)) dut (.rdy, .mid, .top_code, .code);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] exp_code;
    int tops = 0;
    mid = 8'd0;
    #1 rdy = 1'b1; #1 exp_code = 8'd0; rdy = 1'b0; #1;
    for (int i = 0; i < 200; i++) begin
      mid      = 8'($urandom);
      top_code = ($urandom_range(0, 3) == 0);
      #1 checks++;            // no edge yet: value held
      if (code !== exp_code) begin failures++; $display("FAIL changed without RDY edge"); end
      rdy = 1'b1;
      exp_code = {mid[7:1], top_code ? 1'b1 : mid[0]};
      if (top_code && !mid[0]) tops++;
      #1 checks++;
      if (code !== exp_code) begin failures++; $display("FAIL mid=%0d top=%0b code=%0d exp=%0d", mid, top_code, code, exp_code); end
      mid = ~mid;             // changes while RDY stays high: held
      #1 checks++;
      if (code !== exp_code) begin failures++; $display("FAIL changed while RDY high"); end
      rdy = 1'b0;
      #1;
    end
    checks++;
    if (tops == 0) begin failures++; $display("FAIL forced LSB never exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
