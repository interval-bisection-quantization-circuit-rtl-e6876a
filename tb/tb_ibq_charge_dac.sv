// tb_ibq_charge_dac -- checks the DAC model against Vref*code/256 for every
// code while CLK is low, the grounded output while CLK is high, that the
// output is still valid just after the rising edge (before the grounding
// switch closes), and the sixteen codes 17*i within 0.5 LSB of the printed
// transistor-level results (0.00, 0.33, 0.66, 1.00, ... 4.98 V).
`timescale 1ns / 1ps
module tb_ibq_charge_dac;
  int checks = 0, failures = 0;
  logic clk = 1'b1;
  logic [7:0] code = '0;
  real vout;
  localparam real VREF = 5.0, LSB = VREF / 256.0;
  real printed[16] = '{0.00, 0.33, 0.66, 1.00, 1.33, 1.66, 1.99, 2.32,
                       2.66, 2.99, 3.32, 3.65, 3.98, 4.32, 4.65, 4.98};

  ibq_charge_dac #(.N(8), .VREF(VREF)) dut (.clk, .code, .vout);

  function automatic real absr(real x); return x < 0.0 ? -x : x; endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 256; c++) begin
      clk = 1'b1; code = 8'(c);       // precharge phase: new code applied
      #5 checks++;
      if (vout != 0.0) begin failures++; $display("FAIL code %0d not grounded while clk high: %f", c, vout); end
      clk = 1'b0;                     // evaluation phase
      #5 checks++;
      if (absr(vout - VREF * c / 256.0) > 1e-9) begin
        failures++; $display("FAIL code %0d vout=%f exp=%f", c, vout, VREF * c / 256.0);
      end
      if (c % 17 == 0) begin
        checks++;
        if (absr(vout - printed[c / 17]) > LSB / 2.0) begin
          failures++; $display("FAIL code %0d vout=%f printed %f", c, vout, printed[c / 17]);
        end
      end
      clk = 1'b1;                     // rising edge: still valid for a moment
      #0.2 checks++;
      if (absr(vout - VREF * c / 256.0) > 1e-9) begin failures++; $display("FAIL code %0d lost at rising edge", c); end
      #2 checks++;
      if (vout != 0.0) begin failures++; $display("FAIL code %0d grounding switch did not close", c); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
