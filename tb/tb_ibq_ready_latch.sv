// tb_ibq_ready_latch -- RDY must follow CONV while CLK is low and hold while
// CLK is high (S/R truth table of the NOR-gate latch). The stimulus mirrors
// the latch characterisation: a clock that is low in every other 10 us
// interval and a CONV pulse train of period 30 us starting high at 15 us,
// then random toggling within both phases.
`timescale 1ns / 1ps
module tb_ibq_ready_latch;
  int checks = 0, failures = 0;
  logic clk = 1'b0, conv = 1'b0, rdy, nrdy;
  logic model = 1'b0;

  ibq_ready_latch dut (.clk, .conv, .rdy, .nrdy);

  always #10000 clk = ~clk;                   // 10 us intervals
  initial begin                               // period 30 us, high from 15 us
    #15000;
    forever begin conv = 1'b1; #15000; conv = 1'b0; #15000; end
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: transparent while clk low
  always @(clk or conv) if (!clk) model = conv;

  int follow = 0, held = 0;
  initial begin
    #500;   // the latch has no reset: start checking once clk is low and rdy defined
    repeat (400) begin
      #500;
      checks++;
      if (rdy !== model || nrdy !== ~model) begin
        failures++;
        $display("FAIL t=%0t clk=%0b conv=%0b rdy=%0b model=%0b", $time, clk, conv, rdy, model);
      end
      if (!clk) follow++; else if (rdy != conv) held++;
    end
    checks++;
    if (held == 0) begin failures++; $display("FAIL hold phase never exercised"); end
    $display("follow samples=%0d hold-with-different-conv samples=%0d", follow, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
