// tb_ibq_reset_dff -- checks that the reset flip-flop samples RST on the
// falling clock edge only and that rst_qn is its complement.
`timescale 1ns / 1ps
module tb_ibq_reset_dff;
  int checks = 0, failures = 0;
  logic clk = 1'b1, rst = 1'b0, rst_q, rst_qn;

  ibq_reset_dff dut (.clk, .rst, .rst_q, .rst_qn);

  always #5 clk = ~clk;

  task automatic check(input logic exp, input string what);
    checks++;
    if (rst_q !== exp || rst_qn !== ~exp) begin
      failures++;
      $display("FAIL %s: rst_q=%0b expected %0b (rst_qn=%0b)", what, rst_q, exp, rst_qn);
    end
  endtask

  initial begin
    #2000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expect_q;
    @(negedge clk); #1;
    expect_q = rst;
    repeat (40) begin
      // change rst while clk is high (after a rising edge): rst_q must not move
      @(posedge clk); #1;
      rst = $urandom_range(0, 1);
      #1 check(expect_q, "hold while clk high");
      @(negedge clk); #1;
      expect_q = rst;
      check(expect_q, "capture on falling edge");
      // change rst while clk is low: must not pass before the next falling edge
      rst = ~rst;
      #1 check(expect_q, "hold while clk low");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
