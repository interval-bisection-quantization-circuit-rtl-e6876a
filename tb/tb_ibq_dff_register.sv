// tb_ibq_dff_register -- checks that the endpoint register captures d on the
// rising edge and holds it through the rest of the cycle, first with the
// slow square-wave stimulus used to characterise the flip-flop cell, then
// with random data changed in both clock phases.
`timescale 1ns / 1ps
module tb_ibq_dff_register;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic clk = 1'b0;
  logic [N-1:0] d, q;

  ibq_dff_register #(.N(N)) dut (.clk, .d, .q);

  // Second copy for the cell stimulus: rising edges at 10, 30, 50 ... ns,
  // falling edges at 20, 40 ... ns, data a square wave of 12 ns half period.
  logic clk2 = 1'b0;
  logic [N-1:0] d2, q2;
  ibq_dff_register #(.N(N)) u_cell (.clk(clk2), .d(d2), .q(q2));

  always #5 clk = ~clk;

  initial begin
    #5000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] held;
    logic [N-1:0] d_at_edge;
    for (int t = 0; t < 200; t++) begin
      d2   = ((t / 12) % 2 == 1) ? '1 : '0;
      clk2 = ((t + 10) / 10) % 2 == 0;      // high from 10(1+2i) to 20(i+1)
      if (t % 20 == 10) d_at_edge = d2;
      #1;
      if (t >= 10 && t % 20 == 15) begin    // mid high phase after each edge
        checks++;
        if (q2 !== d_at_edge) begin failures++; $display("FAIL cell stimulus t=%0d q=%0h exp=%0h", t, q2, d_at_edge); end
      end
    end
    d = 8'h5A;
    @(posedge clk); #1;
    held = d;
    repeat (100) begin
      @(negedge clk);
      d = N'($urandom);           // change while clk is low
      #1; checks++;
      if (q !== held) begin failures++; $display("FAIL changed before edge q=%0d held=%0d", q, held); end
      @(posedge clk); #1;
      held = d;
      checks++;
      if (q !== held) begin failures++; $display("FAIL not captured q=%0d d=%0d", q, held); end
      d = ~d;                     // change while clk is high
      #1; checks++;
      if (q !== held) begin failures++; $display("FAIL changed after edge q=%0d held=%0d", q, held); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
