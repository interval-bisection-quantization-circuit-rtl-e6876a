// tb_ibq_resolution_sweep -- average conversion time against resolution.
//
// Quantizers of 4 to 12 bits run side by side, each converting every code
// 0 .. 2^N - 1 at its exact DAC voltage. For each code the number of midpoint
// tests must equal the step count of plain interval bisection on the integers
// (start at [0, 2^N - 1], test floor((L+R)/2), move the endpoint, until the
// midpoint is the code; the top code, which no midpoint reaches, takes N
// steps). The average over all codes is printed next to N, the fixed
// conversion time of a successive-approximation converter, and must be below
// it.
`timescale 1ns / 1ps
module tb_ibq_resolution_sweep;
  localparam int  NMIN = 4, NMAX = 12;
  localparam real VREF = 5.0;
  localparam time TCLK = 1000;

  int checks = 0, failures = 0;
  int done = 0;
  logic clk = 1'b0;
  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 120000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar n = NMIN; n <= NMAX; n++) begin : g_res
    logic rst = 1'b1, rdy, nrdy;
    real vin = 0.0;
    logic [n-1:0] code, mid;

    ibq_quantizer #(.N(n), .VREF(VREF)) dut (.clk, .rst, .vin, .code, .rdy, .nrdy, .mid);

    initial begin
      longint sum_tests = 0, sum_model = 0;
      int tests, lo, hi, m, steps;
      repeat (2) @(posedge clk);
      for (int c = 0; c < (1 << n); c++) begin
        // one conversion: reset cycle, then tests until RDY
        @(posedge clk);
        vin = VREF * real'(c) / real'(1 << n);
        rst = 1'b1;
        @(posedge clk);
        #1 rst = 1'b0;
        tests = 0;
        do begin
          @(posedge clk);
          #1 tests++;
        end while (!rdy && tests < 4 * n);
        // reference step count
        lo = 0; hi = (1 << n) - 1; m = (lo + hi) / 2; steps = 1;
        if (c == (1 << n) - 1) steps = n;
        else while (m != c) begin
          if (m < c) lo = m; else hi = m;
          m = (lo + hi) / 2; steps++;
        end
        checks++;
        if (int'(code) != c || tests != steps) begin
          failures++;
          $display("FAIL N=%0d code %0d: got %0d after %0d tests, expected %0d tests", n, c, code, tests, steps);
        end
        sum_tests += longint'(tests);
        sum_model += longint'(steps);
      end
      $display("N=%2d  average conversion time %7.4f tests  (bisection model %7.4f, successive approximation %0d)",
               n, real'(sum_tests) / real'(1 << n), real'(sum_model) / real'(1 << n), n);
      checks++;
      if (sum_tests != sum_model || sum_tests >= longint'(n) * longint'(1 << n)) begin
        failures++;
        $display("FAIL N=%0d average", n);
      end
      done++;
    end
  end

  initial begin
    wait (done == NMAX - NMIN + 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
