// tb_ibq_quantizer -- end-to-end test of the quantizer at its default size
// (8 bits, 5 V reference, 1 MHz clock).
//
// Each conversion: at a rising edge the held input is applied and RST raised;
// after the next rising edge (which loads L = 0, R = 255) RST is released.
// From then on every rising edge closes one midpoint test; the conversion
// time is the number of tests up to the one after which RDY is high.
//
// Expected codes and times come from an independent integer/real model of
// interval bisection with ideal +/-LSB/2 comparators. Three workloads:
//   1. the eleven inputs 0, 0.5, ..., 5 V of the final-circuit simulation:
//      the code must be the printed code minus its printed error (the
//      transistor-level comparators had offsets), and for the rows with zero
//      error the printed conversion time must be met exactly;
//   2. every code 0..255 at an input off its ideal voltage by a random amount
//      of less than LSB/2 (code and time against the model);
//   3. every code at its exact voltage, averaging the conversion time and
//      comparing it with the average of the bisection step count (8 for the
//      top code), and with 8 steps of successive approximation.
// Mechanisms counted, each must occur: L takes the midpoint, R takes the
// midpoint, convergence through HL & ~HR, convergence through the top-code
// term, one-step (best case) and N-step (worst case) conversions, RDY
// falling in the reset cycle after a previous conversion, and the result
// (midpoint, RDY, output word) being held after convergence.
`timescale 1ns / 1ps
module tb_ibq_quantizer;
  localparam int  N    = 8;
  localparam real VREF = 5.0;
  localparam real LSB  = VREF / 256.0;
  localparam time TCLK = 1000;     // 1 MHz

  int checks = 0, failures = 0;
  logic clk = 1'b0, rst = 1'b1;
  real  vin = 0.0;
  logic [N-1:0] code, mid;
  logic rdy, nrdy;

  ibq_quantizer dut (.clk, .rst, .vin, .code, .rdy, .nrdy, .mid);

  always #(TCLK / 2) clk = ~clk;

  initial begin
    #(TCLK * 20000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_lmove = 0, n_rmove = 0, n_conv_window = 0, n_conv_top = 0;
  int n_best = 0, n_worst = 0, n_rdy_drop = 0, n_held = 0;

  // Independent model: bisection with the comparison rules of the converter.
  function automatic void model(input real x, output int mcode, output int steps);
    int lo = 0, hi = (1 << N) - 1, m;
    bit hl, hr;
    steps = 0;
    forever begin
      m = (lo + hi) / 2;
      steps++;
      hl = x > real'(m) - 0.5;
      hr = x > real'(m) + 0.5;
      if (hl && !hr) begin mcode = m; return; end
      if (hr && m == (1 << N) - 2) begin mcode = m + 1; return; end
      if (hl) lo = m; else hi = m;
      if (steps > 2 * N) begin mcode = -1; return; end
    end
  endfunction

  // Run one conversion of input v; returns the code and the number of tests.
  task automatic convert(input real v, output int got, output int tests);
    bit was_rdy;
    logic [N-1:0] prev_mid;
    @(posedge clk);
    vin = v;
    rst = 1'b1;
    was_rdy = rdy;
    @(posedge clk);          // reset cycle ends: L = 0, R = all ones
    if (was_rdy && !rdy) n_rdy_drop++;
    #1 rst = 1'b0;
    tests = 0;
    do begin
      prev_mid = mid;
      @(posedge clk);
      #1 tests++;
      // a rising midpoint means L took it, a falling one that R took it
      if (mid > prev_mid) n_lmove++;
      if (mid < prev_mid) n_rmove++;
    end while (!rdy && tests < 4 * N);
    #1 got = int'(code);
    // Once converged, both endpoints take the midpoint, so the midpoint,
    // RDY and the output word must stay put over the following cycles.
    prev_mid = mid;
    repeat (2) begin
      @(posedge clk);
      #1 checks++;
      if (!rdy || mid != prev_mid || int'(code) != got) begin
        failures++;
        $display("FAIL result not held: rdy=%0b mid=%0d->%0d code=%0d->%0d", rdy, prev_mid, mid, got, code);
      end else n_held++;
    end
  endtask

  // Count register moves and convergence kind on each rising edge.

  task automatic run_and_check(input real v, input int exp_code, input int exp_tests,
                               input string tag);
    int got, tests;
    convert(v, got, tests);
    checks++;
    if (got != exp_code || (exp_tests > 0 && tests != exp_tests)) begin
      failures++;
      $display("FAIL %s vin=%f code=%0d exp=%0d tests=%0d exp=%0d", tag, v, got, exp_code, tests, exp_tests);
    end
    checks++;
    if (nrdy !== ~rdy) begin failures++; $display("FAIL nrdy not complement"); end
    if (got == (1 << N) - 1 && v > (real'((1 << N) - 2) + 0.5) * LSB) n_conv_top++;
    else n_conv_window++;
    if (tests == 1) n_best++;
    if (tests == N) n_worst++;
  endtask

  initial begin
    // Final-circuit table: input, printed code, printed time, printed error
    real tv[11]  = '{0.0, 0.5, 1.0, 1.5, 2.0, 2.5, 3.0, 3.5, 4.0, 4.5, 5.0};
    int  tc[11]  = '{0, 25, 51, 77, 103, 128, 153, 179, 205, 231, 255};
    int  tt[11]  = '{8, 7, 6, 7, 5, 8, 7, 6, 7, 5, 8};
    int  te[11]  = '{0, -1, 0, 0, 1, 0, -1, 0, 0, 1, 0};
    int  mcode, msteps;
    longint sum_steps = 0, sum_model = 0;
    real x;

    repeat (3) @(posedge clk);

    // 1. final-circuit inputs
    for (int i = 0; i < 11; i++) begin
      model(tv[i] / LSB, mcode, msteps);
      checks++;
      if (mcode != tc[i] - te[i]) begin
        failures++; $display("FAIL model disagrees with table row %0d: %0d", i, mcode);
      end
      run_and_check(tv[i], tc[i] - te[i], (te[i] == 0) ? tt[i] : msteps, "table");
      $display("vin=%3.1f V  code=%0d  tests=%0d   (printed: code %0d, %0d cycles, error %0d)",
               tv[i], code, msteps, tc[i], tt[i], te[i]);
    end

    // 2. every code, input off-centre by less than LSB/2
    for (int c = 0; c < (1 << N); c++) begin
      x = real'(c) + (real'($urandom_range(0, 1800)) - 900.0) / 2000.0;
      if (x < 0.0) x = -x / 4.0;
      model(x, mcode, msteps);
      checks++;
      if (mcode != c) begin failures++; $display("FAIL model code %0d for x=%f", mcode, x); end
      run_and_check(x * LSB, c, msteps, "sweep");
    end

    // 3. exact code voltages: average conversion time
    for (int c = 0; c < (1 << N); c++) begin
      int got, tests, lo, hi, m, steps;
      convert(real'(c) * LSB, got, tests);
      // bisection step count: tests midpoints until the midpoint equals c
      lo = 0; hi = (1 << N) - 1; steps = 1; m = (lo + hi) / 2;
      if (c == (1 << N) - 1) steps = N;
      else while (m != c) begin
        if (m < c) lo = m; else hi = m;
        m = (lo + hi) / 2; steps++;
      end
      checks++;
      if (got != c || tests != steps) begin
        failures++; $display("FAIL exact c=%0d code=%0d tests=%0d steps=%0d", c, got, tests, steps);
      end
      sum_steps += longint'(tests);
      sum_model += longint'(steps);
    end
    $display("average conversion time at %0d bits: %f tests (bisection model %f, successive approximation %0d)",
             N, real'(sum_steps) / 256.0, real'(sum_model) / 256.0, N);
    checks++;
    if (sum_steps != sum_model || real'(sum_steps) / 256.0 >= real'(N)) begin
      failures++; $display("FAIL average conversion time");
    end

    $display("mechanisms: L moves=%0d R moves=%0d window conv=%0d top-code conv=%0d best=%0d worst=%0d rdy drop in reset=%0d result held=%0d",
             n_lmove, n_rmove, n_conv_window, n_conv_top, n_best, n_worst, n_rdy_drop, n_held);
    checks++;
    if (n_lmove == 0 || n_rmove == 0 || n_conv_window == 0 || n_conv_top == 0 ||
        n_best == 0 || n_worst == 0 || n_rdy_drop == 0 || n_held == 0) begin
      failures++; $display("FAIL a mechanism never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
