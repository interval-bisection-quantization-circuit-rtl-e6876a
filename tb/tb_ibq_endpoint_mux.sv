// tb_ibq_endpoint_mux -- drives the selector as the L-side and R-side cells
// are wired in the quantizer and compares with the selection rules:
// reset value while RST, else VH when H, else VNH. Random selections come
// first, then the timed square-wave stimulus used for the selector cell.
`timescale 1ns / 1ps
module tb_ibq_endpoint_mux;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic h, rst;
  logic [N-1:0] mid, lreg, rreg, lq, rq;

  // L side: H = HL, VH = midpoint, VNH = L, VRST = 0
  ibq_endpoint_mux #(.N(N)) u_l (.h, .rst, .v_h(mid), .v_nh(lreg), .v_rst('0), .q(lq));
  // R side: H = HR, VH = R, VNH = midpoint, VRST = all ones
  ibq_endpoint_mux #(.N(N)) u_r (.h, .rst, .v_h(rreg), .v_nh(mid), .v_rst('1), .q(rq));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0] el, er;
    for (int i = 0; i < 400; i++) begin
      h    = i[0];
      rst  = (i % 5 == 0);
      mid  = N'($urandom);
      lreg = N'($urandom);
      rreg = N'($urandom);
      #1;
      if (rst)    begin el = 8'h00; er = 8'hFF; end
      else if (h) begin el = mid;   er = rreg;  end
      else        begin el = lreg;  er = mid;   end
      checks += 2;
      if (lq !== el) begin failures++; $display("FAIL L h=%0b rst=%0b q=%0d exp=%0d", h, rst, lq, el); end
      if (rq !== er) begin failures++; $display("FAIL R h=%0b rst=%0b q=%0d exp=%0d", h, rst, rq, er); end
    end
    // Cell stimulus: VH and VNH are opposite square waves (10 ns half
    // period), H starts low and toggles every 50 ns, RST rises at 100 ns.
    // Expected: VNH for 0-50 ns, VH for 50-100 ns, the reset value after.
    for (int t = 0; t < 200; t++) begin
      h    = ((t / 50) % 2) == 1;
      rst  = (t >= 100);
      rreg = ((t / 10) % 2 == 1) ? '1 : '0;
      mid  = ~rreg;
      #1;
      if (t % 5 == 2) begin
        er = (t >= 100) ? '1 : (t >= 50) ? rreg : mid;
        checks++;
        if (rq !== er) begin failures++; $display("FAIL cell stimulus t=%0d q=%0h exp=%0h", t, rq, er); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
