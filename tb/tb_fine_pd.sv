`timescale 1ns/1ps
// Test of the phase-frequency detector with start-up flip-flop.
//  * While start is low, UP, DN and RDY stay low whatever the clocks do.
//  * After start rises, the first reference edge sets only RDY: the
//    feedback edge that follows it is compared with the second reference
//    edge, so with feedback 0.4 ns early DN is high for 0.4 ns plus the
//    reset delay R and UP for R, and no UP pulse answers the first
//    reference edge.
//  * With the feedback late by d the UP pulse lasts d + R and DN lasts R;
//    with it early by d the DN pulse lasts d + R and UP lasts R
//    (d = 0, 0.2, 0.7, 1.3 ns; R = 1 ns, the default minimum pulse of
//    T_REF/5 at 200 MHz). Both are low between comparisons.
module tb_fine_pd;
  localparam real T = 5.0;
  localparam real R = 1.0;  // default reset delay of the detector
  logic ref_clk = 1'b0, dll_clk = 1'b0, start = 1'b0, up, dn, rdy;
  int checks = 0, failures = 0;
  real t_up, t_dn, w_up, w_dn;
  int n_up = 0;

  fine_pd dut (.ref_clk, .dll_clk, .start, .up, .dn, .rdy);

  always @(posedge up) begin t_up = $realtime; n_up++; end
  always @(negedge up) w_up = $realtime - t_up;
  always @(posedge dn) t_dn = $realtime;
  always @(negedge dn) w_dn = $realtime - t_dn;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // one reference edge at t0 and one feedback edge at t0 + off
  task automatic pair(input real off);
    if (off >= 0) begin
      ref_clk = 1; #(off); dll_clk = 1; #(T/2 - off); ref_clk = 0; dll_clk = 0; #(T/2);
    end else begin
      dll_clk = 1; #(-off); ref_clk = 1; #(T/2 + off); ref_clk = 0; dll_clk = 0; #(T/2);
    end
  endtask

  initial begin
    real d [4] = '{0.0, 0.2, 0.7, 1.3};
    // disabled
    repeat (3) pair(0.5);
    chk(!up && !dn && !rdy && n_up == 0, "active while start is low");
    // start: first reference edge only arms RDY
    #1 start = 1;
    ref_clk = 1; #0.1;
    chk(rdy && !up, "first reference edge: RDY set, no UP");
    #(T/2 - 0.1); ref_clk = 0; #(T/2 - 0.4);
    dll_clk = 1; #0.4; ref_clk = 1; #(R + 0.01);
    chk(w_dn > 0.39 + R && w_dn < 0.41 + R, $sformatf("first comparison DN width %0.3f", w_dn));
    chk(w_up > R - 0.01 && w_up < R + 0.01, $sformatf("first comparison UP width %0.3f", w_up));
    chk(!up && !dn, "cleared after comparison");
    #(T/2 - R - 0.01); ref_clk = 0; dll_clk = 0; #(T/2);
    for (int i = 0; i < 4; i++) begin
      pair(d[i]);
      chk(w_up > d[i] + R - 0.01 && w_up < d[i] + R + 0.01, $sformatf("UP width %0.3f exp %0.3f", w_up, d[i] + R));
      chk(w_dn > R - 0.01 && w_dn < R + 0.01, $sformatf("DN width %0.3f exp %0.3f", w_dn, R));
      chk(!up && !dn, "idle after late feedback");
      pair(-d[i]);
      chk(w_dn > d[i] + R - 0.01 && w_dn < d[i] + R + 0.01, $sformatf("DN width %0.3f exp %0.3f", w_dn, d[i] + R));
      chk(w_up > R - 0.01 && w_up < R + 0.01, $sformatf("UP width %0.3f exp %0.3f", w_up, R));
      chk(!up && !dn, "idle after early feedback");
    end
    start = 0; #0.1;
    chk(!rdy && !up && !dn, "start low clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
