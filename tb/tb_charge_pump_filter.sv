`timescale 1ns/1ps
// Test of the charge-pump and loop-filter model.
//  * A 1 ns UP pulse with S = 3 moves the charge I_CP * 1 ns, I_CP =
//    0.2 * 3 * 198 uA = 118.8 uA, onto C1 + C2 = 6.95 pF: after settling
//    the control voltage is 17.09 mV and vc = 17.09 mV * 1 ns/V / 0.25 ns.
//  * Right after the pulse the control node has not yet followed: the
//    pole 1/(R C2) delays it (v2 below half its final value 0.5 ns later).
//  * A DN pulse of the same width brings it back to 0; S = 1 gives a third
//    of the step; UP and DN together cancel; vc clamps at +1; reset
//    returns to 0.
module tb_charge_pump_filter;
  logic rst_n = 1'b0, up = 1'b0, dn = 1'b0;
  logic [2:0] s_code = 3'd3;
  real vc, v2;
  int checks = 0, failures = 0;

  charge_pump_filter dut (.rst_n, .up, .dn, .s_code, .vc, .v2_v(v2));

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // an event without charge, so the model updates after a quiet interval
  task automatic settle;
    #200; up = 1'b1; dn = 1'b1; #0.001; up = 1'b0; dn = 1'b0; #0.001;
  endtask

  task automatic pulse_up(input real w);
    up = 1'b1; #(w); up = 1'b0;
  endtask
  task automatic pulse_dn(input real w);
    dn = 1'b1; #(w); dn = 1'b0;
  endtask

  function automatic bit near(input real a, input real b, input real tol);
    return (a - b < tol) && (b - a < tol);
  endfunction

  initial begin
    real vstep;
    vstep = 0.2 * 3.0 * 198.0 * 1.0 / (5.0 + 1.95) * 1.0e-3;
    #1 rst_n = 1'b1;
    #10;
    pulse_up(1.0);
    #0.5; up = 1'b1; dn = 1'b1; #0.001; up = 1'b0; dn = 1'b0; #0.001;
    chk(v2 < 0.5 * vstep, $sformatf("control node follows too fast: %0.4f", v2));
    settle();
    chk(near(v2, vstep, 1e-5), $sformatf("UP step %0.5f V exp %0.5f", v2, vstep));
    chk(near(vc, vstep / 0.25, 1e-4), $sformatf("vc %0.5f exp %0.5f", vc, vstep / 0.25));
    pulse_dn(1.0); settle();
    chk(near(v2, 0.0, 1e-5), $sformatf("after DN %0.5f", v2));
    s_code = 3'd1;
    pulse_up(1.0); settle();
    chk(near(v2, vstep / 3.0, 1e-5), $sformatf("S=1 step %0.5f exp %0.5f", v2, vstep / 3.0));
    up = 1'b1; dn = 1'b1; #2; up = 1'b0; dn = 1'b0; settle();
    chk(near(v2, vstep / 3.0, 1e-5), "UP and DN together must cancel");
    s_code = 3'd7;
    repeat (20) begin pulse_up(2.0); #3; end
    settle();
    chk(vc == 1.0, $sformatf("clamp: vc %0.3f", vc));
    rst_n = 1'b0; #1;
    chk(vc == 0.0, "reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
