`timescale 1ns/1ps
// Test of the coarse phase detector against the region table of the
// design. The reference has period T = 5 ns and rises at time R; the
// coarse clock is the reference shifted so that its rising edge falls in
// the middle of region A..J (regions are T/10 wide: A..E before R, F..J
// after R). The testbench generates the three delayed reference copies
// (T/10, 2T/10, 3T/10) and the coarse clock delayed by 3T/10 from closed
// formulas of time, so no delay cell is involved. After a few cycles in
// each region updn and hold must match the table:
//   updn = 0 for A..E, 1 for F..J;  hold = 1 only in E.
// The outputs must also be registered: they change only right after a
// rising edge of coarse_d3.
module tb_coarse_pd;
  localparam real T = 5.0;
  logic coarse_d3, ref_d1, ref_d2, ref_d3, rst_n = 1'b0, updn, hold;
  int checks = 0, failures = 0;
  real shift;   // coarse edge minus reference edge, ns

  coarse_pd dut (.coarse_d3, .rst_n, .ref_d1, .ref_d2, .ref_d3, .updn, .hold);

  function automatic logic level(input real t, input real delay);
    real ph;
    ph = (t - delay) / T;
    ph = ph - $floor(ph);
    return ph < 0.5;   // high during the first half period after an edge
  endfunction

  // sample the signals every 10 ps
  real t_now;
  initial begin
    coarse_d3 = 0; ref_d1 = 0; ref_d2 = 0; ref_d3 = 0;
    forever begin
      #0.01;
      t_now  = $realtime;
      ref_d1 = level(t_now, 0.1 * T);
      ref_d2 = level(t_now, 0.2 * T);
      ref_d3 = level(t_now, 0.3 * T);
      coarse_d3 = level(t_now, 0.3 * T + shift);
    end
  end

  // outputs may only move right after a coarse_d3 rising edge
  logic updn_q, hold_q; real t_edge = -100.0;
  always @(posedge coarse_d3) t_edge = $realtime;
  always @(updn or hold) if (rst_n && $realtime - t_edge > 0.02) begin
    failures++; $display("FAIL: output changed away from a clock edge at %0t", $realtime);
  end

  initial begin
    string names = "ABCDEFGHIJ";
    bit exp_updn, exp_hold;
    shift = -2.25;
    #1 rst_n = 1'b1;
    for (int r = 0; r < 10; r++) begin
      shift = -2.25 + 0.5 * r;
      #(4 * T);
      exp_updn = (r >= 5);
      exp_hold = (r == 4);
      checks++;
      if (updn !== exp_updn || hold !== exp_hold) begin
        failures++;
        $display("FAIL: region %s updn %0b hold %0b, expected %0b %0b",
                 names.substr(r, r), updn, hold, exp_updn, exp_hold);
      end
    end
    rst_n = 1'b0; #0.05;
    checks++;
    if (updn !== 1'b0 || hold !== 1'b0) begin failures++; $display("FAIL: reset"); end
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
