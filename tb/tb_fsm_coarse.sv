`timescale 1ns/1ps
// Test of the coarse FSM with a model of the phase detector.
// For every target tap t (0..9) the model answers, from the current
// selection i: hold when i = t; otherwise with d = (t - i) mod 10,
// updn = 0 (coarse clock leads, more delay needed) for d = 1..5 and
// updn = 1 (lags) for d = 6..9. Checks:
//  * mux stays one-hot and starts at P4 (bit 0),
//  * it moves one place every STEP_WAIT clocks in the right direction
//    (wrapping between P13 and P4) and reaches t in min-path steps,
//  * en rises exactly STEP_WAIT*steps + HOLD_WAIT + 1 clocks after reset
//    and mux no longer moves afterwards, even if hold falls,
//  * a hold pulse shorter than HOLD_WAIT does not raise en.
module tb_fsm_coarse;
  localparam int SW = 4, HW = 16;
  logic clk = 1'b0, rst_n = 1'b0, updn, hold, en, step;
  logic [9:0] mux;
  int checks = 0, failures = 0;
  int target;
  bit force_nohold = 0, glitch = 0;

  fsm_coarse #(.TAPS(10), .STEP_WAIT(SW), .HOLD_WAIT(HW)) dut (.clk, .rst_n, .updn, .hold, .mux, .en, .step);

  always #2.5 clk = ~clk;

  function automatic int idx(input logic [9:0] v);
    for (int i = 0; i < 10; i++) if (v[i]) return i;
    return -1;
  endfunction

  always_comb begin
    int d;
    d = (target - idx(mux) + 10) % 10;
    hold = (d == 0) && !force_nohold || glitch;
    updn = (d >= 6);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc, steps, prev, expected_en, d0;
    for (int t = 0; t < 10; t++) begin
      target = t;
      rst_n = 1'b0; @(negedge clk); @(negedge clk);
      chk(mux == 10'b1, "reset selects P4");
      rst_n = 1'b1;
      d0 = t;
      steps = (d0 <= 5) ? d0 : 10 - d0;
      expected_en = SW * steps + HW + 1;
      cyc = 0; prev = 0;
      while (!en && cyc < 200) begin
        @(posedge clk); #0.1; cyc++;
        chk($onehot(mux), "one-hot");
        if (idx(mux) != prev) begin
          chk(cyc % SW == 0, $sformatf("t=%0d moved at clock %0d", t, cyc));
          chk((idx(mux) - prev + 10) % 10 == ((d0 <= 5) ? 1 : 9), $sformatf("t=%0d wrong direction", t));
          prev = idx(mux);
        end
      end
      chk(idx(mux) == t, $sformatf("t=%0d ended at %0d", t, idx(mux)));
      chk(cyc == expected_en, $sformatf("t=%0d en after %0d clocks, expected %0d", t, cyc, expected_en));
      force_nohold = 1;
      repeat (20) @(posedge clk);
      chk(idx(mux) == t && en, "frozen after en");
      force_nohold = 0;
    end
    // short hold pulse: target far away, glitch for HW-4 clocks
    target = 5; rst_n = 1'b0; @(negedge clk); rst_n = 1'b1;
    @(negedge clk); glitch = 1; repeat (HW - 4) @(negedge clk); glitch = 0;
    repeat (3) @(negedge clk);
    chk(!en && idx(mux) == 0, "short hold must not enable the fine loop");
    repeat (60) @(negedge clk);
    chk(en && idx(mux) == 5, "recovers after short hold");
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
