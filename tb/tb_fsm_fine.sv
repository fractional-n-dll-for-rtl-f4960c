`timescale 1ns/1ps
// Test of the fine FSM with a model of the loop. The model keeps the
// averaged ratio in tenths, x10 = 10*(P_B + 0.5) + delay_step with P_B = 9
// when adr_ctrl = 1 and 8 otherwise, and a target ratio; the coarse clock
// leads while x10 > target (hold = 1, updn = 0) and lags once x10 <=
// target (hold = 0, updn = 1). Checks:
//  * before en: delay_step = 5, adr_ctrl = trgr_ctrl = 1,
//  * after en, one step down per tick, the jump from -5 (group 1) to +5
//    with adr_ctrl and trgr_ctrl falling together, and saturation at -5
//    in group 0 (ratio 8.0),
//  * lock exactly on the first tick with hold low, delay_step frozen for
//    M_TIMER ticks, then (with the lag still present) one step back up, and
//    re-tuning when the model drifts so that the coarse clock leads again,
//  * ticks drive everything: without tick nothing changes.
module tb_fsm_fine;
  import fracn_dll_pkg::*;
  localparam int M = 8;
  logic clk = 1'b0, rst_n = 1'b0, tick = 1'b0, en = 1'b0, hold, updn;
  logic adr_ctrl, trgr_ctrl, locked, recheck;
  step_t delay_step;
  int checks = 0, failures = 0;
  int target;

  fsm_fine #(.M_TIMER(M)) dut (.clk, .rst_n, .tick, .en, .hold, .updn, .n_half(4'd5),
                               .delay_step, .adr_ctrl, .trgr_ctrl, .locked, .recheck);

  always #2.5 clk = ~clk;

  int x10;
  always_comb begin
    x10  = (adr_ctrl ? 95 : 85) + int'(delay_step);
    hold = x10 > target;
    updn = !hold;
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  task automatic do_tick;
    @(negedge clk); tick = 1'b1; @(negedge clk); tick = 1'b0;
  endtask

  initial begin
    int n;
    for (int tgt = 100; tgt >= 78; tgt -= 3) begin
      target = tgt;
      rst_n = 1'b0; en = 1'b0; @(negedge clk); rst_n = 1'b1;
      repeat (3) do_tick();
      chk(delay_step == 5 && adr_ctrl && trgr_ctrl && !locked, "idle values");
      en = 1'b1;
      do_tick();   // IDLE -> TUNE
      n = 0;
      while (!locked && n < 40) begin
        int prev_x;
        prev_x = x10;
        do_tick(); n++;
        if (!locked) begin
          if (prev_x == 80 && !adr_ctrl) chk(x10 == 80, "saturates at the end of group 0");
          else if (delay_step == 5 && !adr_ctrl && prev_x == 90)
            chk(trgr_ctrl == 0, "group switch keeps the ratio, trgr follows adr");
          else chk(x10 == prev_x - 1, $sformatf("tgt %0d: step from %0d to %0d", tgt, prev_x, x10));
        end
        chk(adr_ctrl == trgr_ctrl, "adr_ctrl and trgr_ctrl move together");
      end
      if (tgt >= 80) begin
        chk(locked, $sformatf("tgt %0d: no lock", tgt));
        chk(x10 == tgt, $sformatf("tgt %0d: locked at %0d", tgt, x10));
        // frozen for M ticks, then one step back (lag), then re-tune
        n = x10;
        repeat (M - 1) begin do_tick(); chk(x10 == n && locked, "frozen while the timer runs"); end
        do_tick();
        if (n == 100) begin
          chk(x10 == 100 && locked, "no step back beyond the top of group 1");
        end else begin
          chk(x10 == n + 1 && locked, $sformatf("tgt %0d: lag correction %0d -> %0d", tgt, n, x10));
          repeat (M - 1) do_tick();
          do_tick();   // timer end: hold now high -> TUNE
          chk(!locked, "re-tunes when the coarse clock leads again");
          do_tick();
          chk(!locked && x10 == tgt, "one step down while re-tuning");
          do_tick();
          chk(locked && x10 == tgt, "back to the lock point");
        end
        // no tick: nothing moves
        n = x10;
        repeat (50) @(negedge clk);
        chk(x10 == n, "changed without tick");
      end else begin
        chk(!locked && x10 == 80, $sformatf("tgt %0d: out of range must saturate at 8.0", tgt));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
