`timescale 1ns/1ps
// Test of the FSM top (coarse FSM + fine FSM + synchronisers + fine-loop
// strobe) at its default parameters.
//  * With hold held high from reset, en must rise after exactly
//    2 (synchroniser) + 1 + HOLD_WAIT clocks.
//  * Closed loop with a model of the detector (coarse target P7, fine
//    target ratio 9.3): mux must settle on P7, then delay_step must count
//    down one step per FINE_DIV clocks (never faster) and lock at 9.3,
//    i.e. delay_step = -2 in group P8..P11.
//  * A re-check happens M_TIMER strobes after the lock.
module tb_fsm;
  import fracn_dll_pkg::*;
  localparam int HW = 16, FD = 10, MT = 100;
  logic clk = 1'b0, rst_n = 1'b0, updn_in, hold_in;
  logic [9:0] mux;
  logic en, adr_ctrl, trgr_ctrl, locked, coarse_step, recheck;
  step_t delay_step;
  int checks = 0, failures = 0;
  bit model_on = 0;

  fsm dut (.clk, .rst_n, .updn_in, .hold_in, .n_half(4'd5), .mux, .en, .delay_step,
           .adr_ctrl, .trgr_ctrl, .locked, .coarse_step, .recheck);

  always #2.5 clk = ~clk;

  function automatic int idx(input logic [9:0] v);
    for (int i = 0; i < 10; i++) if (v[i]) return i;
    return -1;
  endfunction

  // detector model: coarse target index 3 (P7), fine target ratio 93 tenths
  always_comb begin
    int d, x10;
    if (!model_on) begin
      hold_in = 1'b1; updn_in = 1'b0;
    end else begin
      d   = (3 - idx(mux) + 10) % 10;
      x10 = (adr_ctrl ? 95 : 85) + int'(delay_step);
      if (d != 0) begin hold_in = 1'b0; updn_in = (d >= 6); end
      else        begin hold_in = (x10 > 93); updn_in = !(x10 > 93); end
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    int cyc, last_change;
    step_t prev;
    // 1: synchroniser + hold counter latency
    @(negedge clk); rst_n = 1'b1;
    cyc = 0;
    while (!en && cyc < 100) begin @(posedge clk); #0.1; cyc++; end
    chk(cyc == HW + 3, $sformatf("en after %0d clocks, expected %0d", cyc, HW + 3));
    // 2: closed loop
    rst_n = 1'b0; model_on = 1; @(negedge clk); rst_n = 1'b1;
    cyc = 0; last_change = -1000; prev = delay_step;
    while (!locked && cyc < 2000) begin
      @(posedge clk); #0.1; cyc++;
      if (delay_step != prev) begin
        chk(cyc - last_change >= FD, $sformatf("fine steps %0d clocks apart", cyc - last_change));
        last_change = cyc; prev = delay_step;
      end
    end
    chk(idx(mux) == 3, $sformatf("coarse ended at P%0d", idx(mux) + 4));
    chk(locked && adr_ctrl && delay_step == -2, $sformatf("fine lock: adr %0b step %0d", adr_ctrl, delay_step));
    cyc = 0;
    while (!recheck && cyc < FD * MT + 50) begin @(posedge clk); #0.1; cyc++; end
    chk(recheck && cyc > FD * (MT - 2) && cyc <= FD * MT + 2, $sformatf("re-check after %0d clocks", cyc));
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
