`timescale 1ns/1ps
// End-to-end test of the fractional-N DLL at its default parameters
// (200 MHz, N = 10, 13-cell line).
//
// For each of the ten initial delay errors of the design's test table the
// reference clock is the external clock delayed by that error. The test
// resets the DLL, waits for the fine FSM to lock and then checks:
//  * the coarse selection is the tap P_N of the table (N = 4..13),
//  * the averaged division ratio X = P_B + 0.5 + delay_step/N lies within
//    0.2 of the ratio needed, X_req = N * T / error (error + T when the
//    selection wraps past one period),
//  * the coarse clock edge ends up at the reference edge: mean lag over
//    64 cycles within -75 .. +125 ps (the loop stops on the first cycle the
//    detector sees a lag, so the mean lands within about one 50 ps fine
//    step plus the modulator's jitter), and the lag varies by < 150 ps pk-pk,
//  * the control value, averaged over 32 cycles, is within 0.05 of the
//    value listed with the test case (the ideal 2*(1 - 10/X_req)),
//  * the lock is kept through a fine-timer re-check,
//  * no UP or DN pulse is shorter than T/5, the detector's minimum pulse.
// It counts how often each mechanism happened (coarse steps in both
// directions, wrap-around of the ring, hold/en hand-over, fine step, group
// switch, lock, timer re-check, PFD UP and DN pulses, all five feedback
// taps) and fails a mechanism that never happened. A watchdog ends the run.
module tb_fracn_dll;
  import fracn_dll_pkg::*;

  localparam real T = 5.0;

  logic ext_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b0;
  logic [3:0] n_half = 4'd5;
  logic [2:0] s_code = 3'd3;
  logic coarse_clk, dll_clk, en, adr_ctrl, trgr_ctrl, locked, updn, hold, up, dn;
  logic coarse_step, recheck;
  logic [9:0] mux;
  logic [4:0] mod_out;
  step_t delay_step;
  real vc, err_ns;

  int checks = 0, failures = 0;
  int n_cstep = 0, n_wrap = 0, n_cmore = 0, n_cless = 0, n_en = 0, n_fstep = 0, n_group = 0;
  int n_lock = 0, n_recheck = 0, n_up = 0, n_dn = 0;
  int n_lvl [5];

  fracn_dll dut (
    .ext_clk, .ref_clk, .rst_n, .n_half, .s_code, .coarse_clk, .dll_clk,
    .mux, .en, .delay_step, .adr_ctrl, .trgr_ctrl, .locked, .updn, .hold,
    .up, .dn, .mod_out, .coarse_step, .recheck, .vc
  );

  always #(T/2) ext_clk = ~ext_clk;
  // reference = external clock delayed by err_ns, in three stages each
  // shorter than half a period so no stage ever holds two pending edges
  logic ref_a = 1'b0, ref_b = 1'b0;
  always @(ext_clk) ref_a <= #(err_ns / 3.0) ext_clk;
  always @(ref_a)   ref_b <= #(err_ns / 3.0) ref_a;
  always @(ref_b)   ref_clk <= #(err_ns / 3.0) ref_b;

  // mechanism counters
  logic [9:0] mux_q;
  logic adr_q, locked_q, en_q;
  step_t ds_q;
  always @(posedge ref_clk) begin
    mux_q <= mux; adr_q <= adr_ctrl; locked_q <= locked; en_q <= en; ds_q <= delay_step;
    if (rst_n) begin
      if (coarse_step) n_cstep++;
      if ((mux_q[9] && mux[0]) || (mux_q[0] && mux[9])) n_wrap++;
      if (mux != mux_q && mux == {mux_q[8:0], mux_q[9]}) n_cmore++;  // towards P13
      if (mux != mux_q && mux == {mux_q[0], mux_q[9:1]}) n_cless++;  // towards P4
      if (en && !en_q) n_en++;
      if (en && delay_step < ds_q) n_fstep++;
      if (adr_q && !adr_ctrl) n_group++;
      if (locked && !locked_q) n_lock++;
      if (recheck) n_recheck++;
    end
  end
  always @(posedge up) if (rst_n) n_up++;
  always @(posedge dn) if (rst_n) n_dn++;
  // shortest UP/DN pulse: the detector's delayed clear should keep both
  // at least T/5 wide (dead-zone avoidance)
  real t_up0, t_dn0, min_pulse = 1.0e9;
  always @(posedge up) t_up0 = $realtime;
  always @(posedge dn) t_dn0 = $realtime;
  always @(negedge up) if (rst_n && $realtime - t_up0 < min_pulse) min_pulse = $realtime - t_up0;
  always @(negedge dn) if (rst_n && $realtime - t_dn0 < min_pulse) min_pulse = $realtime - t_dn0;
  always @(posedge dut.dsm_clk) if (dut.dsm_rst_n)
    for (int i = 0; i < 5; i++) if (mod_out[i]) n_lvl[i]++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  function automatic int onehot_idx(input logic [9:0] v);
    for (int i = 0; i < 10; i++) if (v[i]) return i;
    return -1;
  endfunction

  // mean lag of the coarse edge behind the reference edge over n cycles
  real lag_min_ps, lag_max_ps;
  task automatic measure_lag(input int n, output real mean_ps);
    real acc, tr, tc, d;
    acc = 0.0;
    lag_min_ps = 1.0e9;
    lag_max_ps = -1.0e9;
    for (int i = 0; i < n; i++) begin
      @(posedge ref_clk); tr = $realtime;
      @(posedge coarse_clk); tc = $realtime;
      d = tc - tr;
      if (d > T/2) d = d - T;
      acc += d;
      if (d * 1000.0 < lag_min_ps) lag_min_ps = d * 1000.0;
      if (d * 1000.0 > lag_max_ps) lag_max_ps = d * 1000.0;
    end
    mean_ps = acc / n * 1000.0;
  endtask

  real errs [10] = '{2.25, 2.75, 3.25, 3.75, 4.25, 4.75, 0.25, 0.75, 1.25, 1.75};
  // final control value listed with the test cases; it is the ideal
  // 2*(1 - 10/X) for the required ratio X
  real vtab [10] = '{-0.25, -0.2, -0.17, -0.14, -0.12, -0.11, -0.1, -0.09, -0.08, -0.07};
  int  nsel [10] = '{4, 5, 6, 7, 8, 9, 10, 11, 12, 13};

  initial begin
    real lag_ps, xhat, xreq, tot, vc_mean;
    int  cyc;
    err_ns = errs[0];
    for (int c = 0; c < 10; c++) begin
      rst_n  = 1'b0;
      err_ns = errs[c];
      repeat (4) @(posedge ext_clk);
      #0.3 rst_n = 1'b1;
      cyc = 0;
      while (!locked && cyc < 3000) begin @(posedge ref_clk); cyc++; end
      check(locked, $sformatf("case %0d: no lock", c));
      check(onehot_idx(mux) + COARSE_BASE == nsel[c],
            $sformatf("case %0d (%0.2f ns): selected P%0d, expected P%0d",
                      c, errs[c], onehot_idx(mux) + COARSE_BASE, nsel[c]));
      repeat (60) @(posedge ref_clk);
      xhat = (adr_ctrl ? 9.0 : 8.0) + 0.5 + real'(delay_step) / 10.0;
      tot  = errs[c] + ((nsel[c] * T / 10.0 > errs[c] + T / 10.0) ? T : 0.0);
      xreq = nsel[c] * T / tot;
      check(xhat - xreq < 0.2 && xreq - xhat < 0.2,
            $sformatf("case %0d: X^=%0.2f required %0.2f", c, xhat, xreq));
      measure_lag(64, lag_ps);
      check(lag_ps > -75.0 && lag_ps < 125.0,
            $sformatf("case %0d: coarse lag %0.1f ps", c, lag_ps));
      check(lag_max_ps - lag_min_ps < 150.0,
            $sformatf("case %0d: jitter %0.1f ps pk-pk", c, lag_max_ps - lag_min_ps));
      vc_mean = 0.0;
      repeat (32) begin @(posedge ref_clk); vc_mean += vc / 32.0; end
      check(vc_mean - vtab[c] < 0.05 && vtab[c] - vc_mean < 0.05,
            $sformatf("case %0d: mean vc %0.3f, listed %0.2f", c, vc_mean, vtab[c]));
      $display("case %0d: err %0.2f ns  P%0d  delay_step %0d adr %0d  X^ %0.2f (req %0.2f)  vc %0.3f  lag %0.1f ps (%0.0f..%0.0f)  lock after %0d cycles",
               c, errs[c], onehot_idx(mux) + COARSE_BASE, delay_step, adr_ctrl,
               xhat, xreq, vc_mean, lag_ps, lag_min_ps, lag_max_ps, cyc);
      if (c == 3) begin
        // stay through at least one timer re-check and verify alignment
        cyc = 0;
        while (n_recheck == 0 && cyc < 3000) begin @(posedge ref_clk); cyc++; end
        repeat (60) @(posedge ref_clk);
        measure_lag(64, lag_ps);
        check(lag_ps > -75.0 && lag_ps < 125.0,
              $sformatf("after re-check: coarse lag %0.1f ps", lag_ps));
      end
    end
    check(n_cstep > 0,   "no coarse step");
    check(n_wrap > 0,    "coarse ring never wrapped");
    check(n_cmore > 0,   "coarse ring never moved towards more delay");
    check(n_cless > 0,   "coarse ring never moved towards less delay");
    check(n_en == 10,    $sformatf("en rose %0d times, expected 10", n_en));
    check(n_fstep > 0,   "no fine step");
    check(n_group > 0,   "no switching-group change");
    check(n_lock >= 10,  "lock count");
    check(n_recheck > 0, "no fine timer re-check");
    check(n_up > 0,      "no UP pulse");
    check(n_dn > 0,      "no DN pulse");
    check(min_pulse > 0.99 * T / 5.0, $sformatf("shortest UP/DN pulse %0.3f ns, below T/5", min_pulse));
    for (int i = 0; i < 5; i++) check(n_lvl[i] > 0, $sformatf("tap P%0d never fed back", i + FINE_BASE));
    $display("shortest UP/DN pulse %0.3f ns\nmechanisms: coarse steps %0d (+%0d/-%0d), wraps %0d, en %0d, fine steps %0d, group switches %0d, locks %0d, re-checks %0d, UP %0d, DN %0d, taps P7..P11 %0d/%0d/%0d/%0d/%0d",
             min_pulse, n_cstep, n_cmore, n_cless, n_wrap, n_en, n_fstep, n_group, n_lock, n_recheck, n_up, n_dn,
             n_lvl[0], n_lvl[1], n_lvl[2], n_lvl[3], n_lvl[4]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge ext_clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
