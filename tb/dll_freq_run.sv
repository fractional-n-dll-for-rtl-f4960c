`timescale 1ns/1ps
// Test helper: runs the DLL at one operating point (reference period,
// analog settings, fine resolution N = 2*NH) through a set of initial
// delay errors and checks coarse selection and final alignment.
// The delay errors are the 200 MHz test-table cases scaled to the period
// (error/T = 0.45, 0.55, ..., 0.35), so the expected coarse tap is the
// same as in that table. The averaged ratio X^ = P_B + 0.5 + delay_step/N
// must lie within 0.2 of the ratio the error needs. Alignment tolerances scale with T: mean lag of
// the coarse edge behind the reference -1.5% .. +2.5% of T. The pk-pk
// variation must stay below 4% of T scaled by N/10 for coarse tap P_N,
// because control-voltage ripple moves every one of the N cells in the
// coarse path. The mean lag is checked again after the fine FSM's first
// periodic re-check. Results are reported through the output ports.
module dll_freq_run #(
  parameter real         T_NS   = 10.0,
  parameter real         ISS    = 74.4,
  parameter real         R_K    = 18.6,
  parameter real         KDL    = 6.67,
  parameter logic [2:0]  S      = 3'd2,
  parameter logic [3:0]  NH     = 4'd5,   // N/2: fine steps per cell / 2
  parameter string       LABEL  = "100 MHz"
) (
  output int checks,
  output int failures,
  output bit done
);
  import fracn_dll_pkg::*;

  logic ext_clk = 1'b0, ref_clk = 1'b0, rst_n = 1'b0;
  logic coarse_clk, dll_clk, en, adr_ctrl, trgr_ctrl, locked, updn, hold, up, dn;
  logic coarse_step, recheck;
  logic [9:0] mux;
  logic [4:0] mod_out;
  step_t delay_step;
  real vc, err_ns;

  fracn_dll #(.T_REF_NS(T_NS), .ISS_UA(ISS), .R_KOHM(R_K), .KDL_NS_V(KDL)) dut (
    .ext_clk, .ref_clk, .rst_n, .n_half(NH), .s_code(S), .coarse_clk, .dll_clk,
    .mux, .en, .delay_step, .adr_ctrl, .trgr_ctrl, .locked, .updn, .hold,
    .up, .dn, .mod_out, .coarse_step, .recheck, .vc
  );

  always #(T_NS / 2) ext_clk = ~ext_clk;
  logic ref_a = 1'b0, ref_b = 1'b0;
  always @(ext_clk) ref_a <= #(err_ns / 3.0) ext_clk;
  always @(ref_a)   ref_b <= #(err_ns / 3.0) ref_a;
  always @(ref_b)   ref_clk <= #(err_ns / 3.0) ref_b;

  function automatic int onehot_idx(input logic [9:0] v);
    for (int i = 0; i < 10; i++) if (v[i]) return i;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s: %s", LABEL, what); end
  endtask

  real fr [10] = '{0.45, 0.55, 0.65, 0.75, 0.85, 0.95, 0.05, 0.15, 0.25, 0.35};
  int  nsel [10] = '{4, 5, 6, 7, 8, 9, 10, 11, 12, 13};

  // mean, min and max lag of the coarse edge behind the reference edge
  // over 64 cycles
  task automatic measure(output real mean, output real lo, output real hi);
    real acc, tr, tc, d;
    acc = 0.0; lo = 1.0e9; hi = -1.0e9;
    for (int i = 0; i < 64; i++) begin
      @(posedge ref_clk); tr = $realtime;
      @(posedge coarse_clk); tc = $realtime;
      d = tc - tr;
      if (d > T_NS / 2) d = d - T_NS;
      acc += d;
      if (d < lo) lo = d;
      if (d > hi) hi = d;
    end
    mean = acc / 64.0;
  endtask

  initial begin
    real mean, lo, hi, xhat, xreq, tot;
    int cyc;
    checks = 0; failures = 0; done = 0;
    err_ns = fr[0] * T_NS;
    for (int c = 0; c < 10; c += 3) begin
      rst_n = 1'b0; err_ns = fr[c] * T_NS;
      repeat (4) @(posedge ext_clk);
      #(0.06 * T_NS) rst_n = 1'b1;
      cyc = 0;
      while (!locked && cyc < 3000) begin @(posedge ref_clk); cyc++; end
      chk(locked, $sformatf("case %0d no lock", c));
      chk(onehot_idx(mux) + 4 == nsel[c], $sformatf("case %0d selected P%0d, expected P%0d",
                                                     c, onehot_idx(mux) + 4, nsel[c]));
      xhat = (adr_ctrl ? 9.0 : 8.0) + 0.5 + real'(delay_step) / real'(2 * NH);
      tot  = err_ns + ((nsel[c] * T_NS / 10.0 > err_ns + T_NS / 10.0) ? T_NS : 0.0);
      xreq = nsel[c] * T_NS / tot;
      chk(xhat - xreq < 0.2 && xreq - xhat < 0.2,
          $sformatf("case %0d X^ %0.3f, required %0.3f", c, xhat, xreq));
      repeat (60) @(posedge ref_clk);
      measure(mean, lo, hi);
      chk(mean > -0.015 * T_NS && mean < 0.025 * T_NS, $sformatf("case %0d mean lag %0.3f ns", c, mean));
      chk(hi - lo < 0.004 * T_NS * nsel[c], $sformatf("case %0d jitter %0.3f ns pk-pk", c, hi - lo));
      $display("%s N=%0d case %0d: err %0.2f ns  P%0d  delay_step %0d adr %0d  X^ %0.2f (req %0.2f)  vc %0.3f  lag %0.1f ps (%0.0f..%0.0f)  lock after %0d cycles",
               LABEL, 2 * NH, c, err_ns, onehot_idx(mux) + 4, delay_step, adr_ctrl, xhat, xreq, vc,
               mean * 1000.0, lo * 1000.0, hi * 1000.0, cyc);
      // the fine FSM's periodic re-check resumes tuning if the coarse
      // clock still leads; the alignment must hold (or improve) after it
      cyc = 0;
      while (!recheck && cyc < 20000) begin @(posedge ref_clk); cyc++; end
      chk(recheck, $sformatf("case %0d no re-check", c));
      repeat (300) @(posedge ref_clk);
      measure(mean, lo, hi);
      chk(mean > -0.015 * T_NS && mean < 0.025 * T_NS, $sformatf("case %0d after re-check: mean lag %0.3f ns", c, mean));
      $display("%s N=%0d case %0d after re-check: delay_step %0d adr %0d  lag %0.1f ps",
               LABEL, 2 * NH, c, delay_step, adr_ctrl, mean * 1000.0);
    end
    done = 1;
  end
endmodule
