`timescale 1ns/1ps
// Test of the second-order delta-sigma modulator.
//  * After reset mod_out selects P10 (one-hot bit 3).
//  * Every clock mod_out is compared with a reference model written from
//    the difference equations  a1 += x - y;  y = Q(a2 + d);  a2 += a1 - y
//    (y the quantizer feedback value, d the PN dither from an independent
//    LFSR model), with the tap index q + adr_ctrl.
//  * For every input -5..+5 in both switching groups the average selected
//    tap over 4000 clocks must be 1.5 + x/10 + adr_ctrl (tap 0 = P7) within
//    0.02, i.e. the averaged ratio X = P_B + 0.5 + x/10 of the design, and
//    the selected tap must stay inside its group.
module tb_dsm_modulator;
  import fracn_dll_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0, adr_ctrl = 1'b1;
  step_t mod_in;
  logic [3:0] n_half = 4'd5;
  logic [4:0] mod_out;
  logic [1:0] level;
  int checks = 0, failures = 0;

  dsm_modulator dut (.clk, .rst_n, .mod_in, .adr_ctrl, .n_half, .mod_out, .level);

  always #2.5 clk = ~clk;

  // reference model state
  int a1, a2;
  logic [23:0] lfsr;

  function automatic int quant(input int v, input int h, output int fbv);
    int q;
    q = (v < -h) ? 0 : (v < 0) ? 1 : (v < h) ? 2 : 3;
    fbv = (2 * q - 3) * h;
    return q;
  endfunction

  function automatic int idx(input logic [4:0] oh);
    for (int i = 0; i < 5; i++) if (oh[i]) return i;
    return -1;
  endfunction

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL: %s", what); end
  endtask

  initial begin
    int q, fbv, d, h, exp_idx, sum, n;
    real mean, want;
    mod_in = 5'sd5;
    repeat (2) @(negedge clk);
    chk(mod_out == 5'b01000, "reset selects P10");
    for (int g = 1; g >= 0; g--) begin
      for (int x = -5; x <= 5; x++) begin
        rst_n = 1'b0; adr_ctrl = 1'(g); mod_in = step_t'(x);
        @(negedge clk);
        chk(mod_out == 5'b01000, "reset selects P10");
        rst_n = 1'b1;
        a1 = 0; a2 = 0; lfsr = 24'hACE135; h = int'(n_half);
        sum = 0; n = 0;
        for (int k = 0; k < 4000; k++) begin
          // model of the clock edge about to come
          d   = lfsr[0] ? 2 * h : 0;
          q   = quant(a2 + d, h, fbv);
          a1  = a1 + x - fbv;
          a2  = a2 + a1 - fbv;
          lfsr = {lfsr[0] ^ lfsr[1] ^ lfsr[2] ^ lfsr[7], lfsr[23:1]};
          exp_idx = q + g;
          @(negedge clk);
          chk($onehot(mod_out), "mod_out one-hot");
          chk(idx(mod_out) == exp_idx,
              $sformatf("x=%0d g=%0d clk %0d: tap %0d exp %0d", x, g, k, idx(mod_out), exp_idx));
          chk(idx(mod_out) >= g && idx(mod_out) <= g + 3, "tap outside group");
          sum += idx(mod_out); n++;
        end
        mean = real'(sum) / n;
        want = 1.5 + real'(x) / 10.0 + g;
        chk(mean - want < 0.02 && want - mean < 0.02,
            $sformatf("x=%0d g=%0d mean tap %0.3f want %0.3f", x, g, mean, want));
        if (x == -5 || x == 0 || x == 5)
          $display("group %0d input %0d: mean tap P%0.3f (want P%0.3f)", g, x, mean + 7.0, want + 7.0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
