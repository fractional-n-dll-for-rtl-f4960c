`timescale 1ns/1ps
// Test of the delay-line model: for control values -1, -0.5, 0, 0.5, 1
// (and beyond the clamp) the rising and falling edges at taps P1..P13 must
// trail the input by k * T_D with T_D = T/10 - T/20 * vc (T = 5 ns), within
// 2 ps.
module tb_vcdl;
  localparam real T = 5.0;
  logic clk = 1'b0;
  real vc = 0.0;
  logic [13:0] p;
  int checks = 0, failures = 0;
  real t_in;
  real t_tap [14];

  vcdl #(.CELLS(13), .T_REF_NS(T)) dut (.clk_in(clk), .vc(vc), .p(p));

  logic [13:0] p_q = '0;
  always @(p) begin
    for (int k = 1; k <= 13; k++) if (p[k] != p_q[k]) t_tap[k] = $realtime;
    p_q = p;
  end

  initial begin
    real vcs [7] = '{-1.0, -0.5, 0.0, 0.5, 1.0, 1.7, -3.0};
    real td, vcl;
    for (int i = 0; i < 7; i++) begin
      vc = vcs[i];
      vcl = (vc > 1.0) ? 1.0 : (vc < -1.0) ? -1.0 : vc;
      td = T / 10.0 - T / 20.0 * vcl;
      #(3 * T);
      for (int e = 0; e < 2; e++) begin
        clk = ~clk; t_in = $realtime;
        #(12.0);
        for (int k = 1; k <= 13; k++) begin
          checks++;
          if (t_tap[k] - t_in - k * td > 0.002 || t_tap[k] - t_in - k * td < -0.002) begin
            failures++;
            $display("FAIL: vc %0.2f tap %0d delay %0.3f exp %0.3f", vc, k, t_tap[k] - t_in, k * td);
          end
        end
        #(1.0);
      end
    end
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
