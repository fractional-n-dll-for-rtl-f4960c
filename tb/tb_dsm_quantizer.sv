`timescale 1ns/1ps
// Exhaustive test of the 2-bit quantizer: for N/2 = 1..7 and every input
// -100..100 the level must follow the thresholds -N/2, 0, +N/2 and the
// feedback value must be (2q - 3) * N/2.
module tb_dsm_quantizer;
  logic signed [11:0] v, fb;
  logic [3:0] n_half;
  logic [1:0] q;
  int checks = 0, failures = 0;

  dsm_quantizer #(.W(12), .HALF_W(4)) dut (.v(v), .n_half(n_half), .q(q), .fb(fb));

  initial begin
    int eq, efb, h;
    for (h = 1; h <= 7; h++) begin
      for (int x = -100; x <= 100; x++) begin
        n_half = 4'(h); v = 12'(x);
        #1;
        eq  = (x < -h) ? 0 : (x < 0) ? 1 : (x < h) ? 2 : 3;
        efb = (2 * eq - 3) * h;
        checks++;
        if (int'(q) != eq || int'(fb) != efb) begin
          failures++;
          $display("FAIL: h=%0d v=%0d q=%0d (exp %0d) fb=%0d (exp %0d)", h, x, q, eq, fb, efb);
        end
      end
    end
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
