`timescale 1ns/1ps
// Self-checking test of the one-hot phase multiplexer: for the 10-input
// and 5-input widths, every one-hot select with random phase patterns must
// pass exactly the selected phase; an all-zero select must give 0.
module tb_phase_mux;
  logic [9:0] sel10, ph10; logic out10;
  logic [4:0] sel5,  ph5;  logic out5;
  int checks = 0, failures = 0;

  phase_mux #(.N(10)) dut10 (.sel(sel10), .phases(ph10), .clk_out(out10));
  phase_mux #(.N(5))  dut5  (.sel(sel5),  .phases(ph5),  .clk_out(out5));

  task automatic chk(input logic got, input logic exp, input string what);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL: %s got %0b exp %0b", what, got, exp); end
  endtask

  initial begin
    for (int r = 0; r < 200; r++) begin
      ph10 = 10'($urandom); ph5 = 5'($urandom);
      for (int i = 0; i < 10; i++) begin
        sel10 = 10'b1 << i; sel5 = 5'b1 << (i % 5);
        #1;
        chk(out10, ph10[i], $sformatf("10:1 sel %0d", i));
        chk(out5,  ph5[i % 5], $sformatf("5:1 sel %0d", i % 5));
      end
      sel10 = '0; sel5 = '0; #1;
      chk(out10, 1'b0, "10:1 no select");
      chk(out5,  1'b0, "5:1 no select");
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
