`timescale 1ns/1ps
// Test of the 24-bit PN generator: the output bit is compared every clock
// with an independent model that numbers the taps of x^24+x^23+x^22+x^17+1
// from the output end; the register must come back to its seed after
// exactly 2^24 - 1 clocks (maximal length) and not before; the enable must
// freeze it; about half of the bits must be ones.
module tb_pn_gen;
  localparam logic [23:0] SEED = 24'hACE135;
  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0, pn;
  logic [23:0] state, model;
  int checks = 0, failures = 0;
  longint ones = 0;

  pn_gen #(.WIDTH(24), .SEED(SEED)) dut (.clk(clk), .rst_n(rst_n), .en(en), .pn(pn), .state(state));

  always #1 clk = ~clk;

  // model: sequence s[n+24] = s[n] ^ s[n+1] ^ s[n+2] ^ s[n+7], window s[n..n+23]
  function automatic logic [23:0] next_model(input logic [23:0] m);
    logic nb;
    nb = m[0] ^ m[1] ^ m[2] ^ m[7];
    return {nb, m[23:1]};
  endfunction

  initial begin
    int period;
    logic [23:0] frozen;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    model = SEED;
    @(negedge clk);
    checks++; if (state !== SEED) begin failures++; $display("FAIL: seed"); end
    // enable low: no shift
    frozen = state;
    repeat (5) @(negedge clk);
    checks++; if (state !== frozen) begin failures++; $display("FAIL: moved while disabled"); end
    en = 1'b1;
    period = 0;
    forever begin
      @(negedge clk);
      period++;
      model = next_model(model);
      if (pn) ones++;
      if (period <= 5000) begin
        checks++;
        if (pn !== model[0] || state !== model) begin
          failures++;
          if (failures < 5) $display("FAIL: step %0d pn %0b exp %0b", period, pn, model[0]);
        end
      end
      if (state == SEED) break;
      if (period > 16777215) break;
    end
    checks++;
    if (period != 16777215) begin failures++; $display("FAIL: period %0d", period); end
    checks++;
    if (ones != 8388608) begin failures++; $display("FAIL: %0d ones in one period", ones); end
    $display("period %0d, ones %0d", period, ones);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #40000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
