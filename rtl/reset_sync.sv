`timescale 1ns/1ps
// Reset synchroniser: asserts asynchronously, releases after two rising
// edges of clk. Used to release the delta-sigma modulator, whose clock is
// a delay-line tap, cleanly in its own clock domain.
module reset_sync (
  input  logic clk,
  input  logic arst_n,   // asynchronous active-low reset request
  output logic rst_n     // reset released synchronously to clk
);

  logic meta;

  always_ff @(posedge clk or negedge arst_n) begin
    if (!arst_n) begin
      meta  <= 1'b0;
      rst_n <= 1'b0;
    end else begin
      meta  <= 1'b1;
      rst_n <= meta;
    end
  end

endmodule
