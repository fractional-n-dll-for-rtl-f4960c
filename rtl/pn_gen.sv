`timescale 1ns/1ps
// Pseudo-random dither source for the delta-sigma modulator.
//
// A 24-bit Fibonacci linear-feedback shift register with taps 24, 23, 22
// and 17 (polynomial x^24 + x^23 + x^22 + x^17 + 1), which is maximal
// length: the sequence repeats after 2^24 - 1 clocks. The register shifts
// towards its LSB once per enabled clock and the LSB is the dither bit. The
// 24-bit length and the use of the LSB follow the design; the polynomial
// and the non-zero reset seed are this implementation's choice.
// Asynchronous active-low reset loads SEED.
module pn_gen #(
  parameter int unsigned        WIDTH = 24,
  parameter logic [WIDTH-1:0]   SEED  = 24'hACE1_35
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic pn,                // dither bit (LSB of the register)
  output logic [WIDTH-1:0] state  // whole register, for observation
);

  logic fb;

  // Bit i of the register holds tap (WIDTH - i) of the polynomial.
  always_comb fb = state[0] ^ state[1] ^ state[2] ^ state[7];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= SEED;
    else if (en) state <= {fb, state[WIDTH-1:1]};
  end

  always_comb pn = state[0];

endmodule
