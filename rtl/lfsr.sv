`timescale 1ps/1ps
// lfsr: Galois linear-feedback shift register.
//
// Supplies the pseudo-random numbers that set the period of the random
// clock oscillator. One shift per rising clock edge; the default 16-bit
// register uses the maximal-length taps x^16 + x^14 + x^13 + x^11 + 1
// (period 65535). The register resets to SEED, which must not be zero.
// That an LFSR feeds the oscillator follows the design description; the
// width, polynomial and seed are this implementation's choices.
module lfsr #(
  parameter int unsigned         W    = 16,
  parameter logic [W-1:0]        TAPS = 16'hB400,   // feedback mask (bit i = x^(i+1))
  parameter logic [W-1:0]        SEED = 16'hACE1
) (
  input  logic         clk,
  input  logic         rst_n,
  output logic [W-1:0] q
);
  logic fb;

  // Galois form: shift right, XOR the mask in when the dropped bit is 1.
  assign fb = q[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= SEED;
    else        q <= (q >> 1) ^ (fb ? TAPS : '0);
  end
endmodule
