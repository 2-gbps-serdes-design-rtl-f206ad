`timescale 1ps/1ps
// tx_bit: 4-to-1 serializer (one Tx-bit unit).
//
// Four parallel bits d[0..3] are registered on the rising edge of CLK50
// (r_d). Bits 2 and 3 are registered again on the falling edge of CLK50
// (rt_d), so they stay stable while they are being sent in the low half of
// the cycle even though r_d already holds the next word. Three multiplexers
// whose selects are the clocks themselves form the serial stream:
//   CLK50 high, CLK90 low  -> D0      CLK50 low, CLK90 high -> D2
//   CLK50 high, CLK90 high -> D1      CLK50 low, CLK90 low  -> D3
// With a 50 % duty-cycle CLK50 and CLK90 lagging it by 90 degrees, each bit
// occupies a quarter of the clock period: 500 ps at a 500 MHz clock, i.e.
// 2 Gb/s. Latency: a word sampled at a CLK50 rising edge is on ser_out
// during the following clock period.
// The register structure and the multiplexer arrangement follow the
// design's serializer schematic and timing diagram; the port names are this
// implementation's.
module tx_bit
  import serdes_pkg::*;
(
  input  logic    clk50,    // 50 % duty-cycle clock
  input  logic    clk90,    // CLK50 delayed by a quarter period
  input  nibble_t d,        // parallel bits D0..D3
  output logic    ser_out   // serial output, D0 first
);
  nibble_t    r_d;
  logic [1:0] rt_d;         // rt_d[0] = rt-D2, rt_d[1] = rt-D3
  logic       mb0, mb1;

  always_ff @(posedge clk50) r_d <= d;
  always_ff @(negedge clk50) rt_d <= r_d[3:2];

  // Clock-selected multiplexers (MB0, MB1 and the output multiplexer).
  assign mb0     = clk90 ? r_d[1]  : r_d[0];
  assign mb1     = clk90 ? rt_d[0] : rt_d[1];
  assign ser_out = clk50 ? mb0 : mb1;
endmodule
