`timescale 1ps/1ps
// rx_bit: 1-to-4 deserializer (one Rx-bit unit) clocked by the strobe.
//
// The received strobe is split by an equal-delay fork into stb and stb_bar.
// Data bits D0 and D2 are captured on rising stb edges (E02), D1 and D3 on
// rising stb_bar edges (E13). A second and third rank re-time them so that
// after the falling strobe edge that captures D3 all four bits are present
// at once on g:
//   F0 <= E02 @stb      F1 <= E13 @stb_bar
//   G0 <= F0  @stb_bar  G1 =  F1
//   G2 <= E02 @stb_bar  G3 =  E13
// g holds a complete nibble for one strobe period, from that falling edge to
// the next. `write` is the strobe divided by two (a toggle flip-flop on stb)
// and delayed by two more stb flip-flops; its rising edge falls in the middle
// of that window, and it clocks the nibble into the ring buffer.
//
// Framing: after rst_n is released, the first rising strobe edge must carry
// bit D0 of a word. The transmitter guarantees this by holding the strobe
// low (alignment pattern 0000) while the receiver is reset.
// Timing: strobe at 1 GHz (2 bits per strobe period), one nibble and one
// write pulse per two strobe periods; the first write rises on the third
// rising strobe edge after reset. A nibble is written on the first rising
// strobe edge of the following word, so the strobe must keep running for one
// word after the last one that is to be received.
// The flip-flop network and the divided write signal follow the design's
// Rx-bit schematic and timing diagram; the reset of the divider and the
// framing rule are this implementation's choices.
module rx_bit
  import serdes_pkg::*;
(
  input  logic    ser_in,   // serial data lane
  input  logic    strobe,   // received strobe
  input  logic    rst_n,    // asynchronous reset of the write divider
  output nibble_t g,        // deserialized bits, g[0] = D0
  output logic    write     // write clock for the ring buffer
);
  logic stb, stb_bar;
  logic e02, e13, f0, f1, g0, g2;
  logic div_q, w1;

  // Equal-delay fork.
  assign stb     = strobe;
  assign stb_bar = !strobe;

  always_ff @(posedge stb)     e02 <= ser_in;
  always_ff @(posedge stb_bar) e13 <= ser_in;
  always_ff @(posedge stb)     f0  <= e02;
  always_ff @(posedge stb_bar) f1  <= e13;
  always_ff @(posedge stb_bar) g0  <= f0;
  always_ff @(posedge stb_bar) g2  <= e02;   // F2 = E02

  assign g = {e13, g2, f1, g0};              // {G3 = F3 = E13, G2, G1 = F1, G0}

  // Write generation: divide stb by two, then two stages of delay.
  always_ff @(posedge stb or negedge rst_n) begin
    if (!rst_n) begin
      div_q <= 1'b0;
      w1    <= 1'b0;
      write <= 1'b0;
    end else begin
      div_q <= !div_q;
      w1    <= div_q;
      write <= w1;
    end
  end
endmodule
