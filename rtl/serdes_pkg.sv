`timescale 1ps/1ps
// serdes_pkg: constants and types shared by the strobe-group SerDes.
//
// A strobe group carries one 28-bit parallel word per 500 MHz system clock
// over seven 2 Gb/s data lanes plus one strobe lane. Each lane serializes
// four bits per system clock cycle (4:1), so a word is 7 x 4 bits. The lane
// counts, the 4:1 ratio and the 16-bit RSU counters follow the design
// description; the strobe and alignment patterns' bit order and the
// encoding of the DCC source select are this implementation's choices.
package serdes_pkg;

  // Serialization ratio of one Tx-bit / Rx-bit unit.
  localparam int unsigned BITS_PER_LANE = 4;
  // Data lanes per strobe group (the strobe is an eighth lane).
  localparam int unsigned DATA_LANES    = 7;
  // Parallel word width carried by one strobe group.
  localparam int unsigned WORD_BITS     = BITS_PER_LANE * DATA_LANES;
  // Width of the three RSU event counters.
  localparam int unsigned RSU_CNT_BITS  = 16;

  typedef logic [BITS_PER_LANE-1:0] nibble_t;

  // Strobe pattern {D3,D2,D1,D0} = 0101: D0 = 1, D1 = 0, D2 = 1, D3 = 0, so
  // the strobe is a 1 GHz clock whose rising edges fall on bits D0 and D2.
  localparam nibble_t STROBE_PATTERN = 4'b0101;

  // Source of CLK50 in the duty-cycle corrector.
  typedef enum logic [1:0] {
    DCC_ORIGINAL  = 2'd0,  // input passed unchanged
    DCC_STRETCHED = 2'd1,  // input OR delayed input: widens the high phase
    DCC_CHOPPED   = 2'd2   // input AND delayed input: narrows the high phase
  } dcc_sel_e;

endpackage
