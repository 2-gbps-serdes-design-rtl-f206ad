`timescale 1ps/1ps
// tx_byte: transmit side of one strobe group (Tx-byte unit).
//
// Sends a 28-bit word per system clock cycle over seven 2 Gb/s data lanes
// and one strobe lane. Lane i (0..6) serializes word bits [4i+3:4i], bit 4i
// first; the eighth Tx-bit unit serializes the fixed strobe pattern
// {D3..D0} = 0101, giving a 1 GHz strobe. In front of every Tx-bit unit a
// multiplexer chooses the regular input or `align_pattern` (all eight lanes,
// strobe included, when `align` is high); a slow pattern such as 0011 lets
// the receiver measure lane-to-strobe skew without locking to the wrong
// cycle.
//
// One duty-cycle corrector and phase generator (dcc_phase_gen), calibrated
// at start-up by its control unit (dcc_ctrl) through a random sampling unit
// (rsu), turns the system clock into CLK50 and CLK90. Each Tx-bit unit gets
// its CLK50 and CLK90 through its own pair of de-skew delay lines, both set
// by lane_tap[i], which moves the launch time of that lane. Lane 7 is the
// strobe.
//
// Timing: data, align and align_pattern change on the rising edge of
// sys_clk and are sampled by each lane's delayed CLK50 rising edge in the
// same cycle, so the total CLK50 insertion delay must stay below one clock
// period (it does with 32 taps of 25 ps). A word appears on the serial
// lanes in the clock period after it is sampled.
// The lane count, strobe generation, alignment multiplexers, per-lane
// de-skew delays and the single DCC/RSU pair follow the design's Tx-byte
// figure; the bit-to-lane mapping and the strobe pattern's bit order are
// this implementation's choices.
module tx_byte
  import serdes_pkg::*;
#(
  parameter int unsigned TAPS   = 32,
  parameter int unsigned TAP_PS = 25
) (
  input  logic                                sys_clk,       // system clock, any duty cycle 30..70 %
  input  logic                                rand_clk,      // random sampling clock
  input  logic                                rst_n,         // resets control unit and RSU
  // parallel data
  input  logic [WORD_BITS-1:0]                data,
  input  logic                                align,         // send align_pattern on every lane
  input  nibble_t                             align_pattern,
  // de-skew settings, lane 7 = strobe
  input  logic [DATA_LANES:0][$clog2(TAPS)-1:0] lane_tap,
  // DCC and phase generator calibration
  input  logic                                dcc_start,
  input  logic [RSU_CNT_BITS-1:0]             dcc_n,
  input  logic [RSU_CNT_BITS-1:0]             dcc_n_coarse,  // 0: no coarse steps
  input  logic [RSU_CNT_BITS-1:0]             dcc_tol,
  output logic                                dcc_busy,
  output logic                                dcc_done,
  output dcc_sel_e                            dcc_sel,
  output logic [$clog2(TAPS)-1:0]             dcc_tap,
  output logic [$clog2(TAPS)-1:0]             ph_tap,
  // serial lanes (to the LVDS drivers)
  output logic [DATA_LANES-1:0]               ser_data,
  output logic                                ser_strobe
);
  logic clk50, clk90;
  logic rsu_sample, rsu_ready;
  logic [RSU_CNT_BITS-1:0] rsu_n;
  logic [RSU_CNT_BITS-1:0] rsu_cnt_high, rsu_cnt_phase;
  logic [DATA_LANES:0] lane_clk50, lane_clk90, lane_ser;
  nibble_t lane_bits [DATA_LANES+1];

  dcc_phase_gen #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_dcc (
    .clk_in  (sys_clk),
    .sel     (dcc_sel),
    .dcc_tap (dcc_tap),
    .ph_tap  (ph_tap),
    .clk50   (clk50),
    .clk90   (clk90)
  );

  rsu u_rsu (
    .rand_clk  (rand_clk),
    .rst_n     (rst_n),
    .sample    (rsu_sample),
    .n         (rsu_n),
    .sig1      (clk50),
    .sig2      (clk90),
    .ready     (rsu_ready),
    .cnt_high  (rsu_cnt_high),
    .cnt_phase (rsu_cnt_phase)
  );

  dcc_ctrl #(.TAPS(TAPS)) u_ctrl (
    .rand_clk      (rand_clk),
    .rst_n         (rst_n),
    .start         (dcc_start),
    .n             (dcc_n),
    .n_coarse      (dcc_n_coarse),
    .tol           (dcc_tol),
    .rsu_sample    (rsu_sample),
    .rsu_n         (rsu_n),
    .rsu_ready     (rsu_ready),
    .rsu_cnt_high  (rsu_cnt_high),
    .rsu_cnt_phase (rsu_cnt_phase),
    .sel           (dcc_sel),
    .dcc_tap       (dcc_tap),
    .ph_tap        (ph_tap),
    .busy          (dcc_busy),
    .done          (dcc_done)
  );

  for (genvar i = 0; i <= DATA_LANES; i++) begin : g_lane
    // Alignment multiplexer: regular data (or the strobe pattern) vs. align pattern.
    if (i < DATA_LANES) begin : g_data
      assign lane_bits[i] = align ? align_pattern : data[BITS_PER_LANE*i +: BITS_PER_LANE];
    end else begin : g_strobe
      assign lane_bits[i] = align ? align_pattern : STROBE_PATTERN;
    end

    delay_line #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_dly50 (
      .din (clk50), .tap (lane_tap[i]), .dout (lane_clk50[i])
    );
    delay_line #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_dly90 (
      .din (clk90), .tap (lane_tap[i]), .dout (lane_clk90[i])
    );

    tx_bit u_tx_bit (
      .clk50   (lane_clk50[i]),
      .clk90   (lane_clk90[i]),
      .d       (lane_bits[i]),
      .ser_out (lane_ser[i])
    );
  end

  assign ser_data   = lane_ser[DATA_LANES-1:0];
  assign ser_strobe = lane_ser[DATA_LANES];
endmodule
