`timescale 1ps/1ps
// serdes_link: one strobe group of the standard-cell SerDes, transmit and
// receive halves side by side.
//
// The transmit half (tx_byte) and the receive half (rx_byte) sit on
// different chips in a real system; the LVDS output drivers, the board
// channel and the LVDS input receivers lie between tx_ser_* and rx_ser_*
// and are not part of this RTL, so the serial lanes are brought out as ports.
// Each half has its own random sampling clock (rand_clk_gen), which runs from
// time zero; the two use different LFSR seeds.
//
// Start-up, done by an external host through the configuration ports:
//   1. pulse dcc_start and wait for dcc_done: CLK50 is now at 50 % duty
//      cycle and CLK90 lags it by a quarter period;
//   2. set tx_align with a slow pattern (e.g. 0011) and, for each data lane,
//      read the receiver RSU's phase count against the strobe while moving
//      tx_lane_tap, until the strobe edges sit half a bit after the data
//      edges (Counter 3 = n/8 with a 2 ns alignment period);
//   3. send pattern 0000 (strobe quiet), pulse rx_rst_n, then clear
//      tx_align; the receiver then frames words from the first strobe edge.
// Thereafter a 28-bit word per 500 MHz clock cycle crosses the link.
// The partition and the start-up order follow the design description; the
// host's search procedure and the framing rule are this implementation's.
// Synthesis note: the random clock oscillators and the delay lines are
// behavioural models; a synthesis tool drops their delays, so it reports the
// random clock nets as undriven. In silicon a ring-oscillator cell drives
// them.
module serdes_link
  import serdes_pkg::*;
#(
  parameter int unsigned TAPS     = 32,
  parameter int unsigned TAP_PS   = 25,
  parameter int unsigned RB_DEPTH = 8
) (
  // ---------------- transmit chip ----------------
  input  logic                                      tx_sys_clk,
  input  logic                                      tx_rst_n,
  input  logic [WORD_BITS-1:0]                      tx_data,
  input  logic                                      tx_align,
  input  nibble_t                                   tx_align_pattern,
  input  logic [DATA_LANES:0][$clog2(TAPS)-1:0]     tx_lane_tap,
  input  logic                                      dcc_start,
  input  logic [RSU_CNT_BITS-1:0]                   dcc_n,
  input  logic [RSU_CNT_BITS-1:0]                   dcc_n_coarse,
  input  logic [RSU_CNT_BITS-1:0]                   dcc_tol,
  output logic                                      dcc_busy,
  output logic                                      dcc_done,
  output dcc_sel_e                                  dcc_sel,
  output logic [$clog2(TAPS)-1:0]                   dcc_tap,
  output logic [$clog2(TAPS)-1:0]                   ph_tap,
  output logic [DATA_LANES-1:0]                     tx_ser_data,    // to OLVDS drivers
  output logic                                      tx_ser_strobe,
  // ---------------- receive chip ----------------
  input  logic                                      rx_sys_clk,
  input  logic                                      rx_rst_n,
  input  logic [DATA_LANES-1:0]                     rx_ser_data,    // from ILVDS receivers
  input  logic                                      rx_ser_strobe,
  output logic [WORD_BITS-1:0]                      rx_data,
  output logic                                      rx_valid,
  input  logic [DATA_LANES-1:0]                     rx_rsu_sample,
  input  logic [RSU_CNT_BITS-1:0]                   rx_rsu_n,
  output logic [DATA_LANES-1:0]                     rx_rsu_ready,
  output logic [DATA_LANES-1:0][RSU_CNT_BITS-1:0]   rx_rsu_cnt_high,
  output logic [DATA_LANES-1:0][RSU_CNT_BITS-1:0]   rx_rsu_cnt_phase
);
  logic tx_rand_clk, rx_rand_clk;

  rand_clk_gen #(.SEED(16'hACE1)) u_tx_rclk (
    .en (1'b1), .rst_n (tx_rst_n), .rand_clk (tx_rand_clk)
  );

  rand_clk_gen #(.SEED(16'h5EED)) u_rx_rclk (
    .en (1'b1), .rst_n (rx_rst_n), .rand_clk (rx_rand_clk)
  );

  tx_byte #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_tx (
    .sys_clk       (tx_sys_clk),
    .rand_clk      (tx_rand_clk),
    .rst_n         (tx_rst_n),
    .data          (tx_data),
    .align         (tx_align),
    .align_pattern (tx_align_pattern),
    .lane_tap      (tx_lane_tap),
    .dcc_start     (dcc_start),
    .dcc_n         (dcc_n),
    .dcc_n_coarse  (dcc_n_coarse),
    .dcc_tol       (dcc_tol),
    .dcc_busy      (dcc_busy),
    .dcc_done      (dcc_done),
    .dcc_sel       (dcc_sel),
    .dcc_tap       (dcc_tap),
    .ph_tap        (ph_tap),
    .ser_data      (tx_ser_data),
    .ser_strobe    (tx_ser_strobe)
  );

  rx_byte #(.RB_DEPTH(RB_DEPTH)) u_rx (
    .sys_clk       (rx_sys_clk),
    .rand_clk      (rx_rand_clk),
    .rst_n         (rx_rst_n),
    .ser_data      (rx_ser_data),
    .ser_strobe    (rx_ser_strobe),
    .rx_data       (rx_data),
    .rx_valid      (rx_valid),
    .rsu_sample    (rx_rsu_sample),
    .rsu_n         (rx_rsu_n),
    .rsu_ready     (rx_rsu_ready),
    .rsu_cnt_high  (rx_rsu_cnt_high),
    .rsu_cnt_phase (rx_rsu_cnt_phase)
  );
endmodule
