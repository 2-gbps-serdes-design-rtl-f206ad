`timescale 1ps/1ps
// tb_serdes_link: end-to-end test of one strobe group at its default size.
//
// The transmit and receive halves are joined by a board model: every lane
// has its own wire delay (data lanes 0..210 ps, strobe 90 ps), so without
// de-skewing some lanes would be sampled on a bit edge. The testbench acts
// as the host and runs the whole start-up, then streams data:
//   1. DCC calibration with a 40 % system clock (the corrector must stretch).
//   2. De-skew: alignment pattern 0011 on all lanes, strobe tap 20; all data
//      lane taps are swept 0..31 together and every receive RSU (n = 2048)
//      reports its lane-to-strobe phase count. Per lane the host picks, on
//      the side where the lane leads the strobe, the tap whose count is
//      closest to n/8: the strobe then lags the data by 250 ps, half a bit.
//      The chosen tap must lie within one tap of the value computed from the
//      wire delays.
//   3. Framing: pattern 0000, receiver reset, then 300 random words. They
//      must all arrive in order, one per 2 ns clock, with no gaps, after the
//      receiver has held its output until every ring buffer had data.
//   4. The system clock changes to 60 % duty; after recalibration with
//      coarse 256-sample steps first (the corrector must now chop) 300 more
//      words must arrive intact.
// It counts how often each mechanism occurred (stretch, chop, phase
// calibration, coarse measurement, alignment measurement, tap adjustment, read hold, word
// transfer) and fails if any never did.
module tb_serdes_link;
  import serdes_pkg::*;

  localparam int unsigned PERIOD  = 2000;
  localparam int unsigned NWORDS  = 300;
  localparam int unsigned STB_TAP = 20;
  localparam int          WIRE [DATA_LANES] = '{0, 35, 70, 105, 140, 175, 210};
  localparam int          WIRE_STB = 90;

  // transmit chip
  logic                             tx_sys_clk = 1'b0, tx_rst_n = 1'b1;
  logic [WORD_BITS-1:0]             tx_data = '0;
  logic                             tx_align = 1'b1;
  nibble_t                          tx_align_pattern = 4'b0000;
  logic [DATA_LANES:0][4:0]         tx_lane_tap = '0;
  logic                             dcc_start = 1'b0, dcc_busy, dcc_done;
  logic [15:0]                      dcc_n = 16'd2048, dcc_n_coarse = 16'd0, dcc_tol = 16'd40;
  dcc_sel_e                         dcc_sel;
  logic [4:0]                       dcc_tap, ph_tap;
  logic [DATA_LANES-1:0]            tx_ser_data;
  logic                             tx_ser_strobe;
  // receive chip
  logic                             rx_sys_clk = 1'b0, rx_rst_n = 1'b1;
  logic [DATA_LANES-1:0]            rx_ser_data;
  logic                             rx_ser_strobe;
  logic [WORD_BITS-1:0]             rx_data;
  logic                             rx_valid;
  logic [DATA_LANES-1:0]            rx_rsu_sample = '0, rx_rsu_ready;
  logic [15:0]                      rx_rsu_n = 16'd2048;
  logic [DATA_LANES-1:0][15:0]      rx_rsu_cnt_high, rx_rsu_cnt_phase;

  int checks = 0, failures = 0;
  int n_stretch = 0, n_chop = 0, n_phase_cal = 0, n_align_meas = 0;
  int n_tap_adjust = 0, n_read_hold = 0, n_words = 0, n_coarse = 0;

  // Coarse measurements: the control unit hands the coarse size to the RSU.
  always @(dut.u_tx.rsu_n) if (dcc_n_coarse != 0 && dut.u_tx.rsu_n == dcc_n_coarse) n_coarse++;

  serdes_link dut (
    .tx_sys_clk(tx_sys_clk), .tx_rst_n(tx_rst_n), .tx_data(tx_data),
    .tx_align(tx_align), .tx_align_pattern(tx_align_pattern), .tx_lane_tap(tx_lane_tap),
    .dcc_start(dcc_start), .dcc_n(dcc_n), .dcc_n_coarse(dcc_n_coarse), .dcc_tol(dcc_tol), .dcc_busy(dcc_busy),
    .dcc_done(dcc_done), .dcc_sel(dcc_sel), .dcc_tap(dcc_tap), .ph_tap(ph_tap),
    .tx_ser_data(tx_ser_data), .tx_ser_strobe(tx_ser_strobe),
    .rx_sys_clk(rx_sys_clk), .rx_rst_n(rx_rst_n),
    .rx_ser_data(rx_ser_data), .rx_ser_strobe(rx_ser_strobe),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .rx_rsu_sample(rx_rsu_sample), .rx_rsu_n(rx_rsu_n), .rx_rsu_ready(rx_rsu_ready),
    .rx_rsu_cnt_high(rx_rsu_cnt_high), .rx_rsu_cnt_phase(rx_rsu_cnt_phase));

  // Board: LVDS driver, wire and receiver reduced to a delay per lane.
  for (genvar i = 0; i < DATA_LANES; i++) begin : g_wire
    assign #(WIRE[i] * 1ps) rx_ser_data[i] = tx_ser_data[i];
  end
  assign #(WIRE_STB * 1ps) rx_ser_strobe = tx_ser_strobe;

  // Clocks: transmit clock with adjustable duty cycle, receive clock at the
  // same frequency and an unrelated phase.
  int tx_high_ps = 800;
  always begin
    tx_sys_clk = 1'b1; #(tx_high_ps);
    tx_sys_clk = 1'b0; #(PERIOD - tx_high_ps);
  end
  initial #1300 forever #1000 rx_sys_clk = !rx_sys_clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // ---------------------------------------------------------------- host
  task automatic calibrate(input dcc_sel_e exp_sel);
    @(posedge tx_sys_clk) dcc_start = 1'b1;
    #20000 dcc_start = 1'b0;
    wait (dcc_busy);
    wait (dcc_done);
    chk(dcc_sel == exp_sel, $sformatf("DCC source %s, expected %s", dcc_sel.name(), exp_sel.name()));
    if (dcc_sel == DCC_STRETCHED) n_stretch++;
    if (dcc_sel == DCC_CHOPPED)   n_chop++;
    if (ph_tap != '0)             n_phase_cal++;
    $display("calibrated: %s dcc_tap=%0d ph_tap=%0d", dcc_sel.name(), dcc_tap, ph_tap);
  endtask

  task automatic rx_measure();
    rx_rsu_sample = ~rx_rsu_sample;
    #100000;                      // let every RSU take the toggle
    wait (&rx_rsu_ready);
    n_align_meas++;
  endtask

  task automatic deskew();
    int cnt [DATA_LANES][32];
    int t_min, best, err, best_err, expect_tap;
    tx_align         = 1'b1;
    tx_align_pattern = 4'b0011;
    tx_lane_tap[DATA_LANES] = 5'(STB_TAP);
    for (int t = 0; t < 32; t++) begin
      for (int i = 0; i < DATA_LANES; i++) tx_lane_tap[i] = 5'(t);
      #(10 * PERIOD);
      rx_measure();
      for (int i = 0; i < DATA_LANES; i++) cnt[i][t] = int'(rx_rsu_cnt_phase[i]);
    end
    for (int i = 0; i < DATA_LANES; i++) begin
      // zero skew at the minimum count; the lane leads the strobe below it
      t_min = 0;
      for (int t = 1; t < 32; t++) if (cnt[i][t] < cnt[i][t_min]) t_min = t;
      best = 0;
      best_err = 1 << 30;
      for (int t = 0; t < t_min; t++) begin
        err = cnt[i][t] - int'(rx_rsu_n) / 8;
        if (err < 0) err = -err;
        if (err < best_err) begin best_err = err; best = t; end
      end
      tx_lane_tap[i] = 5'(best);
      if (best != 0) n_tap_adjust++;
      // strobe lag = 25*(STB_TAP - t) + WIRE_STB - WIRE[i] = 250 ps
      expect_tap = int'(STB_TAP) - 10 + (WIRE_STB - WIRE[i]) / 25;
      chk(best >= expect_tap - 1 && best <= expect_tap + 1,
          $sformatf("lane %0d de-skew tap %0d, expected about %0d", i, best, expect_tap));
      $display("lane %0d: tap %0d (zero skew at %0d)", i, best, t_min);
    end
  endtask

  // ------------------------------------------------------- data checking
  logic [WORD_BITS-1:0] words [2*NWORDS];
  int  exp_idx = 0, burst_end = 0;
  logic check_on = 1'b0, seen_first = 1'b0;
  int  gaps = 0;

  always @(posedge rx_sys_clk) begin
    #1;
    if (check_on) begin
      if (rx_valid) begin
        if (exp_idx < burst_end) begin
          chk(rx_data == words[exp_idx], $sformatf("word %0d: %h expected %h", exp_idx, rx_data, words[exp_idx]));
          if (rx_data == words[exp_idx]) n_words++;
          exp_idx++;
        end
        seen_first = 1'b1;
      end else if (!seen_first) begin
        n_read_hold++;
      end else if (exp_idx < burst_end) begin
        gaps++;
      end
    end
  end

  task automatic stream(input int first, input int count);
    // quiet lanes, reset the receiver, then send
    tx_align         = 1'b1;
    tx_align_pattern = 4'b0000;
    #(10 * PERIOD);
    rx_rst_n = 1'b0;
    #5000 rx_rst_n = 1'b1;
    #5000;
    exp_idx    = first;
    burst_end  = first + count;
    seen_first = 1'b0;
    check_on   = 1'b1;
    @(posedge tx_sys_clk);
    tx_align <= 1'b0;
    for (int k = first; k < first + count; k++) begin
      tx_data <= words[k];
      @(posedge tx_sys_clk);
    end
    tx_data <= '0;                       // idle words keep the strobe running
    #(20 * PERIOD);
    check_on = 1'b0;
    chk(exp_idx == first + count, $sformatf("%0d of %0d words received", exp_idx - first, count));
  endtask

  initial begin
    foreach (words[k]) words[k] = WORD_BITS'({$urandom, $urandom});
    #100 tx_rst_n = 1'b0; rx_rst_n = 1'b0;
    #5000 tx_rst_n = 1'b1; rx_rst_n = 1'b1;
    #5000;

    calibrate(DCC_STRETCHED);
    deskew();
    stream(0, NWORDS);

    tx_high_ps   = 1200;
    dcc_n_coarse = 16'd256;      // coarse steps first this time
    dcc_tol      = 16'd5;        // tolerance in samples of the coarse first measurement
    #(20 * PERIOD);
    calibrate(DCC_CHOPPED);
    stream(NWORDS, NWORDS);

    chk(gaps == 0, $sformatf("%0d empty cycles inside the streams", gaps));
    $display("mechanisms: stretch=%0d chop=%0d phase_cal=%0d coarse=%0d align_meas=%0d tap_adjust=%0d read_hold=%0d words=%0d",
             n_stretch, n_chop, n_phase_cal, n_coarse, n_align_meas, n_tap_adjust, n_read_hold, n_words);
    chk(n_stretch > 0,    "duty-cycle stretching happened");
    chk(n_chop > 0,       "duty-cycle chopping happened");
    chk(n_phase_cal > 0,  "CLK90 phase calibration happened");
    chk(n_coarse > 0,     "coarse-sample measurement happened");
    chk(n_align_meas > 0, "alignment-pattern skew measurement happened");
    chk(n_tap_adjust > 0, "de-skew tap adjustment happened");
    chk(n_read_hold > 0,  "ring-buffer read hold after reset happened");
    chk(n_words == 2 * NWORDS, "all words transferred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
