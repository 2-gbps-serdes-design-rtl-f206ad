`timescale 1ps/1ps
// tb_tx_byte: self-checking test of the transmit side of a strobe group.
//
// The system clock is 500 MHz with a 40 % duty cycle; the random clock is
// made here from $urandom delays.
//   1. Calibration (n = 2048): the DCC must choose stretching, and the
//      strobe lane (pattern 1010) must then show high and low phases of
//      500 ps within +-80 ps, i.e. a balanced 1 GHz strobe.
//   2. Alignment pattern 0011 with lane i at tap 2*i and the strobe at tap
//      10: every lane must be a 500 MHz square wave whose rising edge is
//      exactly (2*i - 10) * 25 ps from the strobe's.
//   3. Quiet pattern 0000, then 300 random words with every tap at 5:
//      sampling each lane in the middle of each 500 ps slot, timed from the
//      strobe, must give the words back in order, four slots per 2 ns.
module tb_tx_byte;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;
  localparam int unsigned NWORDS = 300;

  logic                             sys_clk = 1'b0, rand_clk = 1'b0, rst_n = 1'b1;
  logic [WORD_BITS-1:0]             data = '0;
  logic                             align = 1'b1;
  nibble_t                          align_pattern = 4'b0000;
  logic [DATA_LANES:0][4:0]         lane_tap = '0;
  logic                             dcc_start = 1'b0, dcc_busy, dcc_done;
  logic [15:0]                      dcc_n = 16'd2048, dcc_n_coarse = 16'd0, dcc_tol = 16'd40;
  dcc_sel_e                         dcc_sel;
  logic [4:0]                       dcc_tap, ph_tap;
  logic [DATA_LANES-1:0]            ser_data;
  logic                             ser_strobe;
  logic [WORD_BITS-1:0]             words [NWORDS];
  int checks = 0, failures = 0;

  tx_byte dut (
    .sys_clk(sys_clk), .rand_clk(rand_clk), .rst_n(rst_n),
    .data(data), .align(align), .align_pattern(align_pattern), .lane_tap(lane_tap),
    .dcc_start(dcc_start), .dcc_n(dcc_n), .dcc_n_coarse(dcc_n_coarse), .dcc_tol(dcc_tol), .dcc_busy(dcc_busy),
    .dcc_done(dcc_done), .dcc_sel(dcc_sel), .dcc_tap(dcc_tap), .ph_tap(ph_tap),
    .ser_data(ser_data), .ser_strobe(ser_strobe));

  always begin
    sys_clk = 1'b1; #800;
    sys_clk = 1'b0; #1200;
  end
  always begin
    #(2000 + ($urandom % 7000));
    rand_clk = !rand_clk;
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Time of the next rising edge of lane i (i = DATA_LANES: strobe).
  task automatic next_rise(input int i, output time t);
    if (i == DATA_LANES) @(posedge ser_strobe);
    else                 @(posedge ser_data[i]);
    t = $time;
  endtask

  initial begin
    time t0, t1, t2, ts, tl;
    int  hi, lo, d;
    foreach (words[k]) words[k] = WORD_BITS'({$urandom, $urandom});
    #100 rst_n = 1'b0;
    #5000 rst_n = 1'b1;

    // 1. Duty-cycle correction and phase generation.
    @(negedge rand_clk) dcc_start = 1'b1;
    @(negedge rand_clk) dcc_start = 1'b0;
    wait (dcc_done);
    chk(dcc_sel == DCC_STRETCHED, $sformatf("40 %% clock stretched (got %s)", dcc_sel.name()));
    align = 1'b0;
    #(10 * PERIOD);
    @(posedge ser_strobe) t0 = $time;
    @(negedge ser_strobe) t1 = $time;
    @(posedge ser_strobe) t2 = $time;
    hi = int'(t1 - t0);
    lo = int'(t2 - t1);
    chk(hi >= 420 && hi <= 580, $sformatf("strobe high %0d ps", hi));
    chk(lo >= 420 && lo <= 580, $sformatf("strobe low %0d ps", lo));

    // 2. Alignment pattern and de-skew taps.
    align = 1'b1;
    align_pattern = 4'b0011;
    for (int i = 0; i < DATA_LANES; i++) lane_tap[i] = 5'(2 * i);
    lane_tap[DATA_LANES] = 5'd10;
    #(10 * PERIOD);
    for (int i = 0; i < DATA_LANES; i++) begin
      next_rise(DATA_LANES, ts);
      next_rise(i, tl);
      d = int'(tl - ts);
      if (d >= int'(PERIOD) / 2) d -= int'(PERIOD);   // lane may lead the strobe
      chk(d == (2 * i - 10) * 25, $sformatf("lane %0d offset %0d ps, expected %0d", i, d, (2 * i - 10) * 25));
      next_rise(i, t0);
      next_rise(i, t1);
      chk(t1 - t0 == PERIOD, $sformatf("lane %0d alignment period %0t", i, t1 - t0));
    end

    // 3. Quiet, then data.
    align_pattern = 4'b0000;
    lane_tap = '{default: 5'd5};
    #(10 * PERIOD);
    fork
      begin : drive
        @(posedge sys_clk);
        align <= 1'b0;
        data  <= words[0];
        for (int k = 1; k < NWORDS + 4; k++) begin
          @(posedge sys_clk);
          data <= (k < NWORDS) ? words[k] : '0;
        end
      end
      begin : sample
        time t_prev = 0;
        for (int k = 0; k < NWORDS; k++) begin
          logic [WORD_BITS-1:0] got;
          @(posedge ser_strobe);          // start of slot D0
          t0 = $time;
          if (k > 0) chk(t0 - t_prev == PERIOD, $sformatf("word %0d starts %0t after the previous", k, t0 - t_prev));
          t_prev = t0;
          for (int b = 0; b < BITS_PER_LANE; b++) begin
            #(b == 0 ? 250 : 500);
            for (int i = 0; i < DATA_LANES; i++) got[BITS_PER_LANE*i + b] = ser_data[i];
            chk(ser_strobe == STROBE_PATTERN[b], $sformatf("strobe in slot %0d", b));
          end
          chk(got == words[k], $sformatf("word %0d: %h expected %h", k, got, words[k]));
        end
      end
    join
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
