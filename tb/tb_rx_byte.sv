`timescale 1ps/1ps
// tb_rx_byte: self-checking test of the receive side of a strobe group.
//
// The testbench plays the transmitter: seven 2 Gb/s lanes and a 1 GHz
// strobe, each lane given its own wire delay (0..120 ps) and the strobe
// 300 ps, so the strobe edges land 180..300 ps into each 500 ps bit.
//   1. Alignment: pattern 0011 on every lane and the strobe. Each lane's RSU
//      (n = 4096) must report a phase count of about n * (300 - skew) / 2000
//      (within 60 ps), and a duty count of about n / 2.
//   2. Framing: strobe and lanes low, receiver reset, then 400 random
//      words. Nothing may be read before every ring buffer holds a nibble;
//      then every word must come out in order, one per 2 ns clock cycle
//      with no gaps. Idle words follow the last so the strobe keeps running.
module tb_rx_byte;
  import serdes_pkg::*;

  localparam int unsigned NWORDS = 400;
  localparam int unsigned STB_DLY = 300;
  localparam int          SKEW [DATA_LANES] = '{0, 20, 40, 60, 80, 100, 120};

  logic                       sys_clk = 1'b0, rand_clk = 1'b0, rst_n = 1'b1;
  logic [DATA_LANES-1:0]      ideal = '0, ser_data;
  logic                       ideal_stb = 1'b0, ser_strobe;
  logic [WORD_BITS-1:0]       rx_data;
  logic                       rx_valid;
  logic [DATA_LANES-1:0]      rsu_sample = '0, rsu_ready;
  logic [15:0]                rsu_n = 16'd4096;
  logic [DATA_LANES-1:0][15:0] cnt_high, cnt_phase;
  logic [WORD_BITS-1:0]       words [NWORDS];
  int checks = 0, failures = 0, nvalid = 0, gaps = 0;

  rx_byte dut (
    .sys_clk(sys_clk), .rand_clk(rand_clk), .rst_n(rst_n),
    .ser_data(ser_data), .ser_strobe(ser_strobe),
    .rx_data(rx_data), .rx_valid(rx_valid),
    .rsu_sample(rsu_sample), .rsu_n(rsu_n), .rsu_ready(rsu_ready),
    .rsu_cnt_high(cnt_high), .rsu_cnt_phase(cnt_phase));

  // Wire delays.
  for (genvar i = 0; i < DATA_LANES; i++) begin : g_wire
    assign #(SKEW[i] * 1ps) ser_data[i] = ideal[i];
  end
  assign #(STB_DLY * 1ps) ser_strobe = ideal_stb;

  initial #700 forever #1000 sys_clk = !sys_clk;
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

  // Send one 4-bit slot group: lane i gets bits[i], the strobe gets stb.
  task automatic send(input logic [WORD_BITS-1:0] w, input nibble_t stb);
    for (int b = 0; b < BITS_PER_LANE; b++) begin
      for (int i = 0; i < DATA_LANES; i++) ideal[i] = w[BITS_PER_LANE*i + b];
      ideal_stb = stb[b];
      #500;
    end
  endtask

  function automatic logic [WORD_BITS-1:0] all_lanes(input nibble_t p);
    for (int i = 0; i < DATA_LANES; i++) all_lanes[BITS_PER_LANE*i +: BITS_PER_LANE] = p;
  endfunction

  // Output checker.
  logic in_stream = 1'b0, check_on = 1'b0;   // output is only meaningful after the framing reset
  always @(posedge sys_clk) begin
    #1;
    if (!check_on) begin
    end else if (rx_valid) begin
      if (nvalid < NWORDS)
        chk(rx_data == words[nvalid], $sformatf("word %0d: %h expected %h", nvalid, rx_data, words[nvalid]));
      nvalid++;
      in_stream = 1'b1;
    end else if (in_stream && nvalid < NWORDS) begin
      gaps++;
      $display("gap after word %0d at %0t", nvalid, $time);
    end
  end

  logic measuring = 1'b0;
  initial begin
    foreach (words[k]) words[k] = WORD_BITS'({$urandom, $urandom});
    #100 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    // 1. Alignment pattern, measure lane-to-strobe skew.
    fork
      begin
        measuring = 1'b1;
        while (measuring) send(all_lanes(4'b0011), 4'b0011);
      end
      begin
        #20000;
        rsu_sample = ~rsu_sample;
        #200000;
        wait (&rsu_ready);
        for (int i = 0; i < DATA_LANES; i++) begin
          automatic int exp_ph = 4096 * (STB_DLY - SKEW[i]) / 2000;
          chk(cnt_phase[i] > exp_ph - 123 && cnt_phase[i] < exp_ph + 123,
              $sformatf("lane %0d phase count %0d, expected about %0d", i, cnt_phase[i], exp_ph));
          chk(cnt_high[i] > 2048 - 123 && cnt_high[i] < 2048 + 123,
              $sformatf("lane %0d duty count %0d", i, cnt_high[i]));
        end
        measuring = 1'b0;
      end
    join
    // 2. Quiet lanes, reset the receiver, stream words.
    send('0, 4'b0000);
    send('0, 4'b0000);
    rst_n = 1'b0;
    #3000 rst_n = 1'b1;
    check_on = 1'b1;
    #3000;
    chk(!rx_valid, "no output before data");
    for (int k = 0; k < NWORDS; k++) send(words[k], STROBE_PATTERN);
    // A word is written on the first strobe edge of the next one: keep the
    // strobe running with idle (zero) words after the last.
    repeat (4) send('0, STROBE_PATTERN);
    send('0, 4'b0000);
    #20000;
    chk(nvalid >= NWORDS && nvalid <= NWORDS + 4,
        $sformatf("%0d words received, expected %0d plus up to 4 idle words", nvalid, NWORDS));
    chk(gaps == 0, $sformatf("%0d empty cycles inside the stream", gaps));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
