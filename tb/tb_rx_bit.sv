`timescale 1ps/1ps
// tb_rx_bit: self-checking test of the 1:4 deserializer.
//
// Generates a 2 Gb/s serial stream (500 ps bits, D0 of each word first) and
// a 1 GHz strobe whose edges lie 250 ps into each bit, held low until the
// first word, as the transmitter sends them. Every rising edge of `write`
// must present the next transmitted nibble on g, writes must come every
// 2 ns, and the first must arrive on the third rising strobe edge.
module tb_rx_bit;
  import serdes_pkg::*;

  localparam int unsigned NWORDS = 300;

  logic    ser_in = 1'b0, strobe = 1'b0, rst_n = 1'b1;
  nibble_t g;
  logic    write;
  nibble_t words [NWORDS];
  int      checks = 0, failures = 0, nwrites = 0, stb_rises = 0;
  time     t_last_write = 0;

  rx_bit dut (.ser_in(ser_in), .strobe(strobe), .rst_n(rst_n), .g(g), .write(write));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  always @(posedge strobe) stb_rises++;

  always @(posedge write) begin
    if (nwrites == 0) chk(stb_rises == 3, $sformatf("first write on strobe edge %0d", stb_rises));
    else              chk($time - t_last_write == 2000, "write period 2 ns");
    if (nwrites < NWORDS)
      chk(g == words[nwrites], $sformatf("word %0d: g=%h expected %h", nwrites, g, words[nwrites]));
    t_last_write = $time;
    nwrites++;
  end

  initial begin
    foreach (words[i]) words[i] = nibble_t'($urandom);
    #1000 rst_n = 1'b0;
    #1000 rst_n = 1'b1;
    #5000;
    for (int w = 0; w < NWORDS + 3; w++) begin
      for (int b = 0; b < BITS_PER_LANE; b++) begin
        ser_in = (w < NWORDS) ? words[w][b] : 1'b0;
        #250 strobe = (b % 2 == 0);    // rising in D0/D2, falling in D1/D3
        #250;
      end
    end
    #5000;
    chk(nwrites >= NWORDS, $sformatf("%0d writes for %0d words", nwrites, NWORDS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
