`timescale 1ps/1ps
// tb_tx_bit: self-checking test of the 4:1 serializer.
//
// Drives an ideal 500 MHz CLK50 (50 % duty) and CLK90 (CLK50 delayed by
// 500 ps), presents a new random nibble after every rising CLK50 edge, and
// samples ser_out in the middle of each 500 ps bit slot. The nibble sampled
// at a rising edge must appear as D0, D1, D2, D3 in the four slots of the
// same clock period: four bits per 2 ns cycle, i.e. 2 Gb/s. Each slot is
// also sampled near its start and end to check the bit holds for the whole
// 500 ps.
module tb_tx_bit;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;
  localparam int unsigned NWORDS = 200;

  logic    clk50 = 1'b0, clk90 = 1'b0;
  nibble_t d;
  logic    ser_out;
  int      checks = 0, failures = 0;

  tx_bit dut (.clk50(clk50), .clk90(clk90), .d(d), .ser_out(ser_out));

  always #(PERIOD/2) clk50 = !clk50;
  always @(clk50) clk90 <= #(PERIOD/4) clk50;

  task automatic check_bit(input logic exp, input string what);
    checks++;
    if (ser_out !== exp) begin
      failures++;
      $display("FAIL %s at %0t: ser_out=%b expected %b", what, $time, ser_out, exp);
    end
  endtask

  // Driver: a new random nibble 100 ps after every rising CLK50 edge.
  initial begin
    d = nibble_t'($urandom);
    forever begin
      @(posedge clk50);
      #100 d = nibble_t'($urandom);
    end
  end

  // Independent sampler: for each word, sample 3 points in each slot.
  initial begin
    nibble_t cur;
    repeat (3) @(posedge clk50);
    for (int w = 0; w < NWORDS; w++) begin
      @(posedge clk50);
      cur = d;
      for (int k = 0; k < BITS_PER_LANE; k++) begin
        #60  check_bit(cur[k], "slot start");
        #190 check_bit(cur[k], "slot middle");
        #190 check_bit(cur[k], "slot end");
        if (k != BITS_PER_LANE - 1) #60;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(PERIOD * (NWORDS + 50));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
