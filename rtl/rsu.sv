`timescale 1ps/1ps
// rsu: Random Sampling Unit.
//
// Measures the duty cycle of sig1 and the fraction of time during which
// sig1 is high while sig2 is low, by sampling both at the edges of a random
// clock. Every toggle of `sample` (either direction) starts a measurement:
// the toggle passes two cascaded flip-flops, and their XOR gives a one-cycle
// reset pulse that loads Counter 1 with the sample size n and clears
// Counters 2 and 3. Each later random-clock edge, while Counter 1 is not zero:
//   Counter 1 decrements,
//   Counter 2 increments if the captured sig1 is high,
//   Counter 3 increments if the captured sig1 is high and sig2 is low.
// When Counter 1 reaches zero sampling stops and `ready` rises: cnt_high / n
// estimates the duty cycle of sig1, and cnt_phase / n estimates t_A / T,
// where t_A is the time per period that the leading sig1 is high and the
// lagging sig2 is low (phase = 2*pi*t_A/T). sig1 and sig2 each pass two
// flip-flops for metastability.
//
// Timing: all logic runs on rand_clk. A measurement takes n + 3 random
// clock cycles after the toggle of `sample`. Inputs other than sig1/sig2
// and sample must be stable while a measurement runs.
// The structure (two-stage synchronizers, XOR pulse, three counters with the
// enables above, 16-bit counters) follows the design's RSU schematic; the
// asynchronous reset is this implementation's addition so that the unit
// starts idle with `ready` high.
module rsu
  import serdes_pkg::*;
#(
  parameter int unsigned W = RSU_CNT_BITS   // counter width
) (
  input  logic         rand_clk,
  input  logic         rst_n,
  input  logic         sample,     // toggle to start a measurement
  input  logic [W-1:0] n,          // desired sample size
  input  logic         sig1,       // observed (leading) signal
  input  logic         sig2,       // second (lagging) signal
  output logic         ready,      // measurement finished (Counter 1 = 0)
  output logic [W-1:0] cnt_high,   // Counter 2: samples with sig1 high
  output logic [W-1:0] cnt_phase   // Counter 3: samples with sig1 high, sig2 low
);
  logic [1:0]   smp_q, s1_q, s2_q;
  logic [W-1:0] cnt_left;          // Counter 1
  logic         pulse, active;

  always_ff @(posedge rand_clk or negedge rst_n) begin
    if (!rst_n) begin
      smp_q <= '0;
      s1_q  <= '0;
      s2_q  <= '0;
    end else begin
      smp_q <= {smp_q[0], sample};
      s1_q  <= {s1_q[0], sig1};
      s2_q  <= {s2_q[0], sig2};
    end
  end

  assign pulse  = smp_q[1] ^ smp_q[0];
  assign active = (cnt_left != '0);
  assign ready  = !active;

  always_ff @(posedge rand_clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_left  <= '0;
      cnt_high  <= '0;
      cnt_phase <= '0;
    end else if (pulse) begin
      cnt_left  <= n;
      cnt_high  <= '0;
      cnt_phase <= '0;
    end else if (active) begin
      cnt_left <= cnt_left - 1'b1;
      if (s1_q[1])            cnt_high  <= cnt_high + 1'b1;
      if (s1_q[1] && !s2_q[1]) cnt_phase <= cnt_phase + 1'b1;
    end
  end
endmodule
