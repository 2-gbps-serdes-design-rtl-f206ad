`timescale 1ps/1ps
// tb_rsu_accuracy: accuracy of the random sampling unit at its full size.
//
// The 16-bit RSU is run with the largest sample size its counters hold
// (n = 65535) and is clocked by the design's own random clock generator
// (LFSR-driven oscillator model), not by a testbench clock. Signal 1 is a
// 500 MHz square wave of 30, 50 or 70 % duty; signal 2 is the same wave
// delayed by 250, 500 or 700 ps. Each measurement must give
//   Counter 2 / n = duty cycle        within 1 percentage point, and
//   Counter 3 / n = t_A / period      within 1 percentage point,
// where t_A is the time signal 1 is high while signal 2 is low (the delay,
// or signal 2's low time if that is shorter),
// which is the accuracy the 16-bit counters are meant to reach. The
// expected ratios come from the stimulus settings alone. A measurement
// at n = 65535 spans about 65535 random-clock periods (about 0.45 ms of
// simulated time).
module tb_rsu_accuracy;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;     // 500 MHz observed clock, ps
  localparam int unsigned N      = 65535;    // largest 16-bit sample size

  logic        rst_n = 1'b1, en = 1'b0, sample = 1'b0;
  logic        rand_clk, ready;
  logic [15:0] cnt_high, cnt_phase;
  logic        wave = 1'b0, wave_d = 1'b0;
  int unsigned duty_ps = 1000, lag_ps = 500;
  int          checks = 0, failures = 0;

  rand_clk_gen u_rclk (.en(en), .rst_n(rst_n), .rand_clk(rand_clk));

  rsu dut (.rand_clk(rand_clk), .rst_n(rst_n), .sample(sample), .n(16'(N)),
           .sig1(wave), .sig2(wave_d), .ready(ready),
           .cnt_high(cnt_high), .cnt_phase(cnt_phase));

  // Observed signals, recomputed every 50 ps from the time within the
  // period (duty and delay are multiples of 50 ps). The grid is offset by
  // 5 ps so that no edge coincides with a random-clock edge.
  initial begin
    #5;
    forever begin
      int unsigned t;
      t      = int'(($time - 5) % PERIOD);
      wave   = (t < duty_ps);
      wave_d = (((t + PERIOD - lag_ps) % PERIOD) < duty_ps);
      #50;
    end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic measure(input int unsigned duty, input int unsigned lag);
    real got_duty, got_phase, exp_duty, exp_phase;
    duty_ps = duty;
    lag_ps  = lag;
    #(10 * PERIOD);
    sample = !sample;
    wait (ready == 1'b0);
    wait (ready == 1'b1);
    got_duty  = real'(cnt_high)  / real'(N);
    got_phase = real'(cnt_phase) / real'(N);
    exp_duty  = real'(duty) / real'(PERIOD);
    // Signal 1 high while signal 2 is still low: the delay, cut short by
    // signal 2's low time when the delay is longer (delay <= high time here).
    exp_phase = real'((lag < PERIOD - duty) ? lag : PERIOD - duty) / real'(PERIOD);
    $display("duty %0d ps lag %0d ps: duty %f (exp %f)  phase %f (exp %f)",
             duty, lag, got_duty, exp_duty, got_phase, exp_phase);
    chk(got_duty  > exp_duty  - 0.01 && got_duty  < exp_duty  + 0.01, "duty within 1 %");
    chk(got_phase > exp_phase - 0.01 && got_phase < exp_phase + 0.01, "phase within 1 %");
  endtask

  initial begin
    #(PERIOD);
    rst_n = 1'b0;                // a falling edge loads the LFSR seed
    #(5 * PERIOD);
    rst_n = 1'b1;
    en    = 1'b1;
    measure(600, 250);
    measure(1000, 500);
    measure(1400, 700);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog: three measurements need about 1.4 ms.
  initial begin
    #(64'd5_000_000_000);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
