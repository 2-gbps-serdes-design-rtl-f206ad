`timescale 1ps/1ps
// tb_rsu: self-checking test of the random sampling unit.
//
// The random clock is made here from $urandom delays (2.0 to 9.0 ns per
// half period), independent of the design's own oscillator. Checks:
//   * constant inputs give exact counts (sig1=1, sig2=0: both counters = n;
//     sig1=0: both 0; sig1=1, sig2=1: Counter 3 = 0);
//   * `ready` rises exactly n+2 random-clock edges after `sample` toggles;
//   * for 500 MHz square waves with duty cycles of 30/50/70 % and sig2
//     lagging sig1 by 200..600 ps, Counter 2 / n matches the duty cycle and
//     Counter 3 / n matches lag / period within 3 percentage points
//     (n = 4096 gives a standard deviation below 0.8 points).
module tb_rsu;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;

  logic        rand_clk = 1'b0, rst_n = 1'b1, sample = 1'b0;
  logic [15:0] n = 16'd16;
  logic        sig1, sig2, ready;
  logic [15:0] cnt_high, cnt_phase;
  int          checks = 0, failures = 0;

  // Stimulus selection.
  logic        use_wave = 1'b0;
  logic        c1 = 1'b0, c2 = 1'b0;
  int unsigned duty_ps = 1000, lag_ps = 500;
  logic        wave = 1'b0, wave_d;

  rsu dut (.rand_clk(rand_clk), .rst_n(rst_n), .sample(sample), .n(n),
           .sig1(sig1), .sig2(sig2), .ready(ready),
           .cnt_high(cnt_high), .cnt_phase(cnt_phase));

  always begin
    #(2000 + ($urandom % 7000));
    rand_clk = !rand_clk;
  end

  always begin
    wave = 1'b1; #(duty_ps);
    wave = 1'b0; #(PERIOD - duty_ps);
  end
  always @(wave) wave_d <= #(lag_ps) wave;

  assign sig1 = use_wave ? wave   : c1;
  assign sig2 = use_wave ? wave_d : c2;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t high=%0d phase=%0d n=%0d)", what, $time, cnt_high, cnt_phase, n);
    end
  endtask

  // Toggle sample and count random-clock edges until ready.
  task automatic measure(output int edges);
    @(negedge rand_clk);
    sample = !sample;
    edges = 0;
    do begin
      @(posedge rand_clk);
      edges++;
      #1;
    end while (!(ready && edges > 2) && edges < 100000);
  endtask

  initial begin
    int e;
    int hi_exp, ph_exp;
    #100 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    chk(ready, "ready after reset");

    // Exact counts with constant inputs.
    n = 16'd100; c1 = 1'b1; c2 = 1'b0;
    measure(e);
    chk(e == 102, $sformatf("ready after n+2 edges (got %0d)", e));
    chk(cnt_high == 16'd100 && cnt_phase == 16'd100, "sig1=1 sig2=0 counts");
    c2 = 1'b1;
    measure(e);
    chk(cnt_high == 16'd100 && cnt_phase == 16'd0, "sig1=1 sig2=1 counts");
    c1 = 1'b0; c2 = 1'b0;
    n = 16'd37;
    measure(e);
    chk(e == 39, "ready after n+2 edges, n=37");
    chk(cnt_high == 16'd0 && cnt_phase == 16'd0, "sig1=0 counts");

    // Statistical measurements.
    use_wave = 1'b1;
    n = 16'd4096;
    for (int d = 0; d < 3; d++) begin
      for (int l = 0; l < 3; l++) begin
        duty_ps = 600 + 400 * d;
        lag_ps  = 200 + 200 * l;
        #(4 * PERIOD);
        measure(e);
        hi_exp = 4096 * duty_ps / PERIOD;
        ph_exp = 4096 * lag_ps / PERIOD;
        chk(cnt_high  > hi_exp - 123 && cnt_high  < hi_exp + 123,
            $sformatf("duty %0d ps: Counter 2 = %0d, expected about %0d", duty_ps, cnt_high, hi_exp));
        chk(cnt_phase > ph_exp - 123 && cnt_phase < ph_exp + 123,
            $sformatf("lag %0d ps: Counter 3 = %0d, expected about %0d", lag_ps, cnt_phase, ph_exp));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #400ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
