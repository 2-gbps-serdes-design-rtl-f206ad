`timescale 1ps/1ps
// tb_dcc_ctrl: self-checking test of the DCC control unit in its loop.
//
// The control unit runs with the real corrector datapath (dcc_phase_gen)
// and random sampling unit (rsu); the random clock is made here from
// $urandom delays. For input clocks of 30, 32, 40, 50, 62 and 70 % duty at
// 500 MHz it checks after `done`:
//   * the chosen source: stretched below 50 %, original at 50 %, chopped above;
//   * the number of RSU measurements: 1 + 5 + 5 (1 + 5 when the original
//     clock is kept) for 32-tap delay lines;
//   * the CLK50 high time, measured here to the picosecond, is 1000 ps
//     within +-80 ps, and CLK90 lags CLK50 by 500 ps within +-80 ps
//     (n = 2048 samples; one tap is 25 ps);
//   * with coarse steps enabled (n_coarse = 256), that exactly the first
//     measurement and tap bits 4 and 3 of each search use 256 samples,
//     with the same accuracy at the end.
module tb_dcc_ctrl;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;

  logic        rand_clk = 1'b0, rst_n = 1'b1, start = 1'b0;
  logic        clk_in = 1'b0, clk50, clk90;
  logic [15:0] n = 16'd2048, n_coarse = 16'd0, tol = 16'd40, rsu_n;
  logic        rsu_sample, rsu_ready, busy, done;
  logic [15:0] cnt_high, cnt_phase;
  dcc_sel_e    sel;
  logic [4:0]  dcc_tap, ph_tap;
  int          high_ps = 800;
  int          checks = 0, failures = 0, toggles = 0;
  time         r50, f50, r90;

  dcc_ctrl #(.TAPS(32)) dut (
    .rand_clk(rand_clk), .rst_n(rst_n), .start(start), .n(n), .n_coarse(n_coarse), .tol(tol),
    .rsu_sample(rsu_sample), .rsu_n(rsu_n), .rsu_ready(rsu_ready), .rsu_cnt_high(cnt_high),
    .rsu_cnt_phase(cnt_phase), .sel(sel), .dcc_tap(dcc_tap), .ph_tap(ph_tap),
    .busy(busy), .done(done));

  dcc_phase_gen #(.TAPS(32), .TAP_PS(25)) u_dp (
    .clk_in(clk_in), .sel(sel), .dcc_tap(dcc_tap), .ph_tap(ph_tap),
    .clk50(clk50), .clk90(clk90));

  rsu u_rsu (.rand_clk(rand_clk), .rst_n(rst_n), .sample(rsu_sample), .n(rsu_n),
             .sig1(clk50), .sig2(clk90), .ready(rsu_ready),
             .cnt_high(cnt_high), .cnt_phase(cnt_phase));

  always begin
    #(2000 + ($urandom % 7000));
    rand_clk = !rand_clk;
  end

  always begin
    clk_in = 1'b1; #(high_ps);
    clk_in = 1'b0; #(PERIOD - high_ps);
  end

  // Count measurements and how many used the coarse sample size. The size
  // is read a few random-clock edges after the toggle, when the RSU loads it.
  int coarse_meas = 0;
  always @(rsu_sample) begin
    toggles++;
    repeat (2) @(posedge rand_clk);
    #1;
    if (n_coarse != 0 && rsu_n == n_coarse) coarse_meas++;
    else if (rsu_n != n) begin
      failures++;
      $display("FAIL measurement with sample size %0d", rsu_n);
    end
  end

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic run(input int hp, input dcc_sel_e exp_sel);
    int hi, lag, exp_meas;
    time r;
    high_ps = hp;
    #(10 * PERIOD);
    toggles = 0;
    coarse_meas = 0;
    @(negedge rand_clk) start = 1'b1;
    @(negedge rand_clk) start = 1'b0;
    wait (done);
    exp_meas = (exp_sel == DCC_ORIGINAL) ? 6 : 11;
    chk(sel == exp_sel, $sformatf("input %0d ps: source %s, expected %s", hp, sel.name(), exp_sel.name()));
    chk(toggles == exp_meas, $sformatf("input %0d ps: %0d measurements, expected %0d", hp, toggles, exp_meas));
    // coarse: the first measurement and tap bits 4 and 3 of each search
    if (n_coarse != 0)
      chk(coarse_meas == ((exp_sel == DCC_ORIGINAL) ? 3 : 5),
          $sformatf("input %0d ps: %0d coarse measurements", hp, coarse_meas));
    #(5 * PERIOD);
    @(posedge clk50);
    r = $time;
    @(negedge clk50);
    hi = int'($time - r);
    @(posedge clk90);
    lag = int'($time - r) % int'(PERIOD);   // the rising CLK90 edge may precede the falling CLK50 edge
    chk(hi >= 920 && hi <= 1080, $sformatf("input %0d ps: CLK50 high %0d ps (tap %0d)", hp, hi, dcc_tap));
    chk(lag >= 420 && lag <= 580, $sformatf("input %0d ps: CLK90 lag %0d ps (tap %0d)", hp, lag, ph_tap));
  endtask

  initial begin
    #100 rst_n = 1'b0;
    #5000 rst_n = 1'b1;
    chk(!busy && !done, "idle after reset");
    run(800,  DCC_STRETCHED);
    run(1240, DCC_CHOPPED);
    run(1000, DCC_ORIGINAL);
    run(640,  DCC_STRETCHED);
    run(600,  DCC_STRETCHED);   // 30 %, lower end of the correctable range
    run(1400, DCC_CHOPPED);     // 70 %, upper end
    // Coarse-then-fine: 256 samples for the large steps, 2048 for the rest.
    n_coarse = 16'd256;
    tol      = 16'd5;           // the tolerance counts samples of the (coarse) first measurement
    run(760,  DCC_STRETCHED);
    run(1300, DCC_CHOPPED);
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
