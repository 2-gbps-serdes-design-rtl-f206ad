`timescale 1ps/1ps
// tb_dcc_phase_gen: self-checking test of the duty-cycle corrector datapath.
//
// Feeds a 500 MHz clock with a 30 % or 70 % duty cycle and measures the
// high time of CLK50 and the lag of CLK90 with the tap settings fixed:
//   original:  high time unchanged;
//   stretched: high time = input high + (30 + 25 * dcc_tap) ps;
//   chopped:   high time = input high - (30 + 25 * dcc_tap) ps;
//   CLK90 rises (30 + 25 * ph_tap) ps after CLK50.
// Stretching is tested while the delay is below the input high time and
// chopping while it is below the low time. Every result must be exact to the picosecond; the period must stay 2 ns.
module tb_dcc_phase_gen;
  import serdes_pkg::*;

  localparam int unsigned PERIOD = 2000;

  logic       clk_in = 1'b0, clk50, clk90;
  dcc_sel_e   sel = DCC_ORIGINAL;
  logic [4:0] dcc_tap = '0, ph_tap = '0;
  int         high_ps = 600;
  int         checks = 0, failures = 0;
  time        f50, r90;

  dcc_phase_gen dut (.clk_in(clk_in), .sel(sel), .dcc_tap(dcc_tap), .ph_tap(ph_tap),
                     .clk50(clk50), .clk90(clk90));

  always begin
    clk_in = 1'b1; #(high_ps);
    clk_in = 1'b0; #(PERIOD - high_ps);
  end

  always @(negedge clk50) f50 = $time;
  always @(posedge clk90) r90 = $time;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Settle, then measure one full period of CLK50 and the CLK90 lag.
  task automatic measure(output int hi, output int lag, output int per);
    time r;
    #(5 * PERIOD);
    @(posedge clk50);
    r = $time;
    #(PERIOD - 10);                 // the falling CLK50 and rising CLK90 edges lie in this window
    hi  = int'(f50 - r);
    lag = int'(r90 - r);
    @(posedge clk50);
    per = int'($time - r);
  endtask

  initial begin
    int hi, lag, per;
    for (int in_duty = 0; in_duty < 2; in_duty++) begin
      high_ps = (in_duty == 0) ? 600 : 1400;
      for (int s = 0; s < 3; s++) begin
        sel = dcc_sel_e'(s);
        for (int t = 0; t < 32; t += 5) begin
          dcc_tap = 5'(t);
          ph_tap  = 5'(31 - t);
          // stretching works while the delay is below the high time,
          // chopping while it is below the low time
          // (the corrector only stretches clocks below 50 % and chops those above)
          if ((sel == DCC_STRETCHED && high_ps > 1000) ||
              (sel == DCC_CHOPPED   && high_ps < 1000) ||
              (sel == DCC_STRETCHED && 30 + 25 * t >= high_ps) ||
              (sel == DCC_CHOPPED   && 30 + 25 * t >= int'(PERIOD) - high_ps))
            continue;
          measure(hi, lag, per);
          case (sel)
            DCC_STRETCHED: chk(hi == high_ps + 30 + 25 * t, $sformatf("stretch in=%0d tap=%0d high=%0d", high_ps, t, hi));
            DCC_CHOPPED:   chk(hi == high_ps - 30 - 25 * t, $sformatf("chop in=%0d tap=%0d high=%0d", high_ps, t, hi));
            default:       chk(hi == high_ps, $sformatf("original in=%0d high=%0d", high_ps, hi));
          endcase
          chk(lag == 30 + 25 * (31 - t), $sformatf("CLK90 lag %0d at ph_tap %0d (in %0d, sel %0d, tap %0d, high %0d)", lag, 31 - t, high_ps, sel, t, hi));
          chk(per == PERIOD, $sformatf("period %0d", per));
        end
      end
    end
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
