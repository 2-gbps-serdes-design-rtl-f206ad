`timescale 1ps/1ps
// tb_rand_clk_gen: self-checking test of the random clock model.
//
// Checks that the output stays low while disabled, and that once enabled
// every half period lies between 1500 ps and 1500 + 255 * 15 ps, that the
// half periods are spread out (more than 100 distinct values in 2000) and
// that the sampling instants cover all phases of a 2 ns clock (every 100 ps
// bin of the 2 ns period receives between 2.5 % and 7.5 % of the rising
// edges).
module tb_rand_clk_gen;
  logic en = 1'b0, rst_n = 1'b1, rand_clk;
  int   checks = 0, failures = 0;

  rand_clk_gen dut (.en(en), .rst_n(rst_n), .rand_clk(rand_clk));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    time t_last, t_now, hp;
    int  phase_bin [20];
    bit  seen [8192];
    int  distinct = 0, bad = 0, rises = 0;
    #100 rst_n = 1'b0;
    #100 rst_n = 1'b1;
    #20000;
    chk(rand_clk == 1'b0, "low while disabled");
    en = 1'b1;
    @(rand_clk);
    t_last = $time;
    for (int i = 0; i < 2000; i++) begin
      @(rand_clk);
      t_now = $time;
      hp = t_now - t_last;
      t_last = t_now;
      if (hp < 1500 || hp > 1500 + 255 * 15) bad++;
      if (!seen[hp % 8192]) begin
        seen[hp % 8192] = 1'b1;
        distinct++;
      end
      if (rand_clk) begin
        phase_bin[(t_now % 2000) / 100]++;
        rises++;
      end
    end
    chk(bad == 0, $sformatf("%0d half periods out of range", bad));
    chk(distinct > 100, $sformatf("only %0d distinct half periods", distinct));
    foreach (phase_bin[b])
      chk(phase_bin[b] * 40 > rises && phase_bin[b] * 40 < 3 * rises,
          $sformatf("phase bin %0d holds %0d of %0d edges", b, phase_bin[b], rises));
    en = 1'b0;
    #20000;
    chk(rand_clk == 1'b0, "low after disable");
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
