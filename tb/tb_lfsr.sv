`timescale 1ps/1ps
// tb_lfsr: self-checking test of the 16-bit LFSR.
//
// Runs the register for 65535 + 5 clocks after reset and checks that it
// starts at the seed, never reaches zero, visits 65535 distinct states
// (maximal length) and returns to the seed after exactly 65535 steps.
module tb_lfsr;
  logic        clk = 1'b0, rst_n = 1'b1;
  logic [15:0] q;
  int          checks = 0, failures = 0;
  bit          seen [65536];

  lfsr #(.W(16), .SEED(16'hACE1)) dut (.clk(clk), .rst_n(rst_n), .q(q));

  always #500 clk = !clk;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (q=%h)", what, q);
    end
  endtask

  initial begin
    int distinct = 0, zeros = 0, back_at = 0;
    #100 rst_n = 1'b0;
    #200 rst_n = 1'b1;
    chk(q == 16'hACE1, "reset value is the seed");
    for (int i = 1; i <= 65535 + 5; i++) begin
      @(posedge clk); #1;
      if (q == 16'h0000) zeros++;
      if (!seen[q]) begin
        seen[q] = 1'b1;
        distinct++;
      end
      if (q == 16'hACE1 && back_at == 0) back_at = i;
    end
    chk(zeros == 0, "never zero");
    chk(distinct == 65535, $sformatf("65535 distinct states (got %0d)", distinct));
    chk(back_at == 65535, $sformatf("period 65535 (got %0d)", back_at));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
