`timescale 1ps/1ps
// tb_delay_line: self-checking test of the programmable delay line model.
//
// For every tap setting 0..31 it launches a rising and a falling edge and
// measures when each reaches dout: the delay must be exactly
// 30 ps + tap * 25 ps for both edges, and a 1 ns pulse must keep its width.
module tb_delay_line;
  logic       din = 1'b0, dout;
  logic [4:0] tap = '0;
  int         checks = 0, failures = 0;
  time        t_in, t_rise, t_fall;

  delay_line #(.TAPS(32), .TAP_PS(25), .BASE_PS(30)) dut (.din(din), .tap(tap), .dout(dout));

  always @(posedge dout) t_rise = $time;
  always @(negedge dout) t_fall = $time;

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #5000;
    for (int t = 0; t < 32; t++) begin
      tap = 5'(t);
      #3000;
      t_in = $time;
      din = 1'b1;
      #1000 din = 1'b0;
      #3000;
      chk(t_rise - t_in == time'(30 + 25 * t),
          $sformatf("tap %0d rising delay %0t", t, t_rise - t_in));
      chk(t_fall - t_rise == 1000, $sformatf("tap %0d pulse width %0t", t, t_fall - t_rise));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
