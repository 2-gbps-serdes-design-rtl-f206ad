`timescale 1ps/1ps
// tb_ring_buffer: self-checking test of the dual-clock ring buffer.
//
// Writes nibbles on a 2 ns write clock and reads on an unrelated 2.01 ns
// read clock, first in a burst (six writes, then reads until empty), then
// streaming with reads on every cycle the buffer is not empty. A queue in
// the testbench is the reference: every read must return the oldest
// unread nibble, `empty` must be high exactly when nothing is left after
// the last write has crossed over, and a written nibble must be readable
// within three read-clock edges.
module tb_ring_buffer;
  logic       rst_n = 1'b1, wclk = 1'b0, rclk = 1'b0, rd_en = 1'b0;
  logic [3:0] wdata = '0, rdata;
  logic       empty, wr_on = 1'b0;
  logic [3:0] ref_q [$];
  int         checks = 0, failures = 0, reads = 0;

  ring_buffer #(.W(4), .DEPTH(8)) dut (
    .rst_n(rst_n), .wclk(wclk), .wdata(wdata),
    .rclk(rclk), .rd_en(rd_en), .rdata(rdata), .empty(empty));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // Write clock runs only while wr_on; each edge writes wdata.
  always begin
    #1000;
    if (wr_on) wclk = !wclk;
  end
  always @(posedge wclk) begin
    ref_q.push_back(wdata);
    #100 wdata = 4'($urandom);
  end

  always #1005 rclk = !rclk;

  // Reader: compare each accepted read with the reference queue.
  always @(posedge rclk) begin
    if (rd_en && !empty) begin
      reads++;
      chk(ref_q.size() > 0, "read with nothing written");
      if (ref_q.size() > 0) begin
        automatic logic [3:0] e = ref_q.pop_front();
        chk(rdata == e, $sformatf("read %0d: %h expected %h", reads, rdata, e));
      end
    end
  end

  initial begin
    #100 rst_n = 1'b0;
    #3000 rst_n = 1'b1;
    #5000;
    chk(empty, "empty after reset");
    // Burst: six writes, no reads.
    wr_on = 1'b1;
    repeat (6) @(posedge wclk);
    #10 wr_on = 1'b0;
    repeat (3) @(posedge rclk);
    #1;
    chk(!empty, "not empty within three read edges of the writes");
    @(negedge rclk) rd_en = 1'b1;
    wait (empty);
    @(negedge rclk) rd_en = 1'b0;
    chk(reads == 6, $sformatf("six reads in the burst (got %0d)", reads));
    chk(ref_q.size() == 0, "burst fully drained");
    // Streaming: write every 2 ns, read whenever not empty.
    wr_on = 1'b1;
    rd_en = 1'b1;
    repeat (500) @(posedge wclk);
    #10 wr_on = 1'b0;
    repeat (10) @(posedge rclk);
    #1;
    chk(empty, "empty after the stream");
    chk(ref_q.size() == 0, "stream fully drained");
    chk(reads == 506, $sformatf("506 reads in all (got %0d)", reads));
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
