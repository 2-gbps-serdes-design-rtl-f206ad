`timescale 1ps/1ps
// ring_buffer: dual-clock ring buffer between a strobe-timed Rx-bit unit and
// the receiver's system clock.
//
// The Rx-bit unit's `write` signal clocks each deserialized nibble into the
// next slot (wclk domain). The reader, on the system clock, takes the slot
// at the read pointer when rd_en is high. The write and read pointers cross
// domains as Gray codes through two-flip-flop synchronizers; `empty` is
// computed in the read domain from the synchronized write pointer and is
// therefore pessimistic by two read-clock cycles. Writes are never refused:
// the transmitter and receiver run at the same word rate, and the buffer only
// absorbs the phase difference between strobe and system clock, so at the
// default depth of 8 it never fills in operation; an overrun would overwrite
// the oldest entry.
//
// Interface: wclk/wdata (write side), rclk/rd_en/rdata/empty (read side),
// rst_n resets both sides asynchronously. rdata shows the oldest entry
// whenever empty is low; rd_en advances the read pointer on the next rclk
// edge.
// A ring buffer between each Rx-bit unit and the system clock follows the
// design description; the depth, pointer scheme and interface are this
// implementation's choices.
module ring_buffer #(
  parameter int unsigned W     = 4,    // entry width
  parameter int unsigned DEPTH = 8     // entries, a power of two
) (
  input  logic         rst_n,
  // write side
  input  logic         wclk,
  input  logic [W-1:0] wdata,
  // read side
  input  logic         rclk,
  input  logic         rd_en,
  output logic [W-1:0] rdata,
  output logic         empty
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0] mem [DEPTH];
  logic [AW:0]  wptr_bin, rptr_bin;      // one extra bit for wrap-around
  logic [AW:0]  wptr_gray, wgray_s1, wgray_s2;
  logic [AW:0]  rptr_gray;

  // Write side.
  always_ff @(posedge wclk or negedge rst_n) begin
    if (!rst_n) wptr_bin <= '0;
    else        wptr_bin <= wptr_bin + 1'b1;
  end

  always_ff @(posedge wclk) mem[wptr_bin[AW-1:0]] <= wdata;

  assign wptr_gray = wptr_bin ^ (wptr_bin >> 1);

  // Read side.
  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n) begin
      wgray_s1 <= '0;
      wgray_s2 <= '0;
    end else begin
      wgray_s1 <= wptr_gray;
      wgray_s2 <= wgray_s1;
    end
  end

  assign rptr_gray = rptr_bin ^ (rptr_bin >> 1);
  assign empty     = (rptr_gray == wgray_s2);
  assign rdata     = mem[rptr_bin[AW-1:0]];

  always_ff @(posedge rclk or negedge rst_n) begin
    if (!rst_n)              rptr_bin <= '0;
    else if (rd_en && !empty) rptr_bin <= rptr_bin + 1'b1;
  end
endmodule
