`timescale 1ps/1ps
// rx_byte: receive side of one strobe group (Rx-byte unit).
//
// Seven Rx-bit units deserialize the seven data lanes with the common
// received strobe; each deposits its nibbles into its own ring buffer.
// Lane i supplies word bits [4i+3:4i]. After reset nothing is read until
// every ring buffer holds at least one nibble, so lanes whose write pulses
// arrive at slightly different times still line up; from then on a word is
// read on each system clock edge at which all seven buffers hold data, and
// appears on rx_data with rx_valid one cycle later. The receiver's system
// clock must run at the transmitter's word rate (500 MHz).
//
// Each data lane also feeds a random sampling unit (rsu) with sig1 = the
// lane and sig2 = the strobe. With the alignment pattern on all lanes, its
// phase counter gives the time per period during which the lane is high and
// the strobe low, i.e. the lane-to-strobe skew; an external host reads it
// and adjusts the transmitter's de-skew delays.
//
// Interface: ser_data/ser_strobe from the LVDS receivers; sys_clk and
// rst_n (asynchronous, resets the write dividers, buffers and read logic);
// rsu_* per-lane measurement access on rand_clk.
// Seven Rx-bit units, ring buffers, per-lane RSUs and the read hold after
// reset follow the design description; holding reads whenever any buffer
// is empty is this implementation's extension of that rule.
module rx_byte
  import serdes_pkg::*;
#(
  parameter int unsigned RB_DEPTH = 8
) (
  input  logic                                      sys_clk,
  input  logic                                      rand_clk,
  input  logic                                      rst_n,
  // serial lanes (from the LVDS receivers)
  input  logic [DATA_LANES-1:0]                     ser_data,
  input  logic                                      ser_strobe,
  // parallel output
  output logic [WORD_BITS-1:0]                      rx_data,
  output logic                                      rx_valid,
  // skew measurement, one RSU per data lane
  input  logic [DATA_LANES-1:0]                     rsu_sample,
  input  logic [RSU_CNT_BITS-1:0]                   rsu_n,
  output logic [DATA_LANES-1:0]                     rsu_ready,
  output logic [DATA_LANES-1:0][RSU_CNT_BITS-1:0]   rsu_cnt_high,
  output logic [DATA_LANES-1:0][RSU_CNT_BITS-1:0]   rsu_cnt_phase
);
  logic [DATA_LANES-1:0] lane_write, lane_empty;
  nibble_t               lane_g    [DATA_LANES];
  nibble_t               lane_rdat [DATA_LANES];
  logic                  rd_en;

  for (genvar i = 0; i < DATA_LANES; i++) begin : g_lane
    rx_bit u_rx_bit (
      .ser_in (ser_data[i]),
      .strobe (ser_strobe),
      .rst_n  (rst_n),
      .g      (lane_g[i]),
      .write  (lane_write[i])
    );

    ring_buffer #(.W(BITS_PER_LANE), .DEPTH(RB_DEPTH)) u_rb (
      .rst_n (rst_n),
      .wclk  (lane_write[i]),
      .wdata (lane_g[i]),
      .rclk  (sys_clk),
      .rd_en (rd_en),
      .rdata (lane_rdat[i]),
      .empty (lane_empty[i])
    );

    rsu u_rsu (
      .rand_clk  (rand_clk),
      .rst_n     (rst_n),
      .sample    (rsu_sample[i]),
      .n         (rsu_n),
      .sig1      (ser_data[i]),
      .sig2      (ser_strobe),
      .ready     (rsu_ready[i]),
      .cnt_high  (rsu_cnt_high[i]),
      .cnt_phase (rsu_cnt_phase[i])
    );
  end

  // Read only when every lane's buffer holds a nibble.
  assign rd_en = (lane_empty == '0);

  always_ff @(posedge sys_clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_valid <= 1'b0;
      rx_data  <= '0;
    end else begin
      rx_valid <= rd_en;
      if (rd_en) begin
        for (int i = 0; i < DATA_LANES; i++)
          rx_data[BITS_PER_LANE*i +: BITS_PER_LANE] <= lane_rdat[i];
      end
    end
  end
endmodule
