`timescale 1ps/1ps
// dcc_ctrl: control unit of the duty-cycle corrector and phase generator.
//
// Runs once per `start` pulse, clocked by the random clock like the RSU it
// drives. Every measurement toggles the RSU's `sample` input, waits for the
// RSU to take the toggle and then for `ready`, and reads the counters.
//   1. With the original clock selected it measures the input duty cycle
//      (Counter 2 against n/2). Within +-tol of n/2 the original clock is
//      kept; below, the stretched clock is chosen; above, the chopped one.
//   2. Successive approximation over the DCC delay taps, MSB first: a tap
//      bit is kept while the measured CLK50 duty cycle stays at or below 50 %
//      (stretching) or at or above 50 % (chopping). Duty cycle grows
//      monotonically with the stretch delay and falls with the chop delay.
//   3. Successive approximation over the phase delay taps: a bit is kept
//      while Counter 3 (CLK50 high and CLK90 low, i.e. the lag of CLK90)
//      stays at or below n/4, a quarter period.
// `done` rises when the three steps are complete and stays high until the
// next start. One run takes 1 + 2*log2(TAPS) measurements.
// Coarse, then fine: when n_coarse is not zero, the first measurement and
// the upper half of the tap bits of each search (bits above log2(TAPS)/2,
// i.e. bits 4 and 3 for 32 taps) use n_coarse samples and the rest use n,
// so the large early steps go fast and the final small steps are accurate.
// The sample size of each measurement is driven to the RSU on rsu_n and
// held for the whole measurement; the thresholds n/2 and n/4 are taken
// from it.
// The control unit's function (set the DCC select and delay-line taps from
// RSU measurements) and the idea of coarse measurements with small samples
// first follow the design; the search algorithm, the split between coarse
// and fine steps, the tolerance and the handshake are this implementation's
// choices.
module dcc_ctrl
  import serdes_pkg::*;
#(
  parameter int unsigned TAPS = 32,
  parameter int unsigned W    = RSU_CNT_BITS
) (
  input  logic                    rand_clk,
  input  logic                    rst_n,
  input  logic                    start,       // pulse: run a calibration
  input  logic [W-1:0]            n,           // RSU sample size (fine steps)
  input  logic [W-1:0]            n_coarse,    // sample size of coarse steps, 0 = always n
  input  logic [W-1:0]            tol,         // tolerance, in samples of the first measurement, for keeping the original clock
  // RSU
  output logic                    rsu_sample,
  output logic [W-1:0]            rsu_n,       // sample size of the current measurement
  input  logic                    rsu_ready,
  input  logic [W-1:0]            rsu_cnt_high,
  input  logic [W-1:0]            rsu_cnt_phase,
  // settings
  output dcc_sel_e                sel,
  output logic [$clog2(TAPS)-1:0] dcc_tap,
  output logic [$clog2(TAPS)-1:0] ph_tap,
  output logic                    busy,
  output logic                    done
);
  localparam int unsigned TB = $clog2(TAPS);
  localparam int unsigned IB = (TB > 1) ? $clog2(TB) : 1;

  typedef enum logic [2:0] {
    S_IDLE, S_MEAS, S_WAIT, S_CLASSIFY, S_DUTY_EVAL, S_PHASE_EVAL, S_DONE
  } state_e;

  state_e           state, after_meas;
  logic [1:0]       settle;
  logic [IB-1:0]    bit_idx;
  logic [W-1:0]     half, quarter;
  logic             keep_duty, keep_phase, within_tol;
  logic             coarse_next;

  assign half    = rsu_n >> 1;
  assign quarter = rsu_n >> 2;

  // The measurement about to start is coarse if it is the first one or it
  // decides one of the upper tap bits.
  assign coarse_next = (n_coarse != '0) &&
                       ((after_meas == S_CLASSIFY) || (32'(bit_idx) > TB / 2));

  assign within_tol = (rsu_cnt_high >= half) ? (rsu_cnt_high - half <= tol)
                                             : (half - rsu_cnt_high <= tol);
  assign keep_duty  = (sel == DCC_STRETCHED) ? (rsu_cnt_high <= half)
                                             : (rsu_cnt_high >= half);
  assign keep_phase = (rsu_cnt_phase <= quarter);

  assign busy = (state != S_IDLE) && (state != S_DONE);
  assign done = (state == S_DONE);

  always_ff @(posedge rand_clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      after_meas <= S_IDLE;
      settle     <= '0;
      bit_idx    <= '0;
      rsu_sample <= 1'b0;
      rsu_n      <= '0;
      sel        <= DCC_ORIGINAL;
      dcc_tap    <= '0;
      ph_tap     <= '0;
    end else begin
      unique case (state)
        S_IDLE, S_DONE: begin
          if (start) begin
            sel        <= DCC_ORIGINAL;
            dcc_tap    <= '0;
            ph_tap     <= '0;
            after_meas <= S_CLASSIFY;
            state      <= S_MEAS;
          end
        end
        S_MEAS: begin                       // start one RSU measurement
          rsu_sample <= !rsu_sample;
          rsu_n      <= coarse_next ? n_coarse : n;
          settle     <= '0;
          state      <= S_WAIT;
        end
        S_WAIT: begin                       // let the RSU see the toggle, then wait for it
          if (settle != 2'd3) settle <= settle + 1'b1;
          else if (rsu_ready) state <= after_meas;
        end
        S_CLASSIFY: begin
          bit_idx <= IB'(TB - 1);
          if (within_tol) begin
            ph_tap     <= TB'(1) << (TB - 1);
            after_meas <= S_PHASE_EVAL;
          end else begin
            sel        <= (rsu_cnt_high < half) ? DCC_STRETCHED : DCC_CHOPPED;
            dcc_tap    <= TB'(1) << (TB - 1);
            after_meas <= S_DUTY_EVAL;
          end
          state <= S_MEAS;
        end
        S_DUTY_EVAL: begin
          if (!keep_duty) dcc_tap[bit_idx] <= 1'b0;
          if (bit_idx == '0) begin
            bit_idx    <= IB'(TB - 1);
            ph_tap     <= TB'(1) << (TB - 1);
            after_meas <= S_PHASE_EVAL;
          end else begin
            bit_idx              <= bit_idx - 1'b1;
            dcc_tap[bit_idx - 1] <= 1'b1;
          end
          state <= S_MEAS;
        end
        S_PHASE_EVAL: begin
          if (!keep_phase) ph_tap[bit_idx] <= 1'b0;
          if (bit_idx == '0) begin
            state <= S_DONE;
          end else begin
            bit_idx             <= bit_idx - 1'b1;
            ph_tap[bit_idx - 1] <= 1'b1;
            state               <= S_MEAS;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
