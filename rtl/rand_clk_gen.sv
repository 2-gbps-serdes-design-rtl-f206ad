`timescale 1ps/1ps
// rand_clk_gen: behavioural model of the random sampling clock.
//
// Behavioural model, not synthesizable logic: in silicon this is a
// digitally controlled ring oscillator whose delay is set from an LFSR, so
// that its edges fall at instants uncorrelated with the on-chip clocks being
// observed. The model toggles its output after a half period of
// BASE_HALF_PS + r * STEP_PS (r = upper XOR lower byte of the LFSR) picoseconds; the LFSR (module
// lfsr) advances on every rising edge of the oscillator itself. The average
// frequency has no bearing on measurement accuracy, only on measurement
// time. With the defaults the period varies between 3.0 ns and about 10.7 ns.
//
// Interface: en starts the oscillator (output held low while en is low),
// rst_n resets the LFSR. SEED lets two oscillators run different sequences.
// That the random clock is a ring oscillator driven by an LFSR follows the
// design description; the delays and LFSR are this implementation's choices.
module rand_clk_gen #(
  parameter int unsigned  BASE_HALF_PS = 1500,
  parameter int unsigned  STEP_PS      = 15,
  parameter logic [15:0]  SEED         = 16'hACE1
) (
  input  logic en,
  input  logic rst_n,
  output logic rand_clk
);
  logic [15:0] rnd;

  lfsr #(.W(16), .SEED(SEED)) u_lfsr (
    .clk   (rand_clk),
    .rst_n (rst_n),
    .q     (rnd)
  );

  initial rand_clk = 1'b0;

  int unsigned half_ps;

  always begin
    if (!en) begin
      rand_clk = 1'b0;
      @(posedge en);
    end
    half_ps = BASE_HALF_PS + {24'd0, rnd[15:8] ^ rnd[7:0]} * STEP_PS;
    #(half_ps);
    rand_clk = en ? !rand_clk : 1'b0;
  end
endmodule
