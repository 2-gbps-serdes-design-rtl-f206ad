`timescale 1ps/1ps
// dcc_phase_gen: duty-cycle corrector (DCC) and 90-degree phase generator.
//
// The incoming system clock may have lost its 50 % duty cycle in the clock
// distribution network. A programmable delay line makes a delayed copy B of
// the input A. A OR B is the "stretched" clock (high phase lengthened by the
// delay, for inputs below 50 %), A AND B the "chopped" clock (high phase
// shortened by the delay, for inputs above 50 %). A 3:1 multiplexer picks
// the original, stretched or chopped clock as CLK50. CLK50 then passes a
// second delay line; with its delay set to a quarter period this gives
// CLK90. Both the selection and the two tap settings come from the control
// unit (dcc_ctrl), which measures CLK50 and CLK90 with a random sampling
// unit. Input duty cycles of 30 % to 70 % can be corrected.
//
// Interface: clk_in asymmetric clock; sel, dcc_tap and ph_tap settings;
// clk50 and clk90 outputs. Purely combinational apart from the delay lines.
// The structure (delay line, OR, AND, 3:1 multiplexer, second delay line fed
// from CLK50) follows the design's DCC figure; the delay line sizes are
// this implementation's choice (see delay_line). The multiplexer outputs
// the original clock for the unused select code 3.
module dcc_phase_gen
  import serdes_pkg::*;
#(
  parameter int unsigned TAPS   = 32,
  parameter int unsigned TAP_PS = 25
) (
  input  logic                    clk_in,
  input  dcc_sel_e                sel,
  input  logic [$clog2(TAPS)-1:0] dcc_tap,
  input  logic [$clog2(TAPS)-1:0] ph_tap,
  output logic                    clk50,
  output logic                    clk90
);
  logic delayed, stretched, chopped;

  delay_line #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_dcc_dly (
    .din  (clk_in),
    .tap  (dcc_tap),
    .dout (delayed)
  );

  assign stretched = clk_in | delayed;
  assign chopped   = clk_in & delayed;

  always_comb begin
    unique case (sel)
      DCC_STRETCHED: clk50 = stretched;
      DCC_CHOPPED:   clk50 = chopped;
      default:       clk50 = clk_in;
    endcase
  end

  delay_line #(.TAPS(TAPS), .TAP_PS(TAP_PS)) u_phase_dly (
    .din  (clk50),
    .tap  (ph_tap),
    .dout (clk90)
  );
endmodule
