`timescale 1ps/1ps
// delay_line: behavioural model of a programmable (tapped) delay line.
//
// Behavioural model, not synthesizable logic: in silicon this is a chain of
// standard-cell buffers with a tap-select multiplexer. The model builds it as
// a fixed insertion delay followed by binary-weighted stages; stage i delays
// by TAP_PS * 2**i and is bypassed unless bit i of `tap` is set, so the total
// delay is BASE_PS + tap * TAP_PS. The delays are inertial (continuous
// assignments), so a pulse narrower than a stage's delay is lost; the widest
// stage (16 x 25 ps = 400 ps at the defaults) stays below the narrowest clock
// phase the corrector accepts (30 % of 2 ns = 600 ps).
//
// Interface: din in, dout out, tap selects the delay. Changing tap while a
// clock runs may glitch dout, as a real tap multiplexer would.
// The function (a delay line with digitally selected taps) follows the design
// description; the tap count, tap step and insertion delay are assumptions.
module delay_line #(
  parameter int unsigned TAPS    = 32,   // number of selectable delays
  parameter int unsigned TAP_PS  = 25,   // delay added per tap step, ps
  parameter int unsigned BASE_PS = 30    // insertion delay at tap 0, ps
) (
  input  logic                    din,
  input  logic [$clog2(TAPS)-1:0] tap,
  output logic                    dout
);
  localparam int unsigned NB = $clog2(TAPS);

  logic [NB:0]   st;
  logic [NB-1:0] dly;

  assign #(BASE_PS * 1ps) st[0] = din;

  for (genvar i = 0; i < NB; i++) begin : g_stage
    assign #((TAP_PS << i) * 1ps) dly[i] = st[i];
    assign st[i+1] = tap[i] ? dly[i] : st[i];
  end

  assign dout = st[NB];
endmodule
