// triangle_wave: "triangle" sub-block of the DDS core, a phase ramp.
//
// The generator's waveform figures show this shape as a ramp: the level
// rises linearly over the whole period and falls back at its end. It is
// made by taking the top AMPL_W bits of the phase and moving them to two's
// complement (inverting the MSB), so the output runs from -2^(P-1) at the
// start of the period to 2^(P-1)-1 at its end. The ramp shape follows the
// published figures; the exact mapping of phase to level is this design's.
//
// Timing: ampl_o is registered; it follows phase_i one enabled cycle later.
module triangle_wave #(
  parameter int unsigned FTW_W  = 32,
  parameter int unsigned AMPL_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [FTW_W-1:0]         phase_i,
  output logic signed [AMPL_W-1:0] ampl_o
);

  logic [AMPL_W-1:0] ramp;

  assign ramp = phase_i[FTW_W-1 -: AMPL_W];

  always_ff @(posedge clk) begin
    if (rst)     ampl_o <= '0;
    else if (en) ampl_o <= $signed({~ramp[AMPL_W-1], ramp[AMPL_W-2:0]});
  end

endmodule
