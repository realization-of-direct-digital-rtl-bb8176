// dds_core: the DDS core with its three waveform sub-blocks.
//
// The sine sub-block holds the phase accumulator; its phase output also
// drives the triangle (ramp) and square sub-blocks, so all three shapes
// run at the frequency f0 = ftw * f_s / 2^FTW_W, f_s being the rate of
// sample_en. wave selects one of the three signed amplitudes and the
// result is turned into an offset-binary code for a unipolar DAC by
// inverting its MSB (code 2^(P-1) is mid-scale). The three sub-blocks and
// the selection follow the generator's block diagram; sharing one
// accumulator, the zero phase offset and the offset-binary output are
// this design's choices.
//
// Timing: everything advances on sample_en. sample is registered: a
// change of wave shows on sample one enabled update later; the sine path
// lags the accumulator by two updates plus this output register.
module dds_core
  import dds_pkg::*;
#(
  parameter int unsigned FTW_W   = 32,
  parameter int unsigned PHASE_W = 10,
  parameter int unsigned AMPL_W  = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              sample_en,
  input  logic [FTW_W-1:0]  ftw,
  input  wave_e             wave,
  output logic [AMPL_W-1:0] sample
);

  logic [FTW_W-1:0]         phase;
  logic signed [AMPL_W-1:0] sine_a, tri_a, sqr_a, sel_a;

  sine_wave #(.FTW_W(FTW_W), .PHASE_W(PHASE_W), .AMPL_W(AMPL_W)) u_sine (
    .clk, .rst, .en(sample_en), .ftw_i(ftw), .phase_i('0),
    .phase_o(phase), .ampl_o(sine_a)
  );

  triangle_wave #(.FTW_W(FTW_W), .AMPL_W(AMPL_W)) u_tri (
    .clk, .rst, .en(sample_en), .phase_i(phase), .ampl_o(tri_a)
  );

  square_wave #(.FTW_W(FTW_W), .AMPL_W(AMPL_W)) u_sqr (
    .clk, .rst, .en(sample_en), .phase_i(phase), .ampl_o(sqr_a)
  );

  always_comb begin
    case (wave)
      WAVE_TRIANGLE: sel_a = tri_a;
      WAVE_SQUARE:   sel_a = sqr_a;
      default:       sel_a = sine_a;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst)            sample <= {1'b1, {(AMPL_W-1){1'b0}}};   // mid-scale
    else if (sample_en) sample <= {~sel_a[AMPL_W-1], sel_a[AMPL_W-2:0]};
  end

endmodule
