// sine_wave: sine sub-block of the DDS core with a quarter-wave table.
//
// A phase_accumulator produces the FTW_W-bit phase. Its top PHASE_W bits
// (phase(M-1..0)) are registered. Bit M-1 gives the half of the period,
// bit M-2 the quarter: in the second and fourth quarter the table address
// phase(M-3..0) is mirrored as 2^(M-2)-1 - phase(M-3..0). The table holds
// only the first quarter of a sine; in the second half the table output is
// negated. The amplitude ampl_o is two's complement, AMPL_W bits, in the
// range -(2^(P-1)-1) .. 2^(P-1)-1.
//
// The structure (truncation, folding subtractor, quarter table, negation)
// follows the published sine sub-block. The quarter table has 256 entries
// (PHASE_W = 10) and an 8-bit amplitude. The table contents are this
// design's choice, computed at elaboration:
//   LUT[i] = round((2^(P-1)-1) * sin(pi/2 * (i + 0.5) / 2^(M-2)))
// The half-step offset makes the mirrored quarters exact copies, so the
// output equals round((2^(P-1)-1)*sin(2*pi*(p+0.5)/2^M)) for phase p.
//
// Timing: all registers advance only when en is high. ampl_o belongs to
// the accumulator phase of two enabled updates earlier; phase_o is the
// current accumulator phase (plus offset).
module sine_wave #(
  parameter int unsigned FTW_W   = 32,
  parameter int unsigned PHASE_W = 10,  // M: table has 2^(M-2) entries
  parameter int unsigned AMPL_W  = 8    // P
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [FTW_W-1:0]         ftw_i,
  input  logic [FTW_W-1:0]         phase_i,
  output logic [FTW_W-1:0]         phase_o,
  output logic signed [AMPL_W-1:0] ampl_o
);

  localparam int unsigned LUT_AW    = PHASE_W - 2;
  localparam int unsigned LUT_DEPTH = 1 << LUT_AW;
  localparam int unsigned MAG_W     = AMPL_W - 1;

  typedef logic [MAG_W-1:0] lut_t [LUT_DEPTH];

  function automatic lut_t quarter_sine();
    lut_t   t;
    real    full;
    full = real'((1 << MAG_W) - 1);
    for (int i = 0; i < int'(LUT_DEPTH); i++)
      t[i] = MAG_W'($rtoi(full * $sin(3.14159265358979323846 / 2.0 *
                                      (real'(i) + 0.5) / real'(LUT_DEPTH)) + 0.5));
    return t;
  endfunction

  localparam lut_t LUT = quarter_sine();

  logic [PHASE_W-1:0] phase_q;     // z^-1 after the truncation
  logic [LUT_AW-1:0]  lut_addr;
  logic [MAG_W-1:0]   lut_q;       // registered table output
  logic               neg_q;       // phase(M-1) delayed with the table read

  phase_accumulator #(.FTW_W(FTW_W)) u_acc (
    .clk, .rst, .en, .ftw_i, .phase_i, .phase_o
  );

  always_ff @(posedge clk) begin
    if (rst) phase_q <= '0;
    else if (en) phase_q <= phase_o[FTW_W-1 -: PHASE_W];
  end

  // Quadrant folding: second and fourth quarter read the table backwards.
  always_comb begin
    if (phase_q[PHASE_W-2])
      lut_addr = LUT_AW'(LUT_DEPTH - 1) - phase_q[LUT_AW-1:0];
    else
      lut_addr = phase_q[LUT_AW-1:0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      lut_q <= '0;
      neg_q <= 1'b0;
    end else if (en) begin
      lut_q <= LUT[lut_addr];
      neg_q <= phase_q[PHASE_W-1];
    end
  end

  // Second half of the period: negate the table value.
  always_comb begin
    if (neg_q) ampl_o = -$signed({1'b0, lut_q});
    else       ampl_o =  $signed({1'b0, lut_q});
  end

endmodule
