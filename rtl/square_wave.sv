// square_wave: square sub-block of the DDS core.
//
// The output is the positive full-scale value 2^(P-1)-1 while the phase is
// in the first half of the circle (phase MSB = 0) and the negative
// full-scale value -2^(P-1) in the second half: a 50 % duty-cycle square
// wave at the DDS frequency. The duty cycle and levels are this design's
// choice; the sub-block itself is one of the generator's three shapes.
//
// Timing: ampl_o is registered; it follows phase_i one enabled cycle later.
module square_wave #(
  parameter int unsigned FTW_W  = 32,
  parameter int unsigned AMPL_W = 8
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     en,
  input  logic [FTW_W-1:0]         phase_i,
  output logic signed [AMPL_W-1:0] ampl_o
);

  localparam logic signed [AMPL_W-1:0] HIGH = {1'b0, {(AMPL_W-1){1'b1}}};
  localparam logic signed [AMPL_W-1:0] LOW  = {1'b1, {(AMPL_W-1){1'b0}}};

  always_ff @(posedge clk) begin
    if (rst)     ampl_o <= '0;
    else if (en) ampl_o <= phase_i[FTW_W-1] ? LOW : HIGH;
  end

endmodule
