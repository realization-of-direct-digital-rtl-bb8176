// phase_accumulator: the DDS phase accumulator with a phase-offset adder.
//
// On every cycle with en high the FTW_W-bit register adds the frequency
// tuning word ftw_i (the delta phase M) to itself, wrapping modulo 2^FTW_W,
// so the phase circle is crossed M*fc/2^FTW_W times per second, fc being
// the rate of en. phase_o is the register plus the phase offset phase_i,
// combinationally. This is the accumulator-plus-offset structure of the
// classic DDS and of the sine sub-block; the width 32 is the usual choice
// for such a system, and clearing the register on reset is this design's
// choice.
//
// Timing: phase_o reflects an update on the clock edge where en was high;
// phase_i reaches phase_o with no delay.
module phase_accumulator #(
  parameter int unsigned FTW_W = 32
) (
  input  logic             clk,
  input  logic             rst,      // synchronous, active high
  input  logic             en,       // one accumulator update
  input  logic [FTW_W-1:0] ftw_i,    // frequency tuning word
  input  logic [FTW_W-1:0] phase_i,  // phase offset
  output logic [FTW_W-1:0] phase_o
);

  logic [FTW_W-1:0] acc_q;

  always_ff @(posedge clk) begin
    if (rst)     acc_q <= '0;
    else if (en) acc_q <= acc_q + ftw_i;
  end

  assign phase_o = acc_q + phase_i;

endmodule
