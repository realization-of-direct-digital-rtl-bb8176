// reset_timer: 16-bit timer that makes the FPGA reset pulse.
//
// After the PSoC leaves reset, and again whenever trigger pulses, fpga_rst
// is held high for PERIOD ticks of a slow time base and then released.
// The time base is a prescaler dividing the system clock by PRESCALE; with
// the defaults (16 MHz / 488 = 32.79 kHz, 32768 ticks) the pulse lasts
// about 1 s, the duration the generator uses. The tick counter is 16 bits
// wide like the timer it models. The prescaler, the tick rate and the
// trigger input are this design's choices.
//
// Timing: fpga_rst is high in the first cycle after rst falls (it is also
// high during rst) and falls PERIOD*PRESCALE cycles later, give or take
// one prescaler period.
module reset_timer #(
  parameter int unsigned PRESCALE = 488,
  parameter int unsigned PERIOD   = 32768
) (
  input  logic clk,
  input  logic rst,
  input  logic trigger,
  output logic fpga_rst
);

  localparam int unsigned PRE_W = (PRESCALE > 1) ? $clog2(PRESCALE) : 1;

  logic [PRE_W-1:0] pre_q;
  logic [15:0]      cnt_q;
  logic             tick;

  assign tick = (pre_q == PRE_W'(PRESCALE - 1));

  always_ff @(posedge clk) begin
    if (rst || trigger || tick) pre_q <= '0;
    else                        pre_q <= pre_q + 1'b1;
  end

  always_ff @(posedge clk) begin
    if (rst || trigger) begin
      cnt_q    <= 16'(PERIOD - 1);
      fpga_rst <= 1'b1;
    end else if (fpga_rst && tick) begin
      if (cnt_q == 16'd0) fpga_rst <= 1'b0;
      else                cnt_q    <= cnt_q - 1'b1;
    end
  end

  initial assert (PERIOD >= 1 && PERIOD <= 65536)
    else $error("PERIOD must fit the 16-bit timer");

endmodule
