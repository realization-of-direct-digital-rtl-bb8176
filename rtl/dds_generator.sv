// dds_generator: DDS function generator, FPGA and PSoC digital halves.
//
// The FPGA half (dds_fpga) synthesises sine, triangle (ramp) or square
// samples and streams them over a UART link at BAUD; the PSoC half
// (psoc_digital) puts each received sample into the 8-bit DAC register,
// sets the PGA gain and forwards PC commands to the FPGA over the other
// direction of the link. The PSoC's reset timer holds the FPGA in reset
// for about one second after start-up. The analog chain (DAC, low-pass
// filter, PGA) and the USB link are outside this RTL: dac_code, pga_gain
// and the usb_* byte stream are its ports. fpga_rst is brought out too.
// Both halves share clk here; in hardware they are two chips.
//
// Output frequency: f0 = ftw * (BAUD/10) / 2^FTW_W.
module dds_generator
  import dds_pkg::*;
#(
  parameter int unsigned CLK_HZ    = 16_000_000,
  parameter int unsigned BAUD      = 37_500,
  parameter int unsigned FTW_W     = 32,
  parameter int unsigned PHASE_W   = 10,
  parameter int unsigned AMPL_W    = 8,
  parameter int unsigned PRESCALE  = 488,
  parameter int unsigned RST_TICKS = 32768
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        usb_data,
  input  logic              usb_valid,
  output logic              usb_ready,
  output logic [7:0]        dac_code,
  output logic              dac_strobe,
  output logic [GAIN_W-1:0] pga_gain,
  output logic              fpga_rst,
  output logic              cmd_dropped,
  output logic              link_err
);

  logic fpga_to_psoc, psoc_to_fpga;

  dds_fpga #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FTW_W(FTW_W),
             .PHASE_W(PHASE_W), .AMPL_W(AMPL_W)) u_fpga (
    .clk, .rst(fpga_rst), .rx(psoc_to_fpga), .tx(fpga_to_psoc)
  );

  psoc_digital #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .PRESCALE(PRESCALE),
                 .PERIOD(RST_TICKS)) u_psoc (
    .clk, .rst, .rx(fpga_to_psoc), .tx(psoc_to_fpga),
    .usb_data, .usb_valid, .usb_ready, .dac_code, .dac_strobe,
    .pga_gain, .fpga_rst, .cmd_dropped, .link_err
  );

  initial assert (AMPL_W == 8) else $error("the UART link carries 8-bit samples");

endmodule
