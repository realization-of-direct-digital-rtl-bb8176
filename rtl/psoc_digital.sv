// psoc_digital: the digital half of the PSoC.
//
// uart_rx receives the sample stream of the FPGA and writes each byte to
// the DAC register dac_code (dac_strobe pulses). The control unit takes
// the PC command stream (usb_*): gain commands set pga_gain, waveform and
// frequency commands go to the FPGA through uart_tx. reset_timer holds
// fpga_rst high for about one second after rst, so the FPGA starts from a
// known state. The blocks are those of the PSoC's digital configuration
// (two UART halves, a 16-bit timer) and its control unit; the DAC, filter
// and amplifier that consume dac_code and pga_gain are analog and outside.
//
// Timing: dac_code changes one cycle after a byte is received; a frame
// error leaves it unchanged and pulses link_err.
module psoc_digital
  import dds_pkg::*;
#(
  parameter int unsigned CLK_HZ   = 16_000_000,
  parameter int unsigned BAUD     = 37_500,
  parameter int unsigned PRESCALE = 488,
  parameter int unsigned PERIOD   = 32768
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              rx,
  output logic              tx,
  input  logic [7:0]        usb_data,
  input  logic              usb_valid,
  output logic              usb_ready,
  output logic [7:0]        dac_code,
  output logic              dac_strobe,
  output logic [GAIN_W-1:0] pga_gain,
  output logic              fpga_rst,
  output logic              cmd_dropped,
  output logic              link_err     // received byte had a bad stop bit
);

  logic [7:0] rx_data, tx_data;
  logic       rx_valid, tx_valid, tx_ready;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rx, .data(rx_data), .valid(rx_valid), .frame_err(link_err)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      dac_code   <= 8'h80;
      dac_strobe <= 1'b0;
    end else begin
      dac_strobe <= rx_valid;
      if (rx_valid) dac_code <= rx_data;
    end
  end

  psoc_contr_unit u_ctrl (
    .clk, .rst, .usb_data, .usb_valid, .usb_ready,
    .tx_data, .tx_valid, .tx_ready, .gain(pga_gain), .cmd_dropped
  );

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .data(tx_data), .valid(tx_valid), .ready(tx_ready), .tx
  );

  reset_timer #(.PRESCALE(PRESCALE), .PERIOD(PERIOD)) u_timer (
    .clk, .rst, .trigger(1'b0), .fpga_rst
  );

endmodule
