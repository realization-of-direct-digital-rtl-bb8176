// dds_fpga: the FPGA half of the generator.
//
// Commands from the PSoC arrive on rx, are received by uart_rx and decoded
// by fpga_contr_unit into the tuning word and the waveform select of the
// DDS core. The core's sample is offered to uart_tx all the time; every
// time the transmitter takes a byte, the core advances by one sample. The
// sample rate is therefore the UART byte rate, BAUD/10 (3750 samples/s at
// 37.5 kbit/s), and the output frequency is f0 = ftw * BAUD/10 / 2^FTW_W.
// Pacing the DDS by the link is this design's reading of the generator,
// whose bandwidth is set by the FPGA-PSoC transfer rate.
//
// A command byte with a bad stop bit is dropped by uart_rx and never
// reaches the control unit; the error flag rx_ferr is not used here.
//
// Timing: a command takes effect after its last UART byte is received;
// the next sample sent already uses it for the accumulator update.
module dds_fpga
  import dds_pkg::*;
#(
  parameter int unsigned CLK_HZ  = 16_000_000,
  parameter int unsigned BAUD    = 37_500,
  parameter int unsigned FTW_W   = 32,
  parameter int unsigned PHASE_W = 10,
  parameter int unsigned AMPL_W  = 8
) (
  input  logic clk,
  input  logic rst,
  input  logic rx,
  output logic tx
);

  logic [7:0]       rx_data;
  logic             rx_valid, rx_ferr;
  logic [FTW_W-1:0] ftw;
  wave_e            wave;
  logic [AMPL_W-1:0] sample;
  logic             tx_ready;

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_rx (
    .clk, .rst, .rx, .data(rx_data), .valid(rx_valid), .frame_err(rx_ferr)
  );

  fpga_contr_unit #(.FTW_W(FTW_W)) u_ctrl (
    .clk, .rst, .rx_data, .rx_valid, .ftw, .wave
  );

  dds_core #(.FTW_W(FTW_W), .PHASE_W(PHASE_W), .AMPL_W(AMPL_W)) u_core (
    .clk, .rst, .sample_en(tx_ready), .ftw, .wave, .sample
  );

  // The transmitter always has a sample offered: a handshake is tx_ready.
  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) u_tx (
    .clk, .rst, .data(8'(sample)), .valid(1'b1), .ready(tx_ready), .tx
  );

endmodule
