// dds_pkg: types and constants shared by the DDS generator.
//
// Waveform codes, the command opcodes exchanged between the PC, the PSoC
// control unit and the FPGA control unit, and the UART bit-time helper.
// The three waveforms (sine, triangle, square) and the 16 PGA gain levels
// follow the generator's specification; the byte values of the opcodes and
// of the waveform codes are this design's own choice.
package dds_pkg;

  // Waveform select, carried in the data byte of a 'W' command.
  typedef enum logic [1:0] {
    WAVE_SINE     = 2'd0,
    WAVE_TRIANGLE = 2'd1,
    WAVE_SQUARE   = 2'd2
  } wave_e;

  // Command opcodes (ASCII). A frame is the opcode byte followed by its
  // payload: 'F' + 4 bytes tuning word (MSB first), 'W' + 1 byte waveform,
  // 'G' + 1 byte PGA gain (0..15, handled by the PSoC only).
  localparam logic [7:0] OP_FREQ = 8'h46;  // 'F'
  localparam logic [7:0] OP_WAVE = 8'h57;  // 'W'
  localparam logic [7:0] OP_GAIN = 8'h47;  // 'G'

  localparam int unsigned FTW_BYTES  = 4;
  localparam int unsigned GAIN_W     = 4;   // 16 gain levels

  // Clocks per UART bit, rounded to the nearest integer.
  function automatic int unsigned clks_per_bit(int unsigned clk_hz, int unsigned baud);
    return (clk_hz + baud / 2) / baud;
  endfunction

  // Payload length of a frame with the given opcode; 0 for an unknown one.
  function automatic int unsigned payload_len(logic [7:0] op);
    case (op)
      OP_FREQ: return FTW_BYTES;
      OP_WAVE: return 1;
      OP_GAIN: return 1;
      default: return 0;
    endcase
  endfunction

endpackage
