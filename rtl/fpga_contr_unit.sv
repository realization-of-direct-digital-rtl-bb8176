// fpga_contr_unit: command decoder of the FPGA.
//
// Bytes arriving from the PSoC over the UART are parsed into frames. An
// 'F' frame carries a four-byte frequency tuning word, most significant
// byte first; its bytes are shifted into a serial load register and the
// whole word is copied into the delta phase register ftw only when the
// last byte has arrived, so the DDS never sees a half-loaded word. A 'W'
// frame carries one byte selecting the waveform (0 sine, 1 triangle,
// 2 square). Unknown opcodes and waveform codes above 2 are ignored.
// The serial load and delta phase registers are those of the classic DDS;
// the byte encoding of the commands is this design's own.
//
// Timing: ftw and wave change on the clock edge after the rx_valid of the
// frame's last byte. Reset: ftw = 0, sine.
module fpga_contr_unit
  import dds_pkg::*;
#(
  parameter int unsigned FTW_W = 32
) (
  input  logic             clk,
  input  logic             rst,
  input  logic [7:0]       rx_data,
  input  logic             rx_valid,
  output logic [FTW_W-1:0] ftw,
  output wave_e            wave
);

  typedef enum logic [1:0] {OPCODE, FREQ, WAVE} state_e;

  state_e                           state_q;
  logic [$clog2(FTW_BYTES+1)-1:0]   left_q;   // payload bytes still to come
  logic [8*(FTW_BYTES-1)-1:0]       load_q;   // serial load register

  always_ff @(posedge clk) begin
    if (rst) begin
      state_q <= OPCODE;
      left_q  <= '0;
      load_q  <= '0;
      ftw     <= '0;
      wave    <= WAVE_SINE;
    end else if (rx_valid) begin
      case (state_q)
        OPCODE: begin
          left_q <= FTW_BYTES[$bits(left_q)-1:0];
          if (rx_data == OP_FREQ)      state_q <= FREQ;
          else if (rx_data == OP_WAVE) state_q <= WAVE;
        end
        FREQ: begin
          load_q <= {load_q[8*(FTW_BYTES-1)-9:0], rx_data};
          left_q <= left_q - 1'b1;
          if (left_q == 1) begin
            ftw     <= FTW_W'({load_q, rx_data});
            state_q <= OPCODE;
          end
        end
        WAVE: begin
          if (rx_data <= 8'(WAVE_SQUARE)) wave <= wave_e'(rx_data[1:0]);
          state_q <= OPCODE;
        end
        default: state_q <= OPCODE;
      endcase
    end
  end

endmodule
