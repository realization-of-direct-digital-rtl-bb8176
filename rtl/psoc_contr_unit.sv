// psoc_contr_unit: command decoder of the PSoC.
//
// It waits for a valid command from the PC (USB byte stream). A frame is
// an opcode byte and its payload: 'F' + four tuning-word bytes, 'W' + one
// waveform byte (0..2), 'G' + one gain byte (0..15). A gain command sets
// the 4-bit PGA gain register (16 levels). A waveform or frequency command
// is sent on, byte for byte, to the FPGA through the UART transmitter;
// meanwhile usb_ready is low and the PC stream is stalled. A frame with an
// unknown opcode or an out-of-range data byte is dropped (cmd_dropped
// pulses) and the unit goes back to waiting. This is the decision loop of
// the control unit (valid command? gain -> PGA, waveform/frequency ->
// FPGA), which the original runs as PSoC firmware; the frame encoding and
// the handshake are this design's own.
//
// Timing: usb_data is taken when usb_valid and usb_ready are both high.
// gain changes on the edge after the 'G' payload byte is taken. A
// forwarded frame starts on tx_data one cycle after its last byte is taken.
module psoc_contr_unit
  import dds_pkg::*;
(
  input  logic              clk,
  input  logic              rst,
  input  logic [7:0]        usb_data,
  input  logic              usb_valid,
  output logic              usb_ready,
  output logic [7:0]        tx_data,
  output logic              tx_valid,
  input  logic              tx_ready,
  output logic [GAIN_W-1:0] gain,
  output logic              cmd_dropped
);

  localparam int unsigned FRAME_BYTES = 1 + FTW_BYTES;
  localparam int unsigned IDX_W       = $clog2(FRAME_BYTES + 1);

  typedef enum logic [1:0] {WAIT_OP, PAYLOAD, SEND} state_e;

  state_e           state_q;
  logic [7:0]       frame_q [FRAME_BYTES];
  logic [IDX_W-1:0] len_q;     // bytes in the frame
  logic [IDX_W-1:0] idx_q;     // bytes received / sent so far

  logic take;
  assign usb_ready = (state_q != SEND);
  assign take      = usb_valid && usb_ready;
  assign tx_valid  = (state_q == SEND);
  assign tx_data   = frame_q[idx_q[$clog2(FRAME_BYTES)-1:0]];

  always_ff @(posedge clk) begin
    cmd_dropped <= 1'b0;
    if (rst) begin
      state_q <= WAIT_OP;
      len_q   <= '0;
      idx_q   <= '0;
      gain    <= '0;
      for (int i = 0; i < int'(FRAME_BYTES); i++) frame_q[i] <= '0;
    end else begin
      case (state_q)
        WAIT_OP: if (take) begin
          frame_q[0] <= usb_data;
          idx_q      <= IDX_W'(1);
          len_q      <= IDX_W'(1 + payload_len(usb_data));
          if (payload_len(usb_data) == 0) cmd_dropped <= 1'b1;
          else                            state_q     <= PAYLOAD;
        end
        PAYLOAD: if (take) begin
          frame_q[idx_q[$clog2(FRAME_BYTES)-1:0]] <= usb_data;
          idx_q <= idx_q + 1'b1;
          if (idx_q + 1'b1 == len_q) begin
            state_q <= WAIT_OP;
            idx_q   <= '0;
            if (frame_q[0] == OP_GAIN) begin
              if (usb_data < 8'(1 << GAIN_W)) gain <= usb_data[GAIN_W-1:0];
              else                            cmd_dropped <= 1'b1;
            end else if (frame_q[0] == OP_WAVE && usb_data > 8'(WAVE_SQUARE)) begin
              cmd_dropped <= 1'b1;
            end else begin
              state_q <= SEND;               // valid FPGA command
            end
          end
        end
        SEND: if (tx_ready) begin
          idx_q <= idx_q + 1'b1;
          if (idx_q + 1'b1 == len_q) begin
            state_q <= WAIT_OP;
            idx_q   <= '0;
          end
        end
        default: state_q <= WAIT_OP;
      endcase
    end
  end

  // The UART handshake: an offered byte stays stable until it is taken.
  a_tx_stable: assert property (@(posedge clk) disable iff (rst)
    tx_valid && !tx_ready |=> tx_valid && $stable(tx_data));

endmodule
