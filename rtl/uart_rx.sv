// uart_rx: 8N1 UART receiver.
//
// The line is brought into the clock domain by two flip-flops. A falling
// edge starts a frame; the start bit is checked again half a bit later,
// and each following bit is sampled in its middle, one bit time
// (round(CLK_HZ/BAUD) clocks) apart, LSB first. If the stop bit is high
// the byte is presented on data with a one-cycle valid pulse; if it is
// low the byte is dropped and frame_err pulses. Frame format, sampling
// point and error handling are this design's choices; the 37.5 kbit/s
// rate is the one the FPGA-PSoC link was found to support.
//
// Timing: valid rises about 9.5 bit times plus three clocks after the
// falling edge of the start bit. data holds until the next byte.
module uart_rx
  import dds_pkg::*;
#(
  parameter int unsigned CLK_HZ = 16_000_000,
  parameter int unsigned BAUD   = 37_500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       rx,
  output logic [7:0] data,
  output logic       valid,
  output logic       frame_err
);

  localparam int unsigned BIT_CLKS = clks_per_bit(CLK_HZ, BAUD);
  localparam int unsigned CNT_W    = $clog2(BIT_CLKS);

  typedef enum logic [1:0] {IDLE, START, DATA, STOP} state_e;

  state_e           state_q;
  logic [1:0]       sync_q;
  logic [CNT_W-1:0] cnt_q;
  logic [2:0]       idx_q;
  logic [7:0]       shift_q;
  logic             rx_s;

  assign rx_s = sync_q[1];

  always_ff @(posedge clk) begin
    if (rst) sync_q <= 2'b11;
    else     sync_q <= {sync_q[0], rx};
  end

  always_ff @(posedge clk) begin
    valid     <= 1'b0;
    frame_err <= 1'b0;
    if (rst) begin
      state_q <= IDLE;
      cnt_q   <= '0;
      idx_q   <= '0;
      shift_q <= '0;
      data    <= '0;
    end else begin
      case (state_q)
        IDLE: if (!rx_s) begin
          state_q <= START;
          cnt_q   <= CNT_W'(BIT_CLKS / 2 - 1);
        end
        START: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else if (rx_s) state_q <= IDLE;          // glitch, not a start bit
          else begin
            state_q <= DATA;
            idx_q   <= '0;
            cnt_q   <= CNT_W'(BIT_CLKS - 1);
          end
        DATA: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            shift_q <= {rx_s, shift_q[7:1]};
            cnt_q   <= CNT_W'(BIT_CLKS - 1);
            idx_q   <= idx_q + 1'b1;
            if (idx_q == 3'd7) state_q <= STOP;
          end
        STOP: if (cnt_q != '0) cnt_q <= cnt_q - 1'b1;
          else begin
            state_q <= IDLE;
            if (rx_s) begin
              data  <= shift_q;
              valid <= 1'b1;
            end else begin
              frame_err <= 1'b1;
            end
          end
        default: state_q <= IDLE;
      endcase
    end
  end

endmodule
