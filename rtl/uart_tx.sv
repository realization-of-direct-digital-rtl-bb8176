// uart_tx: 8N1 UART transmitter.
//
// A byte offered on data/valid is taken when ready is high (valid and
// ready in the same cycle) and sent as one start bit (0), eight data bits
// LSB first and one stop bit (1); the line idles high. Each bit lasts
// round(CLK_HZ/BAUD) clocks, so a byte takes ten bit times; the next one
// can be taken in the last clock of the stop bit, so a continuous stream
// has no idle time between frames. The link runs at
// 37.5 kbit/s, the rate at which the FPGA-PSoC link was found reliable;
// the 8N1 frame and the 16 MHz clock are this design's choices.
//
// ready is high when the transmitter is idle or ends its stop bit.
module uart_tx
  import dds_pkg::*;
#(
  parameter int unsigned CLK_HZ = 16_000_000,
  parameter int unsigned BAUD   = 37_500
) (
  input  logic       clk,
  input  logic       rst,
  input  logic [7:0] data,
  input  logic       valid,
  output logic       ready,
  output logic       tx
);

  localparam int unsigned BIT_CLKS = clks_per_bit(CLK_HZ, BAUD);
  localparam int unsigned CNT_W    = $clog2(BIT_CLKS);

  logic [8:0]       shift_q;   // {data, start bit}; stop bit shifted in
  logic [3:0]       bits_q;    // bits still to send, 0 = idle
  logic [CNT_W-1:0] cnt_q;

  // Idle, or in the last clock of the stop bit: a new byte can start on
  // the next edge, so back-to-back bytes take exactly ten bit times.
  assign ready = (bits_q == 4'd0) || (bits_q == 4'd1 && cnt_q == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      shift_q <= '1;
      bits_q  <= 4'd0;
      cnt_q   <= '0;
      tx      <= 1'b1;
    end else if (ready) begin
      if (valid) begin
        tx      <= 1'b0;                 // start bit
        shift_q <= {1'b1, data};         // data bits, then the stop bit
        bits_q  <= 4'd10;
        cnt_q   <= CNT_W'(BIT_CLKS - 1);
      end else begin
        tx      <= 1'b1;
        bits_q  <= 4'd0;
      end
    end else if (cnt_q != '0) begin
      cnt_q <= cnt_q - 1'b1;
    end else begin
      bits_q  <= bits_q - 1'b1;
      tx      <= shift_q[0];
      shift_q <= {1'b1, shift_q[8:1]};
      cnt_q   <= CNT_W'(BIT_CLKS - 1);
    end
  end

endmodule
