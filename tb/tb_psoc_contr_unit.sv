// tb_psoc_contr_unit: random streams of gain, waveform, frequency and
// invalid commands. Gain commands must set the gain; waveform and
// frequency frames must come out unchanged, in order, on the UART side
// while the USB input is stalled; invalid frames must be dropped with a
// cmd_dropped pulse. The UART side takes bytes with random delays.
module tb_psoc_contr_unit;
  import dds_pkg::*;
  logic clk = 0, rst = 1, usb_valid = 0, usb_ready, tx_valid, tx_ready = 0, cmd_dropped;
  logic [7:0] usb_data = '0, tx_data;
  logic [GAIN_W-1:0] gain;
  logic [7:0] fwd [$];
  int checks = 0, failures = 0, exp_gain = 0, drops_sent = 0, drops_seen = 0;
  int stalls = 0, n_gain = 0, n_fwd = 0;

  psoc_contr_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // UART side: accepts with random delay, compares with the expected bytes.
  always @(posedge clk) if (!rst) begin
    if (cmd_dropped) drops_seen++;
    if (usb_valid && !usb_ready) stalls++;
    if (tx_valid && tx_ready) begin
      checks++;
      if (fwd.size() == 0) begin failures++; $display("unexpected tx %h", tx_data); end
      else if (tx_data !== fwd[0]) begin failures++; $display("tx %h want %h", tx_data, fwd[0]); end
      if (fwd.size() != 0) void'(fwd.pop_front());
    end
  end
  always @(negedge clk) tx_ready = ($urandom_range(0, 3) == 0);

  task automatic put(logic [7:0] b);
    @(negedge clk) begin usb_data = b; usb_valid = 1; end
    @(posedge clk);
    while (!usb_ready) @(posedge clk);
    @(negedge clk) usb_valid = 0;
  endtask

  initial begin
    logic [7:0] f [5];
    int len;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 400; n++) begin
      case ($urandom_range(0, 4))
        0: begin                                   // gain, valid or not
          f[0] = OP_GAIN; f[1] = (n % 5 == 0) ? 8'($urandom_range(16, 255)) : 8'($urandom_range(0, 15));
          put(f[0]); put(f[1]);
          if (f[1] < 16) begin exp_gain = f[1]; n_gain++; end else drops_sent++;
          repeat (2) @(negedge clk);
          checks++;
          if (int'(gain) != exp_gain) begin failures++; $display("gain %0d want %0d", gain, exp_gain); end
        end
        1, 2: begin                                // waveform / frequency
          len = (n % 2) ? 5 : 2;
          f[0] = (len == 5) ? OP_FREQ : OP_WAVE;
          for (int i = 1; i < len; i++) f[i] = $urandom();
          if (len == 2) f[1] = 8'($urandom_range(0, 2));
          for (int i = 0; i < len; i++) fwd.push_back(f[i]);
          for (int i = 0; i < len; i++) put(f[i]);
          n_fwd++;
        end
        3: begin                                   // bad waveform code
          put(OP_WAVE); put(8'($urandom_range(3, 255))); drops_sent++;
        end
        default: begin                             // unknown opcode
          f[0] = $urandom();
          if (payload_len(f[0]) == 0) begin put(f[0]); drops_sent++; end
        end
      endcase
    end
    repeat (100) @(posedge clk);
    checks++; if (fwd.size() != 0) begin failures++; $display("%0d bytes not sent", fwd.size()); end
    checks++; if (drops_seen != drops_sent) begin failures++; $display("drops %0d of %0d", drops_seen, drops_sent); end
    checks++; if (stalls == 0 || n_gain == 0 || n_fwd == 0) begin failures++; $display("a case never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
