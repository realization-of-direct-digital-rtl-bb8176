// tb_psoc_digital: the PSoC digital half at 8 clocks per UART bit with a
// short reset timer (3 x 20 clocks). Checks the FPGA reset pulse length,
// that serial sample bytes land in the DAC register with a strobe, that a
// bad frame raises link_err and leaves the DAC alone, that gain commands
// set the PGA gain, that waveform and frequency commands leave on tx as
// serial frames, and that invalid commands are dropped.
module tb_psoc_digital;
  import dds_pkg::*;
  localparam int unsigned CLK_HZ = 800_000, BAUD = 100_000, BIT = 8;
  logic clk = 0, rst = 1, rx = 1, tx, usb_valid = 0, usb_ready;
  logic dac_strobe, fpga_rst, cmd_dropped, link_err;
  logic [7:0] usb_data = '0, dac_code;
  logic [GAIN_W-1:0] pga_gain;
  int checks = 0, failures = 0, rst_len = 0, drops = 0, lerr = 0, strobes = 0;
  logic [7:0] txq [$];

  psoc_digital #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .PRESCALE(3), .PERIOD(20)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (fpga_rst) rst_len++;
    if (cmd_dropped) drops++;
    if (link_err) lerr++;
    if (dac_strobe) strobes++;
  end

  // Decoder of the command frames sent to the FPGA.
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tx; end
      repeat (BIT) @(posedge clk);
      checks++;
      if (txq.size() == 0 || b !== txq[0]) begin failures++; $display("tx byte %h", b); end
      if (txq.size() != 0) void'(txq.pop_front());
    end
  end

  task automatic send(logic [7:0] b, bit stop);
    @(negedge clk) rx = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT) @(negedge clk); end
    rx = stop;
    repeat (BIT) @(negedge clk);
    rx = 1;
    repeat (2) @(negedge clk);
  endtask

  task automatic usb(logic [7:0] b);
    @(negedge clk) begin usb_data = b; usb_valid = 1; end
    @(posedge clk);
    while (!usb_ready) @(posedge clk);
    @(negedge clk) usb_valid = 0;
  endtask

  initial begin
    logic [7:0] b, prev;
    repeat (3) @(negedge clk);
    rst = 0;
    repeat (100) @(negedge clk);
    checks++;
    if (rst_len != 60) begin failures++; $display("fpga reset %0d clocks", rst_len); end
    // Samples from the FPGA into the DAC register.
    for (int n = 0; n < 30; n++) begin
      b = $urandom();
      prev = dac_code;
      send(b, n % 10 != 7);
      checks++;
      if (n % 10 == 7) begin
        if (dac_code !== prev) begin failures++; $display("bad frame reached the DAC"); end
      end else if (dac_code !== b) begin failures++; $display("dac %h want %h", dac_code, b); end
    end
    checks++; if (lerr != 3 || strobes != 27) begin failures++; $display("link_err %0d strobes %0d", lerr, strobes); end
    // Commands from the PC.
    usb(OP_GAIN); usb(8'd9);
    repeat (3) @(negedge clk);
    checks++; if (pga_gain != 9) begin failures++; $display("gain %0d", pga_gain); end
    txq.push_back(OP_WAVE); txq.push_back(8'd2);
    usb(OP_WAVE); usb(8'd2);
    txq.push_back(OP_FREQ); txq.push_back(8'h12); txq.push_back(8'h34);
    txq.push_back(8'h56); txq.push_back(8'h78);
    usb(OP_FREQ); usb(8'h12); usb(8'h34); usb(8'h56); usb(8'h78);
    usb(8'h00);                       // unknown opcode
    usb(OP_GAIN); usb(8'd40);         // gain out of range
    repeat (80 * BIT) @(negedge clk);
    checks++; if (txq.size() != 0) begin failures++; $display("%0d command bytes not sent", txq.size()); end
    checks++; if (drops != 2 || pga_gain != 9) begin failures++; $display("drops %0d gain %0d", drops, pga_gain); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
