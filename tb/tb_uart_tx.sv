// tb_uart_tx: sends random bytes with random gaps at 16 clocks per bit,
// samples the line in the middle of every bit and checks start bit, data
// (LSB first), stop bit, and that ready is low for ten bit times less
// one clock per byte (the next byte is taken in the stop bit's last clock).
module tb_uart_tx;
  localparam int unsigned CLK_HZ = 1_600_000, BAUD = 100_000, BIT = 16;
  logic clk = 0, rst = 1, valid = 0, ready, tx;
  logic [7:0] data = '0;
  int checks = 0, failures = 0, busy_cycles;

  uart_tx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Receiver model: waits for the start edge, samples mid-bit.
  logic [7:0] sent [$];
  initial begin
    logic [7:0] b;
    logic [7:0] want;
    forever begin
      @(negedge tx);
      if (rst) continue;
      repeat (BIT / 2) @(posedge clk);
      #1;
      checks++; if (tx !== 1'b0) begin failures++; $display("bad start bit"); end
      for (int i = 0; i < 8; i++) begin
        repeat (BIT) @(posedge clk); #1;
        b[i] = tx;
      end
      repeat (BIT) @(posedge clk); #1;
      checks++; if (tx !== 1'b1) begin failures++; $display("bad stop bit"); end
      want = sent.pop_front();
      checks++;
      if (b !== want) begin failures++; $display("got %h want %h", b, want); end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst <= 0;
    @(posedge clk);
    checks++; if (tx !== 1'b1 || ready !== 1'b1) begin failures++; $display("not idle"); end
    for (int n = 0; n < 60; n++) begin
      @(negedge clk);
      while (!ready) @(negedge clk);
      data  = $urandom();
      valid = 1;                    // taken at the next rising edge
      sent.push_back(data);
      @(negedge clk);
      valid = 0;
      busy_cycles = 0;
      while (!ready) begin @(negedge clk); busy_cycles++; end
      checks++;
      if (busy_cycles != 10 * BIT - 1) begin
        failures++; $display("byte took %0d clocks", busy_cycles);
      end
      if (n % 2 == 0) repeat ($urandom_range(0, 40)) @(negedge clk);
    end
    repeat (12 * BIT) @(posedge clk);
    checks++; if (sent.size() != 0) begin failures++; $display("bytes not seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
