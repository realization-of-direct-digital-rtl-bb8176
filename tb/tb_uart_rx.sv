// tb_uart_rx: drives 8N1 frames into the receiver at 32 clocks per bit,
// with a sender about 3 % fast and 3 % slow, a short glitch that is
// not a start bit and frames with a bad stop bit. Every good byte must
// come out once with valid, every bad frame must pulse frame_err only.
module tb_uart_rx;
  localparam int unsigned CLK_HZ = 3_200_000, BAUD = 100_000, BIT = 32;
  logic clk = 0, rst = 1, rx = 1, valid, frame_err;
  logic [7:0] data;
  int checks = 0, failures = 0, nvalid = 0, nerr = 0;
  logic [7:0] expq [$];

  uart_rx #(.CLK_HZ(CLK_HZ), .BAUD(BAUD)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (!rst) begin
    if (valid) begin
      nvalid++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("unexpected byte %h", data); end
      else begin
        logic [7:0] w;
        w = expq.pop_front();
        if (data !== w) begin failures++; $display("wrong byte %h want %h", data, w); end
      end
    end
    if (frame_err) nerr++;
  end

  task automatic send(logic [7:0] b, bit stop, int bitclk);
    @(negedge clk) rx = 0;
    repeat (bitclk) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (bitclk) @(negedge clk); end
    rx = stop;
    repeat (bitclk) @(negedge clk);
    rx = 1;
    repeat (bitclk) @(negedge clk);
  endtask

  initial begin
    logic [7:0] b;
    int errs_sent;
    errs_sent = 0;
    repeat (3) @(posedge clk);
    rst <= 0;
    repeat (5) @(posedge clk);
    for (int n = 0; n < 80; n++) begin
      b = $urandom();
      if (n % 10 == 9) begin
        send(b, 0, BIT);            // bad stop bit
        errs_sent++;
      end else begin
        expq.push_back(b);
        send(b, 1, (n % 3 == 0) ? BIT - 1 : (n % 3 == 1) ? BIT + 1 : BIT);
      end
      if (n == 40) begin            // 3-clock glitch: no frame may start
        @(negedge clk) rx = 0;
        repeat (3) @(negedge clk);
        rx = 1;
        repeat (2 * BIT) @(negedge clk);
      end
    end
    repeat (20 * BIT) @(posedge clk);
    checks++;
    if (expq.size() != 0) begin failures++; $display("%0d bytes missing", expq.size()); end
    checks++;
    if (nerr != errs_sent) begin failures++; $display("frame errors %0d of %0d", nerr, errs_sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
