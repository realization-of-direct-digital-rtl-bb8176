// tb_reset_timer: with a prescaler of 5 and 12 ticks the reset pulse must
// last 60 clocks after reset and again after a trigger; with the default
// sizes it must last 488*32768 clocks, about one second at 16 MHz.
module tb_reset_timer;
  logic clk = 0, rst = 1, trigger = 0, fpga_rst, fpga_rst_big;
  int checks = 0, failures = 0, len;

  reset_timer #(.PRESCALE(5), .PERIOD(12)) dut (.clk, .rst, .trigger, .fpga_rst);
  reset_timer big (.clk, .rst, .trigger(1'b0), .fpga_rst(fpga_rst_big));

  always #5 clk = ~clk;

  initial begin
    #200ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic measure(ref logic sig, input int want, input string what);
    len = 0;
    while (sig) begin @(negedge clk); len++; end
    checks++;
    if (len != want) begin failures++; $display("%s: %0d clocks, want %0d", what, len, want); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    checks++; if (!fpga_rst) begin failures++; $display("low during reset"); end
    rst = 0;
    measure(fpga_rst, 60, "after reset");
    repeat (30) @(negedge clk);
    checks++; if (fpga_rst) begin failures++; $display("pulse came back"); end
    trigger = 1; @(negedge clk); trigger = 0;
    measure(fpga_rst, 60, "after trigger");
    // Default timer: the FPGA reset lasts 488 * 32768 cycles.
    while (fpga_rst_big) @(negedge clk);
    checks++;
    if ($time / 10 < 488 * 32768 || $time / 10 > 488 * 32768 + 600) begin
      failures++; $display("default pulse ended at cycle %0d", $time / 10);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
