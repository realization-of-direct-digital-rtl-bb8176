// tb_phase_accumulator: random tuning words, offsets and enables; the
// phase is compared every cycle with a 32-bit model of the accumulator.
module tb_phase_accumulator;
  localparam int unsigned N = 32;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] ftw_i = '0, phase_i = '0, phase_o;
  logic [N-1:0] acc;
  int checks = 0, failures = 0, wraps = 0;

  phase_accumulator #(.FTW_W(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    acc = '0;
    repeat (3) @(posedge clk);
    rst <= 0;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      if (en) begin                 // the update made at the last edge
        if (N'(acc + ftw_i) < acc) wraps++;
        acc = acc + ftw_i;
      end
      if (phase_o !== N'(acc + phase_i)) begin
        failures++;
        if (failures < 10) $display("mismatch %0d: %h vs %h", i, phase_o, acc + phase_i);
      end
      checks++;
      en      = ($urandom_range(0, 3) != 0);
      ftw_i   = (i < 2500) ? $urandom() : $urandom_range(0, 1000);
      phase_i = (i % 7 == 0) ? $urandom() : '0;
    end
    // f0 = M*fc/2^n: with M = 2^28 the phase wraps every 16 updates.
    rst = 1; @(negedge clk); rst = 0; acc = '0;
    ftw_i = 32'h1000_0000; phase_i = '0; en = 1;
    repeat (16) @(negedge clk);
    checks++;
    if (phase_o !== '0) begin failures++; $display("no wrap after 16 updates"); end
    if (wraps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
