// tb_sine_wave: sweeps every phase of the 10-bit circle one step per
// sample and then runs random tuning words, comparing the amplitude with a
// full-circle $sin reference, two enabled updates after the phase.
module tb_sine_wave;
  import dds_ref_pkg::*;
  localparam int unsigned N = 32, M = 10, P = 8;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] ftw_i = '0, phase_i = '0, phase_o;
  logic signed [P-1:0] ampl_o;
  logic [N-1:0] hist [$];
  int checks = 0, failures = 0, maxv = -1000, minv = 1000;

  sine_wave #(.FTW_W(N), .PHASE_W(M), .AMPL_W(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int updates, bit random_ftw);
    int exp;
    for (int i = 0; i < updates; i++) begin
      @(negedge clk);
      if (random_ftw && i % 50 == 0) ftw_i = $urandom();
      en = ($urandom_range(0, 4) != 0);
      @(posedge clk); #1;
      if (en) begin
        hist.push_back(phase_o);   // value after this update
        if (hist.size() > 3) void'(hist.pop_front());
        if (hist.size() == 3) begin
          exp = sine_ref(32'(hist[0] >> (N - M)), M, P);
          checks++;
          if (int'(ampl_o) != exp) begin
            failures++;
            if (failures < 10) $display("phase %0d: got %0d want %0d", hist[0] >> (N-M), ampl_o, exp);
          end
          if (int'(ampl_o) > maxv) maxv = int'(ampl_o);
          if (int'(ampl_o) < minv) minv = int'(ampl_o);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    hist.push_back('0);            // accumulator value right after reset
    ftw_i = N'(1) << (N - M);      // one table phase per update
    run(1024 * 5 / 4 + 8, 0);
    checks++;
    if (maxv != 127 || minv != -127) begin
      failures++; $display("range %0d..%0d", minv, maxv);
    end
    run(3000, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
