// tb_dds_core: runs the core with random sample enables, tuning words and
// waveform switches, comparing every enabled output sample with the
// reference pipeline model, and checks that a sine with tuning word
// 2^32/64 repeats every 64 samples (f0 = M*fs/2^n).
module tb_dds_core;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned N = 32, M = 10, P = 8;
  logic clk = 0, rst = 1, sample_en = 0;
  logic [N-1:0] ftw = '0;
  wave_e wave = WAVE_SINE;
  logic [P-1:0] sample;
  int checks = 0, failures = 0;
  int seen [3] = '{0, 0, 0};
  core_model mdl = new(N, M, P);
  logic [P-1:0] sine_hist [$];

  dds_core #(.FTW_W(N), .PHASE_W(M), .AMPL_W(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 6000; i++) begin
      if (i % 300 == 0) wave = wave_e'(i / 300 % 3);
      if (i % 97 == 0) ftw = (i < 3000) ? $urandom() : $urandom_range(0, 1 << 24);
      if (i >= 5000) begin ftw = 32'h0400_0000; wave = WAVE_SINE; end
      sample_en = ($urandom_range(0, 2) != 0);
      @(posedge clk); #1;
      if (sample_en) begin
        mdl.step(longint'(ftw), int'(wave));
        seen[int'(wave)]++;
        checks++;
        if (int'(sample) != int'(mdl.sample)) begin
          failures++;
          if (failures < 10) $display("%0d wave %0d: got %0d want %0d", i, wave, sample, mdl.sample);
        end
        if (i >= 5100) sine_hist.push_back(sample);
      end
      @(negedge clk);
    end
    // 2^32 / 2^26 = 64 samples per period.
    checks++;
    for (int k = 64; k < sine_hist.size(); k++)
      if (sine_hist[k] != sine_hist[k - 64]) begin failures++; $display("period not 64"); break; end
    checks++;
    if (seen[0] == 0 || seen[1] == 0 || seen[2] == 0) begin failures++; $display("a waveform never ran"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
