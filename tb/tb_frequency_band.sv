// tb_frequency_band: the FPGA half at its default sizes (16 MHz clock,
// 37.5 kbit/s link, 32-bit tuning word) produces square waves at 20, 114
// and 200 Hz, the range the generator is used over. The tuning word for
// f is round(f * 2^32 / fs) with fs = 16 MHz / 427 / 10. The sample
// stream on tx is decoded serially; over several periods the number of
// samples between rising edges of the sample MSB must match 2^32/ftw per
// period to within one sample, and samples must arrive every ten bit
// times (4270 clocks).
module tb_frequency_band;
  import dds_pkg::*;
  localparam int unsigned BIT = 427;
  localparam real FS = 16.0e6 / 427.0 / 10.0;
  logic clk = 0, rst = 1, rx = 1, tx;
  int checks = 0, failures = 0, nbytes = 0, bad_gap = 0;
  longint cycle = 0, last_start = -1;
  logic [7:0] last_byte = 8'h80;
  event byte_done;

  dds_fpga dut (.*);

  always #31.25ns clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin
    #1500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Serial decoder: one byte per frame, spacing checked.
  initial begin
    logic [7:0] b;
    forever begin
      @(negedge tx);
      if (last_start >= 0 && cycle - last_start != 10 * BIT) bad_gap++;
      last_start = cycle;
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tx; end
      repeat (BIT) @(posedge clk);
      last_byte = b;
      nbytes++;
      -> byte_done;
    end
  end

  task automatic send(logic [7:0] b);
    @(negedge clk) rx = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT) @(negedge clk); end
    rx = 1;
    repeat (BIT) @(negedge clk);
  endtask

  task automatic set_freq(logic [31:0] w);
    send(OP_FREQ);
    for (int i = 3; i >= 0; i--) send(w[8*i +: 8]);
  endtask

  // Samples counted from one rising MSB edge to the K-th next one.
  task automatic measure(input int k, output int samples);
    logic prev;
    int edges;
    prev = 1'b1;
    edges = -1;
    samples = 0;
    while (edges < k) begin
      @(byte_done);
      if (edges >= 0) samples++;
      if (last_byte[7] && !prev) edges++;
      prev = last_byte[7];
    end
  endtask

  initial begin
    real freqs [3] = '{20.0, 114.0, 200.0};
    int   periods [3] = '{3, 6, 8};
    logic [31:0] w;
    int n;
    real want;
    repeat (5) @(negedge clk);
    rst = 0;
    send(OP_WAVE); send(8'(WAVE_SQUARE));
    foreach (freqs[i]) begin
      w = 32'($rtoi(freqs[i] * 4294967296.0 / FS + 0.5));
      set_freq(w);
      measure(1, n);                          // settle on the new word
      measure(periods[i], n);
      want = real'(periods[i]) * 4294967296.0 / real'(w);
      checks++;
      if (real'(n) < want - 1.0 || real'(n) > want + 1.0) begin
        failures++;
        $display("%0.0f Hz: %0d samples in %0d periods, want %0.2f", freqs[i], n, periods[i], want);
      end
      $display("%0.0f Hz requested: ftw %0d, measured %0.2f Hz", freqs[i], w,
               FS * real'(periods[i]) / real'(n));
    end
    checks++;
    if (bad_gap != 0) begin failures++; $display("%0d samples off the 4270-clock grid", bad_gap); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
