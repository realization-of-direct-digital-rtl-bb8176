// tb_dds_generator: end-to-end run of the whole generator at its default
// sizes (16 MHz clock, 37.5 kbit/s link, 32-bit tuning word, 256-entry
// quarter-sine table, 1 s FPGA reset pulse).
//
// The PC side is played through the usb_* byte stream: gain 12, an
// unknown command (must be dropped), sine at 114 Hz, then triangle and
// square. Every byte the PSoC writes to dac_code is compared with a
// reference DDS model that advances once per sample the FPGA transmits.
// The square wave's period on dac_code is measured against
// f0 = ftw * fs / 2^32 with fs = 16 MHz / 427 / 10. Each mechanism (FPGA
// reset pulse, gain command, dropped command, USB stall while a command is
// forwarded, waveform switch to each shape, frequency retune) is counted
// and must occur at least once. Samples must reach the DAC register every
// ten bit times (4270 clocks, 3747 samples/s).
module tb_dds_generator;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned CLK_HZ = 16_000_000, BIT = 427;
  localparam int unsigned SAMPLE_CLKS = 10 * BIT;
  logic clk = 0, rst = 1, usb_valid = 0, usb_ready;
  logic [7:0] usb_data = '0, dac_code;
  logic dac_strobe, fpga_rst, cmd_dropped, link_err;
  logic [GAIN_W-1:0] pga_gain;
  int checks = 0, failures = 0, nsamples = 0;
  int n_reset = 0, n_gain = 0, n_drop = 0, n_stall = 0, n_retune = 0;
  int n_wave [3] = '{0, 0, 0};
  longint rst_cycles = 0, cycle = 0, last_strobe = -1;
  int bad_gap = 0;
  core_model mdl = new(32, 10, 8);
  logic [7:0] expq [$];
  logic [31:0] ftw_114;

  dds_generator dut (.*);

  always #31.25ns clk = ~clk;          // 16 MHz

  initial begin
    #1500ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycle++;
    if (!rst && fpga_rst) rst_cycles++;
    if (!rst && cmd_dropped) n_drop++;
    if (usb_valid && !usb_ready) n_stall++;
    if (dut.u_fpga.rst) mdl.reset();
    else if (dut.u_fpga.tx_ready) begin
      expq.push_back(8'(mdl.sample));
      mdl.step(longint'(dut.u_fpga.ftw), int'(dut.u_fpga.wave));
    end
    if (dac_strobe) begin
      if (last_strobe >= 0 && cycle - last_strobe != SAMPLE_CLKS) bad_gap++;
      last_strobe = cycle;
      nsamples++;
      checks++;
      if (expq.size() == 0) begin failures++; $display("sample without source"); end
      else begin
        if (dac_code !== expq[0]) begin
          failures++;
          if (failures < 10) $display("sample %0d: dac %h want %h", nsamples, dac_code, expq[0]);
        end
        void'(expq.pop_front());
      end
    end
  end

  task automatic usb(logic [7:0] b);
    @(negedge clk) begin usb_data = b; usb_valid = 1; end
    @(posedge clk);
    while (!usb_ready) @(posedge clk);
    @(negedge clk) usb_valid = 0;
  endtask

  task automatic cmd_wave(wave_e w);
    usb(OP_WAVE); usb(8'(w));
    repeat (3 * SAMPLE_CLKS) @(negedge clk);
    checks++;
    if (dut.u_fpga.wave !== w) begin failures++; $display("wave not set"); end
    else n_wave[int'(w)]++;
  endtask

  // Cycles between rising edges of the DAC MSB (start of a period).
  task automatic period(output longint p);
    longint t0;
    @(posedge dac_code[7]); t0 = cycle;
    @(posedge dac_code[7]); p = cycle - t0;
  endtask

  initial begin
    longint p, want;
    // ftw for 114 Hz at fs = 16e6/427/10 samples/s: 114 * 2^32 / fs.
    ftw_114 = 32'($rtoi(114.0 * 4294967296.0 / (16.0e6 / 427.0 / 10.0) + 0.5));
    repeat (5) @(negedge clk);
    rst = 0;
    @(negedge fpga_rst);
    n_reset++;
    checks++;
    if (rst_cycles < 488 * 32768 - 488 || rst_cycles > 488 * 32768 + 488) begin
      failures++; $display("FPGA reset lasted %0d cycles", rst_cycles);
    end
    usb(OP_GAIN); usb(8'd12);
    repeat (3) @(negedge clk);
    checks++;
    if (pga_gain != 12) begin failures++; $display("gain %0d", pga_gain); end else n_gain++;
    usb(8'h3F);                                  // not a command
    usb(OP_FREQ);
    for (int i = 3; i >= 0; i--) usb(ftw_114[8*i +: 8]);
    cmd_wave(WAVE_SINE);
    checks++;
    if (dut.u_fpga.ftw !== ftw_114) begin failures++; $display("ftw not set"); end else n_retune++;
    period(p);                                   // about 8.8 ms per period
    period(p);
    cmd_wave(WAVE_TRIANGLE);
    period(p); period(p);
    cmd_wave(WAVE_SQUARE);
    period(p); period(p);
    // Sine/square period in samples is 2^32/ftw (32.9 at 114 Hz): allow
    // the one-sample rounding of where the edge falls.
    want = longint'(4294967296.0 / real'(ftw_114) * real'(SAMPLE_CLKS));
    checks++;
    if (p < want - SAMPLE_CLKS || p > want + SAMPLE_CLKS) begin
      failures++; $display("period %0d cycles, want about %0d", p, want);
    end
    $display("square period %0d cycles = %.2f Hz", p, real'(CLK_HZ) / real'(p));
    checks++;
    if (bad_gap != 0) begin failures++; $display("%0d samples off the 4270-clock grid", bad_gap); end
    checks++;
    if (n_reset == 0 || n_gain == 0 || n_drop == 0 || n_stall == 0 || n_retune == 0 ||
        n_wave[0] == 0 || n_wave[1] == 0 || n_wave[2] == 0) begin
      failures++; $display("a mechanism never happened");
    end
    $display("reset=%0d gain=%0d dropped=%0d stall_cycles=%0d retune=%0d sine=%0d triangle=%0d square=%0d samples=%0d",
             n_reset, n_gain, n_drop, n_stall, n_retune, n_wave[0], n_wave[1], n_wave[2], nsamples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
