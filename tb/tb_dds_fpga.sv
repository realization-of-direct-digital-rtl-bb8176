// tb_dds_fpga: the FPGA half at 8 clocks per UART bit. Commands are sent
// as serial frames on rx; the sample stream on tx is decoded and every
// byte is compared with the reference DDS model, which advances once per
// byte taken by the transmitter. Checks also that each command reaches
// the tuning word / waveform, that samples leave back to back (one byte
// every ten bit times), and that a sine of tuning word 2^32/32 repeats
// every 32 bytes.
module tb_dds_fpga;
  import dds_pkg::*;
  import dds_ref_pkg::*;
  localparam int unsigned CLK_HZ = 800_000, BAUD = 100_000, BIT = 8;
  localparam int unsigned N = 32, M = 10, P = 8;
  logic clk = 0, rst = 1, rx = 1, tx;
  int checks = 0, failures = 0, nbytes = 0, last_start = -1, gap_bad = 0;
  core_model mdl = new(N, M, P);
  logic [7:0] expq [$];
  logic [7:0] got [$];

  dds_fpga #(.CLK_HZ(CLK_HZ), .BAUD(BAUD), .FTW_W(N), .PHASE_W(M), .AMPL_W(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: one model step per byte the transmitter takes.
  always @(posedge clk) if (!rst && dut.tx_ready) begin
    expq.push_back(8'(mdl.sample));
    mdl.step(longint'(dut.ftw), int'(dut.wave));
  end

  // Serial decoder on tx.
  initial begin
    logic [7:0] b;
    int t0;
    forever begin
      @(negedge tx);
      t0 = int'($time / 10);
      if (last_start >= 0 && t0 - last_start != 10 * BIT) gap_bad++;
      last_start = t0;
      repeat (BIT / 2) @(posedge clk);
      for (int i = 0; i < 8; i++) begin repeat (BIT) @(posedge clk); b[i] = tx; end
      repeat (BIT) @(posedge clk);
      checks++;
      if (!tx) begin failures++; $display("stop bit low"); end
      checks++;
      if (expq.size() == 0) begin failures++; $display("byte without handshake"); end
      else begin
        if (b !== expq[0]) begin
          failures++;
          if (failures < 10) $display("byte %0d: got %h want %h", nbytes, b, expq[0]);
        end
        void'(expq.pop_front());
      end
      got.push_back(b);
      nbytes++;
    end
  end

  task automatic send(logic [7:0] b);
    @(negedge clk) rx = 0;
    repeat (BIT) @(negedge clk);
    for (int i = 0; i < 8; i++) begin rx = b[i]; repeat (BIT) @(negedge clk); end
    rx = 1;
    repeat (BIT) @(negedge clk);
  endtask

  task automatic cmd_freq(logic [31:0] w);
    send(OP_FREQ);
    for (int i = 3; i >= 0; i--) send(w[8*i +: 8]);
    repeat (4) @(negedge clk);
    checks++;
    if (dut.ftw !== w) begin failures++; $display("ftw %h want %h", dut.ftw, w); end
  endtask

  task automatic cmd_wave(wave_e w);
    send(OP_WAVE); send(8'(w));
    repeat (4) @(negedge clk);
    checks++;
    if (dut.wave !== w) begin failures++; $display("wave %0d want %0d", dut.wave, w); end
  endtask

  initial begin
    int base;
    repeat (5) @(negedge clk);
    rst = 0;
    cmd_freq(32'h0800_0000);             // 32 samples per period
    repeat (40 * 10 * BIT) @(negedge clk);
    base = got.size();
    repeat (70 * 10 * BIT) @(negedge clk);
    checks++;
    for (int k = base + 32; k < got.size(); k++)
      if (got[k] != got[k - 32]) begin failures++; $display("sine period not 32"); break; end
    cmd_wave(WAVE_TRIANGLE);
    repeat (50 * 10 * BIT) @(negedge clk);
    cmd_wave(WAVE_SQUARE);
    cmd_freq(32'h0123_4567);
    repeat (50 * 10 * BIT) @(negedge clk);
    cmd_wave(WAVE_SINE);
    repeat (20 * 10 * BIT) @(negedge clk);
    checks++;
    if (gap_bad != 0) begin failures++; $display("%0d irregular byte spacings", gap_bad); end
    checks++;
    if (nbytes < 200) begin failures++; $display("only %0d bytes", nbytes); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
