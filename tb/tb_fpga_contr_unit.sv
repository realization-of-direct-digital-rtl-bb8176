// tb_fpga_contr_unit: feeds command frames byte by byte (random gaps)
// and checks the tuning word and waveform after each frame, that a
// half-received tuning word never shows, and that unknown opcodes and
// out-of-range waveform codes change nothing.
module tb_fpga_contr_unit;
  import dds_pkg::*;
  localparam int unsigned N = 32;
  logic clk = 0, rst = 1, rx_valid = 0;
  logic [7:0] rx_data = '0;
  logic [N-1:0] ftw;
  wave_e wave;
  logic [N-1:0] exp_ftw;
  int exp_wave;
  int checks = 0, failures = 0;

  fpga_contr_unit #(.FTW_W(N)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic put(logic [7:0] b);
    @(negedge clk) begin rx_data = b; rx_valid = 1; end
    @(negedge clk) rx_valid = 0;
    repeat ($urandom_range(0, 3)) @(negedge clk);
  endtask

  task automatic check(string what);
    checks++;
    if (ftw !== exp_ftw || int'(wave) != exp_wave) begin
      failures++;
      $display("%s: ftw %h/%h wave %0d/%0d", what, ftw, exp_ftw, wave, exp_wave);
    end
  endtask

  initial begin
    logic [N-1:0] w;
    exp_ftw = '0; exp_wave = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    check("reset");
    for (int n = 0; n < 300; n++) begin
      case ($urandom_range(0, 3))
        0: begin
          w = $urandom();
          put(OP_FREQ);
          for (int i = 3; i >= 0; i--) begin
            put(w[8*i +: 8]);
            if (i > 0) check("partial word");
          end
          exp_ftw = w;
        end
        1: begin
          w = $urandom_range(0, 3);
          put(OP_WAVE); put(8'(w));
          if (w <= 2) exp_wave = w;
        end
        2: begin
          w = $urandom();
          if (w[7:0] != OP_FREQ && w[7:0] != OP_WAVE) put(w[7:0]);
        end
        default: begin                 // waveform byte out of range
          put(OP_WAVE); put(8'($urandom_range(3, 255)));
        end
      endcase
      check("after frame");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
