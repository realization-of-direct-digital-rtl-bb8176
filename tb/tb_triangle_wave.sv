// tb_triangle_wave: random phases with random enables; the output must equal
// the reference triangle shape of the phase presented at the last enabled edge.
module tb_triangle_wave;
  import dds_ref_pkg::*;
  localparam int unsigned N = 32, P = 8;
  logic clk = 0, rst = 1, en = 0;
  logic [N-1:0] phase_i = '0;
  logic signed [P-1:0] ampl_o;
  int exp, checks = 0, failures = 0, hi = 0, lo = 0;

  triangle_wave #(.FTW_W(N), .AMPL_W(P)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    exp = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      checks++;
      if (int'(ampl_o) != exp) begin
        failures++;
        if (failures < 10) $display("%0d: got %0d want %0d", i, ampl_o, exp);
      end
      if (int'(ampl_o) == 127) hi++;
      if (int'(ampl_o) == -128) lo++;
      phase_i = (i % 3 == 0) ? N'(i) << (N - 12) : $urandom();
      en = ($urandom_range(0, 3) != 0);
      if (en) exp = ramp_ref(longint'(phase_i), N, P);
    end
    checks++;
    if (hi == 0 || lo == 0) begin failures++; $display("full scale not reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
