// tb_acos_rom: checks the arccos table against the simulator's own $acos
// for every input from -1.0 to +1.0 (allowing one LSB of rounding), plus
// the exact end points and the one-clock read latency.
module tb_acos_rom;
  logic clk = 1'b0;
  logic signed [11:0] norm;
  logic [15:0] phase;
  int checks = 0, failures = 0;

  acos_rom #(.NORM_W(10), .PH_W(16)) dut (.clk, .norm, .phase);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    norm = '0;
    for (int v = -1024; v <= 1024; v++) begin
      real r;
      int e;
      @(negedge clk) norm = 12'(v);
      r = $acos(real'(v) / 1024.0) * 65536.0 / (2.0 * 3.141592653589793);
      e = int'(r);
      @(posedge clk); #1;
      checks++;
      if (int'(phase) - e > 1 || e - int'(phase) > 1) begin
        failures++;
        if (failures < 10) $display("FAIL norm=%0d phase=%0d exp=%0d", v, phase, e);
      end
    end
    // end points and a quarter period
    @(negedge clk) norm = 12'sd1024;
    @(posedge clk); #1 checks++; if (phase !== 16'd0) failures++;
    @(negedge clk) norm = -12'sd1024;
    @(posedge clk); #1 checks++; if (phase !== 16'd32768) failures++;
    @(negedge clk) norm = 12'sd0;
    @(posedge clk); #1 checks++; if (phase !== 16'd16384) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
