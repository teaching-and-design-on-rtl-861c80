// tb_square_wave_conv: self-checking test of the hysteresis comparator.
// Random samples around random offsets and amplitudes are applied, with
// valid sometimes low; the output is compared with a reference that applies
// the +/- amp/8 band with integer arithmetic of its own.
module tb_square_wave_conv;
  logic clk = 1'b0;
  logic rst_n, valid, sq;
  logic [11:0] sample, offset, amp;
  int checks = 0, failures = 0;
  bit model = 0;
  int n_hold = 0, n_rise = 0;

  square_wave_conv #(.ADC_W(12)) dut (.clk, .rst_n, .valid, .sample, .offset, .amp, .sq);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; valid = 1'b0; sample = '0; offset = 12'd2048; amp = 12'd800;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      int d, band;
      @(negedge clk);
      if (n % 200 == 0) begin
        offset = 12'(1500 + $urandom % 1000);
        amp    = 12'(100 + $urandom % 1000);
      end
      band   = int'(amp) / 8;
      d      = int'($urandom % (2 * band + 41)) - band - 20;   // mostly near the band
      sample = 12'(int'(offset) + d);
      valid  = ($urandom % 5) != 0;
      @(posedge clk);
      if (valid) begin
        if (d > band) begin if (!model) n_rise++; model = 1; end
        else if (d < -band) model = 0;
        else n_hold++;
      end
      #1;
      checks++;
      if (sq !== model) begin
        failures++;
        if (failures < 10) $display("FAIL sq=%b exp=%b d=%0d band=%0d", sq, model, d, band);
      end
    end
    if (n_hold == 0 || n_rise == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
