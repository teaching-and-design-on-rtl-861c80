// tb_normalizer: self-checking test of (sample - offset) / amp.
// Random operands (including samples beyond the amplitude, which must clamp
// to +/-1.0, and amp = 1) are applied one per clock; the reference uses
// integer division. The result must appear exactly one clock after in_valid.
module tb_normalizer;
  logic clk = 1'b0;
  logic rst_n, in_valid, out_valid;
  logic [11:0] sample, offset, amp;
  logic signed [11:0] norm;
  int checks = 0, failures = 0;
  int exp_q[$];
  int n_clamp = 0;

  normalizer #(.ADC_W(12), .NORM_W(10)) dut (
    .clk, .rst_n, .in_valid, .sample, .offset, .amp, .out_valid, .norm
  );

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_norm(input int s, input int o, input int a);
    int d, m, q;
    d = s - o;
    m = (d < 0) ? -d : d;
    q = (m >= a) ? 1024 : (m * 1024) / a;
    return (d < 0) ? -q : q;
  endfunction

  initial begin
    rst_n = 1'b0; in_valid = 0; sample = 0; offset = 0; amp = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 6000; n++) begin
      int e;
      @(negedge clk);
      offset   = 12'(1024 + $urandom % 2048);
      amp      = (n % 97 == 0) ? 12'd1 : 12'(1 + $urandom % 1500);
      sample   = 12'(int'(offset) + int'($urandom % (2 * int'(amp) + 201)) - int'(amp) - 100);
      in_valid = ($urandom % 3) != 0;
      e        = ref_norm(sample, offset, amp);
      if (e == 1024 || e == -1024) n_clamp++;
      @(posedge clk); #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        if (failures < 10) $display("FAIL out_valid timing");
      end
      if (in_valid) begin
        checks++;
        if (int'(norm) != e) begin
          failures++;
          if (failures < 10) $display("FAIL s=%0d o=%0d a=%0d norm=%0d exp=%0d", sample, offset, amp, norm, e);
        end
      end
    end
    if (n_clamp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
