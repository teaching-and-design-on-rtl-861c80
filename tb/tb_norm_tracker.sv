// tb_norm_tracker: self-checking test of per-cycle offset/amplitude refresh.
// Random sample streams with a cycle_start every 20..60 samples are fed;
// the reference records max and min itself and, at each boundary, expects
// offset = (max+min)/2 and amp = max((max-min)/2, 1). Between boundaries the
// outputs must not move. Also checks the reset values.
module tb_norm_tracker;
  logic clk = 1'b0;
  logic rst_n, valid, cycle_start;
  logic [11:0] sample, offset, amp;
  int checks = 0, failures = 0;
  int mx, mn, e_off, e_amp, n_refresh = 0;

  norm_tracker #(.ADC_W(12)) dut (.clk, .rst_n, .valid, .sample, .cycle_start, .offset, .amp);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check();
    checks++;
    if (offset !== 12'(e_off) || amp !== 12'(e_amp)) begin
      failures++;
      if (failures < 10) $display("FAIL off=%0d amp=%0d exp %0d %0d", offset, amp, e_off, e_amp);
    end
  endtask

  initial begin
    rst_n = 1'b0; valid = 0; cycle_start = 0; sample = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    e_off = 2048; e_amp = 1024;
    #1 check();
    mx = -1; mn = 4096;
    for (int c = 0; c < 200; c++) begin
      int len, centre, span;
      len    = 20 + $urandom % 40;
      centre = 1000 + $urandom % 2000;
      span   = (c == 5) ? 0 : 1 + $urandom % 900;
      for (int s = 0; s < len; s++) begin
        @(negedge clk);
        sample      = 12'(centre - span + int'($urandom % (2 * span + 1)));
        valid       = ($urandom % 4) != 0 || s == 0;
        cycle_start = (s == 0) && (c > 0);
        @(posedge clk);
        if (valid) begin
          if (cycle_start) begin
            if (int'(sample) > mx) mx = sample;
            if (int'(sample) < mn) mn = sample;
            e_off = (mx + mn) / 2;
            e_amp = (mx - mn) / 2;
            if (e_amp == 0) e_amp = 1;
            mx = sample; mn = sample;
            n_refresh++;
          end else begin
            if (int'(sample) > mx) mx = sample;
            if (int'(sample) < mn) mn = sample;
          end
        end
        #1 check();
      end
    end
    if (n_refresh < 100) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
