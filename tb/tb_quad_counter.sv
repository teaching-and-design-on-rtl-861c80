// tb_quad_counter: end-to-end test of the counter front end (noise filter,
// 4X decoder, counter). A random quadrature walk with every level held for
// at least three clocks is applied, with random one- and two-clock noise
// spikes on either channel. After each settled stretch the count must
// equal the net number of Gray steps taken, spikes must never count, and
// a clean step must reach the count five clocks after it is applied.
module tb_quad_counter;
  logic clk = 1'b0;
  logic rst_n, pa, pb, dir, illegal;
  logic [31:0] count;
  int checks = 0, failures = 0;
  int idx = 0, n_spikes = 0;

  quad_counter #(.COUNT_W(32)) dut (.clk, .rst_n, .pa, .pb, .count, .dir, .illegal);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [1:0] code(input int i);
    logic [1:0] t [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
    return t[i & 3];
  endfunction

  task automatic check_count(input string what);
    checks++;
    if ($signed(count) !== idx) begin
      failures++;
      if (failures < 10) $display("FAIL %s count=%0d exp=%0d", what, $signed(count), idx);
    end
  endtask

  initial begin
    rst_n = 1'b0; {pa, pb} = 2'b00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency of one clean step
    idx = 1; {pa, pb} = code(idx);
    repeat (4) @(posedge clk); #1;
    checks++;
    if (count !== 32'd0) begin failures++; $display("FAIL counted too early"); end
    @(posedge clk); #1 check_count("latency 5 clocks");
    for (int n = 0; n < 3000; n++) begin
      int r;
      r = $urandom % 10;
      @(negedge clk);
      if (r < 5)      idx++;
      else if (r < 9) idx--;
      {pa, pb} = code(idx);
      repeat (2 + $urandom % 3) @(negedge clk);
      if ($urandom % 3 == 0) begin    // short spike on one channel
        n_spikes++;
        if ($urandom % 2) pa = ~pa; else pb = ~pb;
        repeat (1 + $urandom % 2) @(negedge clk);
        {pa, pb} = code(idx);
        repeat (3) @(negedge clk);
      end
      if (n % 50 == 0) begin
        repeat (6) @(negedge clk);
        check_count("settled");
        checks++;
        if (illegal) begin failures++; $display("FAIL illegal flagged"); end
      end
    end
    repeat (8) @(negedge clk);
    check_count("final");
    if (n_spikes == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
