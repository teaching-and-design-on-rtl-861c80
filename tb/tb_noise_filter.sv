// tb_noise_filter: self-checking test of the three-edge delay filter.
// Drives two channels with random levels held for 1..5 clocks (so both
// short spikes and genuine changes occur) and compares dout every cycle
// with a reference that keeps its own record of the last three samples.
// Also checks the latency of a clean edge: a level stable from one edge
// appears on dout after exactly three sampling edges.
module tb_noise_filter;
  logic       clk = 1'b0;
  logic       rst_n;
  logic [1:0] din, dout;
  int checks = 0, failures = 0;
  logic [1:0] s0, s1, s2, model;   // last three samples, expected output
  int spikes = 0;

  noise_filter #(.WIDTH(2)) dut (.clk, .rst_n, .din, .dout);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [1:0] exp, input string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: dout=%b exp=%b t=%0t", what, dout, exp, $time);
    end
  endtask

  initial begin
    rst_n = 1'b0; din = 2'b00;
    s0 = '0; s1 = '0; s2 = '0; model = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // latency of one clean edge on channel 1
    din = 2'b10;
    @(posedge clk); #1 check(2'b00, "edge after 1 sample");
    @(posedge clk); #1 check(2'b00, "edge after 2 samples");
    @(posedge clk); #1 check(2'b10, "edge after 3 samples");
    // 1- and 2-clock spikes are rejected
    @(negedge clk) din = 2'b00;
    @(negedge clk) din = 2'b10;
    repeat (4) @(posedge clk); #1 check(2'b10, "1-clock dip rejected");
    @(negedge clk) din = 2'b01;
    repeat (2) @(negedge clk); din = 2'b10;
    repeat (4) @(posedge clk); #1 check(2'b10, "2-clock spike rejected");
    // random run against the reference
    s0 = 2'b10; s1 = 2'b10; s2 = 2'b10; model = 2'b10;
    for (int n = 0; n < 3000; n++) begin
      int hold;
      logic [1:0] v;
      v = 2'($urandom);
      hold = 1 + $urandom % 5;
      if (hold < 3 && v != din) spikes++;
      for (int h = 0; h < hold; h++) begin
        @(negedge clk) din = v;
        @(posedge clk);
        s2 = s1; s1 = s0; s0 = din;
        for (int i = 0; i < 2; i++)
          if (s0[i] == s1[i] && s1[i] == s2[i]) model[i] = s0[i];
        #1 check(model, "random");
      end
    end
    if (spikes == 0) begin failures++; $display("FAIL no short spikes generated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
