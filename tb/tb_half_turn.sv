// tb_half_turn: the half-turn counting test at full size.
// A rotary encoder with 1024 signal periods per turn (819200 counts for half
// a turn at 1600 steps per period, 51200 at 100) is turned half a turn
// forward at 1600 steps per period and half a turn back at 100 steps per
// period. The encoder signals have unequal amplitude and offset and a slow
// amplitude drift. The counter front end must reach 819200 +/- 26 counts
// (1.5 % of a period plus 2), then come back by 51200 +/- 3.5, and always
// agree exactly with the interpolator's position once the pulse outputs
// have caught up. The top runs with all its default parameters.
module tb_half_turn;
  logic clk = 1'b0;
  logic rst_n, adc_valid, use_b;
  logic [11:0] adc_x, adc_y;
  logic [10:0] subdiv, step_idx;
  logic pulse_a, pulse_b, interp_dir, pulse_busy, count_dir, illegal;
  logic signed [31:0] position, cycles;
  logic [31:0] count;
  int checks = 0, failures = 0, n_illegal = 0;
  real theta, ax, ay, jx, ky;
  longint c0, c1;

  interp_module_top dut (
    .clk, .rst_n, .adc_valid, .adc_x, .adc_y, .subdiv, .use_b,
    .pulse_a, .pulse_b, .position, .cycles, .interp_dir, .step_idx, .pulse_busy,
    .count, .count_dir, .illegal
  );

  always #5 clk = ~clk;

  initial begin
    #1000000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && illegal) n_illegal++;

  function automatic logic [11:0] code(input real v);
    int i;
    i = $rtoi(v + 0.5);
    if (i < 0) i = 0;
    if (i > 4095) i = 4095;
    return 12'(i);
  endfunction

  task automatic sample();
    real w;
    w = 2.0 * 3.141592653589793 * theta;
    @(negedge clk);
    adc_x = code(jx + ax * $cos(w));
    adc_y = code(ky + ay * $sin(w));
    adc_valid = 1'b1;
    @(negedge clk) adc_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic turn(input int periods, input real per_sample);
    int n;
    n = $rtoi((periods < 0 ? -periods : periods) / per_sample + 0.5);
    for (int i = 0; i < n; i++) begin
      theta += (periods < 0) ? -per_sample : per_sample;
      ax = 900.0 + 100.0 * $sin(real'(i) * 1.0e-4);      // slow amplitude drift
      sample();
    end
  endtask

  task automatic settle();
    repeat (6) @(negedge clk);
    while (pulse_busy) @(negedge clk);
    repeat (8) @(negedge clk);
  endtask

  task automatic expect_delta(input string what, input longint got, input longint want,
                              input real tol);
    checks++;
    $display("%s: %0d counts (nominal %0d)", what, got, want);
    if (real'(got - want) > tol || real'(want - got) > tol) begin
      failures++;
      $display("FAIL %s", what);
    end
    checks++;
    if ($signed(count) != position) begin
      failures++;
      $display("FAIL %s: count %0d position %0d", what, $signed(count), position);
    end
  endtask

  initial begin
    rst_n = 1'b0; adc_valid = 0; adc_x = 0; adc_y = 0; use_b = 0; subdiv = 11'd1600;
    theta = 0.0; ax = 900; ay = 750; jx = 2080; ky = 1990;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    turn(3, 0.02);                               // trackers learn the signals
    settle();
    c0 = longint'($signed(count));
    turn(512, 0.02);                             // half a turn forward
    settle();
    c1 = longint'($signed(count));
    expect_delta("half turn at 1600", c1 - c0, 819200, 0.015 * 1600 + 2);
    subdiv = 11'd100;
    theta += 0.001; sample(); settle();
    c0 = longint'($signed(count));
    turn(-512, 0.02);                            // half a turn back
    settle();
    c1 = longint'($signed(count));
    expect_delta("half turn back at 100", c0 - c1, 51200, 0.015 * 100 + 2);
    checks++;
    if (n_illegal != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
