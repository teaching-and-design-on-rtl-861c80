// tb_interp_module_top: end-to-end test of the subdividing module at its
// default parameters (12-bit samples, up to 1600 steps per period).
// Two quantised sine channels with unequal amplitude and offset drive the
// interpolator; its pulse outputs drive the counter front end. For each
// motion segment the test checks that
//   * the front-end count equals the interpolator's position once the
//     pulse outputs have caught up (no step lost or added on the way),
//   * both have moved by (periods travelled) * subdiv, within 1.5 % of a
//     period plus 2 steps,
//   * no illegal quadrature transition was ever flagged.
// It runs 1600, 400, 100 and 25 steps per period, both channels, both
// directions, 90 and 80 degree phase difference and drifting amplitude, and
// counts how often each mechanism occurred: per-cycle amplitude/offset
// refresh, forward and backward cycle wrap, direction reversal at both the
// interpolator and the counter, pulse-output backlog, subdivision switch
// and channel switch. A mechanism that never occurred is a failure.
module tb_interp_module_top;
  logic clk = 1'b0;
  logic rst_n, adc_valid, use_b;
  logic [11:0] adc_x, adc_y;
  logic [10:0] subdiv, step_idx;
  logic pulse_a, pulse_b, interp_dir, pulse_busy, count_dir, illegal;
  logic signed [31:0] position, cycles;
  logic [31:0] count;
  int checks = 0, failures = 0;
  real theta, theta0, ax, ay, jx, ky, phi;
  longint pos0;
  // mechanism counters
  int n_refresh = 0, n_fwd_wrap = 0, n_bwd_wrap = 0, n_dir_rev = 0, n_cnt_rev = 0;
  int n_backlog = 0, n_subdiv_sw = 0, n_chan_sw = 0, n_illegal = 0, busy_run = 0;

  interp_module_top dut (
    .clk, .rst_n, .adc_valid, .adc_x, .adc_y, .subdiv, .use_b,
    .pulse_a, .pulse_b, .position, .cycles, .interp_dir, .step_idx, .pulse_busy,
    .count, .count_dir, .illegal
  );

  always #5 clk = ~clk;

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism monitors
  logic [11:0] amp_prev;
  logic signed [31:0] cyc_prev;
  logic dir_prev, cdir_prev;
  always @(negedge clk) if (rst_n) begin
    if (dut.u_interp.u_trk_x.amp != amp_prev) n_refresh++;
    if (cycles > cyc_prev) n_fwd_wrap++;
    if (cycles < cyc_prev) n_bwd_wrap++;
    if (interp_dir != dir_prev) n_dir_rev++;
    if (count_dir != cdir_prev) n_cnt_rev++;
    if (illegal) n_illegal++;
    busy_run = pulse_busy ? busy_run + 1 : 0;
    if (busy_run == 20) n_backlog++;        // output lagging by several steps
    amp_prev = dut.u_interp.u_trk_x.amp; cyc_prev = cycles;
    dir_prev = interp_dir; cdir_prev = count_dir;
  end

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
    adc_y = code(ky + ay * $cos(w - phi * 3.141592653589793 / 180.0));
    adc_valid = 1'b1;
    @(negedge clk) adc_valid = 1'b0;
    repeat (2) @(negedge clk);
  endtask

  task automatic move(input real periods, input real per_sample);
    int n;
    n = $rtoi((periods < 0 ? -periods : periods) / per_sample);
    for (int i = 0; i < n; i++) begin
      theta += (periods < 0) ? -per_sample : per_sample;
      sample();
    end
  endtask

  task automatic settle();
    repeat (6) @(negedge clk);
    while (pulse_busy) @(negedge clk);
    repeat (8) @(negedge clk);
  endtask

  task automatic mark();
    settle();
    pos0 = position; theta0 = theta;
  endtask

  task automatic check_seg(input string what);
    real exp_d, tol;
    longint got;
    settle();
    exp_d = (theta - theta0) * real'(subdiv);
    tol   = 0.015 * real'(subdiv) + 2.0;
    got   = longint'(position) - pos0;
    $display("%-20s N=%0d moved %0d steps, ideal %.1f, count %0d", what, subdiv, got, exp_d,
             $signed(count));
    checks++;
    if (real'(got) > exp_d + tol || real'(got) < exp_d - tol) begin
      failures++;
      $display("FAIL %s: moved %0d expected %.1f", what, got, exp_d);
    end
    checks++;
    if ($signed(count) != position) begin
      failures++;
      $display("FAIL %s: count %0d position %0d", what, $signed(count), position);
    end
  endtask

  initial begin
    rst_n = 1'b0; adc_valid = 0; adc_x = 0; adc_y = 0; use_b = 0; subdiv = 11'd1600;
    theta = 0.2; ax = 1000; ay = 800; jx = 2048; ky = 2000; phi = 90;
    amp_prev = '0; cyc_prev = '0; dir_prev = 1'b1; cdir_prev = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    move(3.0, 0.01);
    mark();
    move(3.25, 0.01);  check_seg("1600 forward");
    move(-2.5, 0.02);  check_seg("1600 backward");
    subdiv = 11'd400; n_subdiv_sw++;
    theta += 0.001; sample(); mark();
    move(4.5, 0.01);   check_seg("400 forward");
    use_b = 1; n_chan_sw++;
    theta += 0.001; sample(); mark();
    move(-3.7, 0.01);  check_seg("400 channel B back");
    use_b = 0; n_chan_sw++; subdiv = 11'd100; n_subdiv_sw++; phi = 80;
    theta += 0.001; sample(); mark();
    for (int k = 0; k < 30; k++) begin
      ax = ax - 8; ay = ay + 4; jx = jx + 5;
      move(0.1, 0.01);
    end
    check_seg("100 phi80 drift");
    subdiv = 11'd25; n_subdiv_sw++;
    theta += 0.001; sample(); mark();
    move(-2.2, 0.01);  check_seg("25 backward");
    checks++;
    if (n_illegal != 0) begin failures++; $display("FAIL illegal transitions %0d", n_illegal); end
    $display("mechanisms: refresh=%0d fwd_wrap=%0d bwd_wrap=%0d dir_rev=%0d cnt_rev=%0d backlog=%0d subdiv_sw=%0d chan_sw=%0d",
             n_refresh, n_fwd_wrap, n_bwd_wrap, n_dir_rev, n_cnt_rev, n_backlog, n_subdiv_sw, n_chan_sw);
    if (n_refresh == 0)   begin failures++; $display("FAIL no amplitude refresh"); end
    if (n_fwd_wrap == 0)  begin failures++; $display("FAIL no forward wrap"); end
    if (n_bwd_wrap == 0)  begin failures++; $display("FAIL no backward wrap"); end
    if (n_dir_rev == 0)   begin failures++; $display("FAIL no direction reversal"); end
    if (n_cnt_rev == 0)   begin failures++; $display("FAIL no counter reversal"); end
    if (n_backlog == 0)   begin failures++; $display("FAIL no pulse backlog"); end
    if (n_subdiv_sw == 0 || n_chan_sw == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
