// tb_interpolator: self-checking test of the main interpolation circuit.
// The testbench synthesises two sine channels, Vx = jx + a*cos(2*pi*theta)
// and Vy = ky + b*cos(2*pi*theta - phi), quantised to 12-bit codes, with
// unequal amplitudes and offsets, phi = 90, 80, 50 or 130 degrees, and drift of the
// amplitude and offset while moving. After warm-up (the offset/amplitude
// trackers need whole periods), every segment of motion is checked:
//   * position change = (theta change) * subdiv, within 1.5 % of a period
//     plus 2 steps (the arccos is least sensitive at the crests),
//   * cycle count change within one of the whole periods travelled,
//   * direction matches the sign of the last motion,
//   * the decoded pulse outputs equal the position once they catch up.
module tb_interpolator;
  logic clk = 1'b0;
  logic rst_n, adc_valid, use_b, pulse_a, pulse_b, dir, pulse_busy;
  logic [11:0] adc_x, adc_y;
  logic [10:0] subdiv, step_idx;
  logic signed [31:0] position, cycles;
  int checks = 0, failures = 0;
  real theta, theta0, ax, ay, jx, ky, phi;
  longint pos0, cyc0;
  int decoded = 0;
  logic [1:0] prev = 2'b00;

  interpolator dut (
    .clk, .rst_n, .adc_valid, .adc_x, .adc_y, .subdiv, .use_b,
    .pulse_a, .pulse_b, .position, .cycles, .dir, .step_idx, .pulse_busy
  );

  always #5 clk = ~clk;

  initial begin
    #50000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int gidx(input logic [1:0] s);
    case (s)
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  always @(negedge clk) if (rst_n && {pulse_a, pulse_b} != prev) begin
    decoded += (((gidx({pulse_a, pulse_b}) - gidx(prev)) & 3) == 1) ? 1 : -1;
    prev = {pulse_a, pulse_b};
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

  // move forward to the next point where theta is a quarter period past a
  // whole period (A at its offset, B clearly signed for 45..135 degrees)
  task automatic goto_quarter();
    real d;
    int n;
    d = 0.25 - (theta - $floor(theta));
    if (d < 0.0) d += 1.0;
    if (d > 0.999999 || d < 0.000001) return;   // already there
    n = $rtoi(d / 0.01) + 1;
    for (int i = 0; i < n; i++) begin
      theta += d / real'(n);
      sample();
    end
  endtask

  task automatic mark();           // take a new reference point
    repeat (6) @(negedge clk);
    pos0 = position; cyc0 = cycles; theta0 = theta;
  endtask

  task automatic check_seg(input string what, input bit exp_dir);
    real exp_d, tol;
    longint got, ecyc;
    repeat (6) @(negedge clk);
    exp_d = (theta - theta0) * real'(subdiv);
    tol   = 0.015 * real'(subdiv) + 2.0;
    got   = longint'(position) - pos0;
    $display("%-18s N=%0d moved %0d steps, ideal %.1f", what, subdiv, got, exp_d);
    ecyc  = longint'($floor(theta)) - longint'($floor(theta0));
    checks++;
    if (real'(got) > exp_d + tol || real'(got) < exp_d - tol) begin
      failures++;
      $display("FAIL %s N=%0d moved %0d expected %.1f", what, subdiv, got, exp_d);
    end
    checks++;
    if (longint'(cycles) - cyc0 > ecyc + 1 || longint'(cycles) - cyc0 < ecyc - 1) begin
      failures++;
      $display("FAIL %s cycles moved %0d expected %0d", what, longint'(cycles) - cyc0, ecyc);
    end
    checks++;
    if (dir !== exp_dir) begin failures++; $display("FAIL %s dir", what); end
    while (pulse_busy) @(negedge clk);
    repeat (2) @(negedge clk);
    checks++;
    if (decoded != position) begin
      failures++;
      $display("FAIL %s pulses decoded %0d position %0d", what, decoded, position);
    end
  endtask

  initial begin
    rst_n = 1'b0; adc_valid = 0; adc_x = 0; adc_y = 0; use_b = 0; subdiv = 11'd400;
    theta = 0.13; ax = 900; ay = 700; jx = 2100; ky = 1950; phi = 90;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    move(3.0, 0.01);                       // warm-up: trackers learn
    mark();
    move(4.3, 0.01);   check_seg("forward", 1);
    move(-6.7, 0.013); check_seg("backward", 0);
    move(0.37, 0.002); check_seg("slow forward", 1);
    // other channel, other subdivision (both re-seed at the next sample)
    use_b = 1; subdiv = 11'd100;
    theta += 0.001; sample(); mark();
    move(5.2, 0.01);   check_seg("channel B forward", 1);
    move(-2.4, 0.01);  check_seg("channel B backward", 0);
    // 80 degree phase difference and drifting amplitude/offset
    use_b = 0; subdiv = 11'd1600; phi = 80;
    move(2.0, 0.01); mark();
    for (int k = 0; k < 40; k++) begin
      ax = ax - 5; jx = jx + 3;
      move(0.1, 0.01);
    end
    check_seg("phi 80, drift", 1);
    subdiv = 11'd25;
    theta += 0.001; sample(); mark();
    move(-3.3, 0.01);  check_seg("25 steps", 0);
    // phase difference at the ends of the 45..135 degree tolerance band:
    // counting must stay right over many periods
    subdiv = 11'd400; phi = 50;
    theta += 0.001; sample();
    move(2.0, 0.01); goto_quarter(); mark();
    move(7.0, 0.01); goto_quarter(); check_seg("phi 50", 1);
    phi = 130;
    move(2.0, 0.01); goto_quarter(); mark();
    move(-6.0, 0.01); goto_quarter(); check_seg("phi 130", 0);
    move(-3.0, 0.01); goto_quarter(); check_seg("phi 130 back", 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
