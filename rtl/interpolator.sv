// interpolator: main interpolation circuit of the subdividing module.
//
// Input is a pair of ADC codes per sample, Vx = a*cos(theta) and
// Vy = b*cos(theta - phi), with DC offset, amplitude and phase difference
// allowed to differ between the channels and to drift. Per sample:
//   1. square_wave_conv turns each channel into a square wave about its
//      tracked offset; a rising edge marks the start of that channel's cycle.
//   2. norm_tracker refreshes each channel's offset and amplitude from the
//      extremes of the cycle just ended.
//   3. normalizer maps the chosen channel (A, or B when use_b is set) onto
//      [-1, 1]; acos_rom turns it into an angle within a half period.
//   4. phase_subdivider uses the sign of the other channel to extend the
//      angle to a full period, divides the period into `subdiv` steps and
//      accumulates a fine position, a cycle count and the direction.
//   5. quad_pulse_gen emits the position as quadrature pulses, one Gray
//      step per fine step.
// Either channel can be used for the arccos: both give the same position,
// so the one with less noise or more amplitude can be picked.
//
// step_idx is the present step within the signal period (0 .. subdiv-1);
// pulse_busy is high while the pulse outputs still lag the position.
//
// Timing: one sample per clock at most; the position is updated three
// clocks after adc_valid (normaliser, ROM and accumulator registers); the
// pulse outputs then follow at one step per STEP_CYCLES clocks.
// The processing steps follow the design described; the pipeline, widths,
// the per-channel cycle boundary and the pulse spacing are this
// implementation's choices.
module interpolator #(
  parameter int ADC_W       = interp_pkg::ADC_W,
  parameter int NORM_W      = interp_pkg::NORM_W,
  parameter int PH_W        = interp_pkg::PH_W,
  parameter int MAX_SUBDIV  = interp_pkg::MAX_SUBDIV,
  parameter int SUBDIV_W    = interp_pkg::SUBDIV_W,
  parameter int POS_W       = interp_pkg::POS_W,
  parameter int STEP_CYCLES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    adc_valid,
  input  logic [ADC_W-1:0]        adc_x,
  input  logic [ADC_W-1:0]        adc_y,
  input  logic [SUBDIV_W-1:0]     subdiv,
  input  logic                    use_b,
  output logic                    pulse_a,
  output logic                    pulse_b,
  output logic signed [POS_W-1:0] position,
  output logic signed [POS_W-1:0] cycles,
  output logic                    dir,
  output logic [SUBDIV_W-1:0]     step_idx,
  output logic                    pulse_busy
);
  logic [ADC_W-1:0] off_x, amp_x, off_y, amp_y;
  logic             sq_x, sq_y, sq_x_prev, sq_y_prev;
  logic             start_x, start_y;

  // a cycle begins at the rising edge of the channel's square wave
  assign start_x = sq_x & ~sq_x_prev;
  assign start_y = sq_y & ~sq_y_prev;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sq_x_prev <= 1'b0;
      sq_y_prev <= 1'b0;
    end else if (adc_valid) begin
      sq_x_prev <= sq_x;
      sq_y_prev <= sq_y;
    end
  end

  square_wave_conv #(.ADC_W(ADC_W)) u_sq_x (
    .clk, .rst_n, .valid(adc_valid), .sample(adc_x), .offset(off_x), .amp(amp_x), .sq(sq_x)
  );
  square_wave_conv #(.ADC_W(ADC_W)) u_sq_y (
    .clk, .rst_n, .valid(adc_valid), .sample(adc_y), .offset(off_y), .amp(amp_y), .sq(sq_y)
  );

  norm_tracker #(.ADC_W(ADC_W)) u_trk_x (
    .clk, .rst_n, .valid(adc_valid), .sample(adc_x), .cycle_start(start_x),
    .offset(off_x), .amp(amp_x)
  );
  norm_tracker #(.ADC_W(ADC_W)) u_trk_y (
    .clk, .rst_n, .valid(adc_valid), .sample(adc_y), .cycle_start(start_y),
    .offset(off_y), .amp(amp_y)
  );

  // normalise the chosen channel
  logic                     norm_valid;
  logic signed [NORM_W+1:0] norm;

  normalizer #(.ADC_W(ADC_W), .NORM_W(NORM_W)) u_norm (
    .clk, .rst_n, .in_valid(adc_valid),
    .sample(use_b ? adc_y : adc_x),
    .offset(use_b ? off_y : off_x),
    .amp   (use_b ? amp_y : amp_x),
    .out_valid(norm_valid), .norm
  );

  // arccos; the sign of the other channel (no hysteresis) is carried
  // alongside to pick the half period
  logic [PH_W-1:0] half_phase;
  logic            ph_valid, other_pos, other_pos_d;

  acos_rom #(.NORM_W(NORM_W), .PH_W(PH_W)) u_acos (
    .clk, .norm, .phase(half_phase)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ph_valid    <= 1'b0;
      other_pos   <= 1'b0;
      other_pos_d <= 1'b0;
    end else begin
      ph_valid <= norm_valid;
      if (adc_valid)  other_pos   <= use_b ? (adc_x > off_x) : (adc_y > off_y);
      if (norm_valid) other_pos_d <= other_pos;
    end
  end

  phase_subdivider #(
    .PH_W(PH_W), .MAX_SUBDIV(MAX_SUBDIV), .SUBDIV_W(SUBDIV_W), .POS_W(POS_W)
  ) u_sub (
    .clk, .rst_n, .valid(ph_valid), .half_phase, .other_pos(other_pos_d), .use_b, .subdiv,
    .position, .cycles, .dir, .step_idx
  );

  quad_pulse_gen #(.POS_W(POS_W), .STEP_CYCLES(STEP_CYCLES)) u_pulse (
    .clk, .rst_n, .target(position), .qa(pulse_a), .qb(pulse_b), .busy(pulse_busy)
  );
endmodule
