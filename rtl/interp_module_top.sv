// interp_module_top: the complete subdividing module for sinusoidal
// quadrature signals (encoders, interferometers).
//
// Two digitised quadrature signals enter the interpolator, which divides
// each signal period into `subdiv` steps (up to MAX_SUBDIV) and emits them
// as quadrature pulses. Those pulses drive the counter front end: a
// three-clock noise filter per channel, a 4X quadrature decoder and an
// up/down position counter, whose value is what a host reads. One signal
// period moving forward therefore adds `subdiv` to `count`.
// The pulses, the interpolator's own position and cycle count are brought
// out as well. Both parts run on one clock here.
//
// Timing: a sample reaches `position` three clocks after adc_valid; each
// pulse step reaches `count` about five clocks after it is emitted.
module interp_module_top #(
  parameter int ADC_W      = interp_pkg::ADC_W,
  parameter int MAX_SUBDIV = interp_pkg::MAX_SUBDIV,
  parameter int SUBDIV_W   = interp_pkg::SUBDIV_W,
  parameter int POS_W      = interp_pkg::POS_W,
  parameter int COUNT_W    = interp_pkg::COUNT_W
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
  output logic                    interp_dir,
  output logic [SUBDIV_W-1:0]     step_idx,
  output logic                    pulse_busy,
  output logic [COUNT_W-1:0]      count,
  output logic                    count_dir,
  output logic                    illegal
);
  interpolator #(
    .ADC_W(ADC_W), .MAX_SUBDIV(MAX_SUBDIV), .SUBDIV_W(SUBDIV_W), .POS_W(POS_W)
  ) u_interp (
    .clk, .rst_n, .adc_valid, .adc_x, .adc_y, .subdiv, .use_b,
    .pulse_a, .pulse_b, .position, .cycles, .dir(interp_dir), .step_idx, .pulse_busy
  );

  quad_counter #(.COUNT_W(COUNT_W)) u_counter (
    .clk, .rst_n, .pa(pulse_a), .pb(pulse_b), .count, .dir(count_dir), .illegal
  );
endmodule
