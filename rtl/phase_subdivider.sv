// phase_subdivider: full-period phase, subdivision, cycle counting and
// direction detection.
//
// The arccos stage only yields an angle in the first half period
// (0 .. 2^(PH_W-1)). The sign of the other channel (other_pos = sample above
// its offset) selects the half:
// with A = cos(theta) and B = cos(theta - phi) (phi near 90 degrees), B is
// positive while theta lies in the first half, so
//     interpolating on A:  theta = B positive ? acos : 1 - acos
//     interpolating on B:  theta = A positive ? 1 - acos : acos
// (angles as fractions of a period). The full angle is scaled to the
// selected number of steps per period,
//     k = floor(theta * subdiv / 2^PH_W),  0 <= k < subdiv,
// and the change of k since the previous sample, taken modulo subdiv into
// the range -subdiv/2 .. +subdiv/2, is added to the fine position. A step
// across the end of the period in the forward (backward) direction counts
// one cycle up (down); `dir` is the direction of the latest non-zero change.
// The position is therefore in units of 1/subdiv of a signal period, and
// the signal may move by up to half a period between two samples.
//
// When subdiv or use_b changes, and on the first sample after reset, the
// present angle is taken as the new reference without moving the position.
// Interface: valid/half_phase from acos_rom with other_pos aligned to it;
// outputs are registered one clock after valid.
// Subdividing up to MAX_SUBDIV times, cycle counting and direction
// detection follow the design; the half-period selection rule, the
// wrap-around arithmetic and the re-seeding on a change of settings are this
// implementation's choices.
module phase_subdivider #(
  parameter int PH_W       = interp_pkg::PH_W,
  parameter int MAX_SUBDIV = interp_pkg::MAX_SUBDIV,
  parameter int SUBDIV_W   = interp_pkg::SUBDIV_W,
  parameter int POS_W      = interp_pkg::POS_W
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    valid,
  input  logic [PH_W-1:0]         half_phase,
  input  logic                    other_pos,
  input  logic                    use_b,
  input  logic [SUBDIV_W-1:0]     subdiv,
  output logic signed [POS_W-1:0] position,
  output logic signed [POS_W-1:0] cycles,
  output logic                    dir,
  output logic [SUBDIV_W-1:0]     step_idx
);
  logic [PH_W-1:0]           theta;
  logic [SUBDIV_W-1:0]       n_eff;
  logic [PH_W+SUBDIV_W-1:0]  prod;
  logic [SUBDIV_W-1:0]       k;
  logic signed [SUBDIV_W+1:0] raw, delta;
  logic                      wrap_fwd, wrap_bwd;
  logic                      seeded;
  logic [SUBDIV_W-1:0]       n_prev;
  logic                      use_b_prev;

  // clamp the run-time setting into 1 .. MAX_SUBDIV
  assign n_eff = (subdiv == '0) ? SUBDIV_W'(1)
               : (subdiv > SUBDIV_W'(MAX_SUBDIV)) ? SUBDIV_W'(MAX_SUBDIV) : subdiv;

  always_comb begin
    theta    = (other_pos ^ use_b) ? half_phase : PH_W'(0) - half_phase;
    prod     = (PH_W+SUBDIV_W)'(theta) * (PH_W+SUBDIV_W)'(n_eff);
    k        = SUBDIV_W'(prod >> PH_W);
    raw      = $signed({2'b00, k}) - $signed({2'b00, step_idx});
    wrap_fwd = raw < -$signed({3'b000, n_eff[SUBDIV_W-1:1]});
    wrap_bwd = raw >  $signed({3'b000, n_eff[SUBDIV_W-1:1]});
    delta    = raw;
    if (wrap_fwd) delta = raw + $signed({2'b00, n_eff});
    if (wrap_bwd) delta = raw - $signed({2'b00, n_eff});
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      position   <= '0;
      cycles     <= '0;
      dir        <= 1'b1;
      step_idx   <= '0;
      seeded     <= 1'b0;
      n_prev     <= '0;
      use_b_prev <= 1'b0;
    end else if (valid) begin
      seeded     <= 1'b1;
      n_prev     <= n_eff;
      use_b_prev <= use_b;
      step_idx   <= k;
      if (seeded && n_prev == n_eff && use_b_prev == use_b) begin
        position <= position + POS_W'(delta);
        if (wrap_fwd) cycles <= cycles + 1'b1;
        if (wrap_bwd) cycles <= cycles - 1'b1;
        if (delta > 0) dir <= 1'b1;
        else if (delta < 0) dir <= 1'b0;
      end
    end
  end
endmodule
