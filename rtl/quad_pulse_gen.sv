// quad_pulse_gen: quadrature pulse output of the subdividing module.
//
// Follows a target position one step at a time. Each step moves the output
// Gray state (A,B) = 00 -> 10 -> 11 -> 01 forward (A leads B) or backward,
// so a downstream 4X quadrature counter sees exactly one count per step and
// reproduces the target. Steps are spaced by at least STEP_CYCLES clocks so
// that each output level lasts long enough to pass the three-clock noise
// filter of the counter front end. When the target moves faster than that,
// the difference is kept and worked off later: no step is ever lost, the
// output only lags.
//
// Interface: target (two's complement, in steps) -> qa, qb (decoded from the output
// position register; only one of them changes per step),
// busy (output has not yet reached the target).
// The quadrature pulse output follows the design; the step spacing and the
// catch-up behaviour are this implementation's choices.
module quad_pulse_gen #(
  parameter int POS_W       = interp_pkg::POS_W,
  parameter int STEP_CYCLES = 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [POS_W-1:0] target,
  output logic                    qa,
  output logic                    qb,
  output logic                    busy
);
  localparam int TW = (STEP_CYCLES > 1) ? $clog2(STEP_CYCLES) : 1;

  logic signed [POS_W-1:0] out_pos;
  logic signed [POS_W-1:0] diff;
  logic [TW-1:0]           timer;
  logic                    ready;

  assign diff  = target - out_pos;
  assign busy  = diff != '0;
  assign ready = timer == '0;
  assign {qa, qb} = interp_pkg::gray_of(out_pos[1:0]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_pos <= '0;
      timer   <= '0;
    end else begin
      if (!ready) timer <= timer - 1'b1;
      if (ready && busy) begin
        out_pos <= (diff > 0) ? out_pos + 1'b1 : out_pos - 1'b1;
        timer   <= TW'(STEP_CYCLES - 1);
      end
    end
  end

  // the outputs only ever take one Gray step per clock
  a_one_step: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({qa, qb} ^ $past({qa, qb})) <= 1);
endmodule
