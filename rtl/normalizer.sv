// normalizer: maps an ADC sample onto [-1, +1] using the tracked offset
// and amplitude, i.e. norm = (sample - offset) / amp.
//
// The result is a signed fixed-point number with NORM_W fraction bits
// (2^NORM_W stands for 1.0), clamped to +/-1.0 when the sample lies outside
// the tracked range. The division is a restoring divider unrolled over the
// NORM_W quotient bits: the remainder starts at |sample - offset| and each
// stage doubles it and subtracts amp when possible. The whole division is
// combinational and registered once, so one sample per clock is accepted
// and the result appears one clock after in_valid (out_valid).
// Normalising with the per-cycle offset and amplitude follows the design;
// the fixed-point format and the divider structure are this
// implementation's choices. amp must be non-zero (norm_tracker ensures it).
module normalizer #(
  parameter int ADC_W  = interp_pkg::ADC_W,
  parameter int NORM_W = interp_pkg::NORM_W
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [ADC_W-1:0]         sample,
  input  logic [ADC_W-1:0]         offset,
  input  logic [ADC_W-1:0]         amp,
  output logic                     out_valid,
  output logic signed [NORM_W+1:0] norm
);
  logic             neg;
  logic [ADC_W-1:0] mag;
  logic [NORM_W:0]  quo;        // magnitude of the result, up to 2^NORM_W
  logic [ADC_W:0]   rem;

  always_comb begin
    neg = sample < offset;
    mag = neg ? offset - sample : sample - offset;
    quo = '0;
    rem = '0;
    if (mag >= amp) begin
      quo = (NORM_W+1)'(1) << NORM_W;     // clamp to 1.0
    end else begin
      rem = {1'b0, mag};
      for (int i = NORM_W - 1; i >= 0; i--) begin
        rem = rem << 1;
        if (rem >= {1'b0, amp}) begin
          rem    = rem - {1'b0, amp};
          quo[i] = 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      norm      <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid)
        norm <= neg ? -$signed({1'b0, quo}) : $signed({1'b0, quo});
    end
  end

  // the amplitude is the divisor and must never be zero
  a_amp_nonzero: assert property (@(posedge clk) disable iff (!rst_n)
    in_valid |-> amp != '0);
endmodule
