// square_wave_conv: square-wave conversion of one digitised sine channel.
//
// The ADC code is compared with the channel's tracked DC offset. To keep
// noise near the zero crossing from chattering the output, the comparison
// has hysteresis of one eighth of the tracked amplitude: the output goes
// high once the sample exceeds offset + amp/8 and low once it falls below
// offset - amp/8; in between it holds. The square wave feeds cycle
// detection (its rising edge marks a new period) and tells the arccos stage
// which half period the other channel is in.
//
// Interface: sample/valid from the ADC, offset/amp from norm_tracker;
// sq is registered and updates one clock after a valid sample.
// Square-wave conversion is a named step of the design; the comparator with
// hysteresis and the amp/8 band are this implementation's choices.
module square_wave_conv #(
  parameter int ADC_W = interp_pkg::ADC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [ADC_W-1:0] sample,
  input  logic [ADC_W-1:0] offset,
  input  logic [ADC_W-1:0] amp,
  output logic             sq
);
  logic signed [ADC_W+1:0] diff, hyst;
  assign diff = $signed({2'b00, sample}) - $signed({2'b00, offset});
  assign hyst = $signed({2'b00, amp >> 3});

  always_ff @(posedge clk) begin
    if (!rst_n)                 sq <= 1'b0;
    else if (valid) begin
      if (diff > hyst)          sq <= 1'b1;
      else if (diff < -hyst)    sq <= 1'b0;
    end
  end
endmodule
