// noise_filter: digital delay filter for quadrature encoder inputs.
//
// Each channel is sampled on the rising clock edge and a two-sample history
// is kept in a 2-bit shift register. The filtered output takes a new level
// only when the input has shown that same level at three consecutive rising
// edges (the present sample plus the two stored ones). Short spikes and
// chatter shorter than three clocks therefore never reach the counter, and
// the highest input rate that still passes is set by the clock.
//
// Interface: din[WIDTH] (already Schmitt-buffered pins), dout[WIDTH].
// Timing: an input level that is stable from edge n is on dout after edge
// n+2 (visible in the cycle following the third sampling edge).
// The 2-bit history and the three-edge rule follow the design described;
// the vector width, the reset value (all zero) and the absence of a separate
// synchroniser are this implementation's choices.
module noise_filter #(
  parameter int WIDTH = 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] din,
  output logic [WIDTH-1:0] dout
);
  logic [WIDTH-1:0] hist0, hist1;  // previous and second-previous samples

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist0 <= '0;
      hist1 <= '0;
      dout  <= '0;
    end else begin
      hist0 <= din;
      hist1 <= hist0;
      for (int i = 0; i < WIDTH; i++)
        if (din[i] == hist0[i] && hist0[i] == hist1[i])
          dout[i] <= din[i];
    end
  end
endmodule
