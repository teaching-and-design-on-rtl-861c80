// updown_counter: binary position counter fed by the quadrature decoder.
//
// On each clock with en high the count moves one step, up when `up` is 1
// and down otherwise, wrapping modulo 2^COUNT_W (two's complement position).
// The count is registered and visible one clock after the enable.
// The document gives only its role (position counter driven by a count and
// a direction signal); the width and the synchronous clear are this
// implementation's choices.
module updown_counter #(
  parameter int COUNT_W = 32
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               up,
  output logic [COUNT_W-1:0] count
);
  always_ff @(posedge clk) begin
    if (!rst_n)      count <= '0;
    else if (en)     count <= up ? count + 1'b1 : count - 1'b1;
  end
endmodule
