// quad_decoder: 4X quadrature decoder.
//
// Compares the present filtered A/B state with the state seen one clock
// earlier. Every legal Gray-code transition gives a one-clock count pulse
// (cnt_en) together with a direction (up): A leading B counts up, B leading
// A counts down, so each signal period yields four counts. A transition in
// which both channels change at once is illegal; it raises `illegal` for
// one clock and produces no count (the count is then wrong by two, as an
// illegal transition must be).
//
// Interface: a, b (filtered channels) -> cnt_en, up, illegal, all
// registered, one clock after the state change is sampled.
// The 4X decoding and up/down convention follow the design described; the
// illegal flag and the "do not count" choice are this implementation's.
module quad_decoder (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  output logic cnt_en,
  output logic up,
  output logic illegal
);
  logic [1:0] prev, cur;
  assign cur = {a, b};

  // position of a state in the count-up sequence 00 -> 10 -> 11 -> 01
  function automatic logic [1:0] idx_of(input logic [1:0] s);
    case (s)
      2'b00:   return 2'd0;
      2'b10:   return 2'd1;
      2'b11:   return 2'd2;
      default: return 2'd3;
    endcase
  endfunction

  logic [1:0] step;
  assign step = idx_of(cur) - idx_of(prev);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      prev    <= 2'b00;
      cnt_en  <= 1'b0;
      up      <= 1'b1;
      illegal <= 1'b0;
    end else begin
      prev    <= cur;
      cnt_en  <= (step == 2'd1) || (step == 2'd3);
      illegal <= (step == 2'd2);
      if (step == 2'd1) up <= 1'b1;
      else if (step == 2'd3) up <= 1'b0;
    end
  end
endmodule
