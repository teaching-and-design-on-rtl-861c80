// quad_counter: counter front end of the subdividing module.
//
// Holds what the design places in its small CPLD: a digital noise filter on
// each quadrature input, the 4X quadrature decoder (the "digital frequency
// multiplier") and the up/down position counter. A pulse pair arriving on
// pa/pb is filtered (three stable clocks), decoded into count pulses and
// counted, so one input period changes `count` by four.
//
// Latency from an input edge to the count: three clocks of filtering, one
// of decoding and one of counting.
module quad_counter #(
  parameter int COUNT_W = interp_pkg::COUNT_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               pa,
  input  logic               pb,
  output logic [COUNT_W-1:0] count,
  output logic               dir,
  output logic               illegal
);
  logic [1:0] filt;
  logic       cnt_en;

  noise_filter #(.WIDTH(2)) u_filter (
    .clk, .rst_n, .din({pa, pb}), .dout(filt)
  );

  quad_decoder u_dec (
    .clk, .rst_n, .a(filt[1]), .b(filt[0]), .cnt_en, .up(dir), .illegal
  );

  updown_counter #(.COUNT_W(COUNT_W)) u_cnt (
    .clk, .rst_n, .en(cnt_en), .up(dir), .count
  );
endmodule
