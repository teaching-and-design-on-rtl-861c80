// acos_rom: arccos conversion of a normalised sample into a phase angle.
//
// Using the inverse cosine of the normalised value (rather than an
// arctangent of the two channels) means no quotient of two signals is
// formed, so there is never a division by zero, and the two channels may
// differ in amplitude. The ROM holds, for every normalised input
// n = -2^NORM_W .. +2^NORM_W,
//     phase(n) = round( acos(n / 2^NORM_W) / (2*pi) * 2^PH_W )
// i.e. the angle as a fraction of a full signal period, 0 .. 2^(PH_W-1).
// The table is computed at elaboration by a constant function, so no data
// file is needed. Read latency is one clock.
// The arccos method follows the design; the table size and phase format are
// this implementation's choices.
module acos_rom #(
  parameter int NORM_W = interp_pkg::NORM_W,
  parameter int PH_W   = interp_pkg::PH_W
) (
  input  logic                     clk,
  input  logic signed [NORM_W+1:0] norm,
  output logic [PH_W-1:0]          phase
);
  localparam int DEPTH = 2 ** (NORM_W + 1) + 1;
  typedef logic [PH_W-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t r;
    for (int i = 0; i < DEPTH; i++) begin
      real c, a;
      c    = real'(i - 2 ** NORM_W) / real'(2 ** NORM_W);
      a    = $acos(c) / (2.0 * 3.14159265358979323846) * real'(2 ** PH_W);
      r[i] = PH_W'($rtoi(a + 0.5));
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  logic [NORM_W+1:0] addr;
  assign addr = (NORM_W+2)'(2 ** NORM_W) + norm;

  always_ff @(posedge clk)
    phase <= ROM[addr];
endmodule
