// interp_pkg: widths and constants shared by the subdividing (interpolation)
// module. The 12-bit sample width matches the converter the design is built
// around; the 1600-step upper limit is the largest subdivision the design
// supports. The remaining widths are this implementation's own choices.
package interp_pkg;
  parameter int ADC_W      = 12;    // converter resolution
  parameter int MAX_SUBDIV = 1600;  // largest number of steps per signal period
  parameter int SUBDIV_W   = 11;    // width of the run-time subdivision input
  parameter int NORM_W     = 10;    // fraction bits of a normalised sample
  parameter int PH_W       = 16;    // phase word, 2^PH_W = one full period
  parameter int POS_W      = 32;    // fine position / cycle counter width
  parameter int COUNT_W    = 32;    // width of the front-end position counter

  // Quadrature (Gray) sequence for counting up: index 0..3 -> {A,B}.
  // A leads B when stepping forward through this table.
  function automatic logic [1:0] gray_of(input logic [1:0] idx);
    case (idx)
      2'd0:    return 2'b00;
      2'd1:    return 2'b10;
      2'd2:    return 2'b11;
      default: return 2'b01;
    endcase
  endfunction
endpackage
