// norm_tracker: per-cycle amplitude and DC offset tracking of one channel.
//
// The real quadrature signals drift in amplitude and offset (laser power,
// distance, encoder mounting), so both are measured again every signal
// period. While a period runs, the largest and smallest ADC codes seen are
// kept. When `cycle_start` marks the beginning of the next period (together
// with `valid`), the outputs are refreshed to
//     offset = (max + min) / 2        amp = (max - min) / 2
// and the running extremes restart from the present sample. The amplitude
// never goes below 1, so it is always a safe divisor for normalisation.
//
// Interface: valid/sample from the ADC, cycle_start from the square wave
// of the same channel. offset and amp are registered and change only at a
// cycle boundary. After reset they hold mid-scale and a quarter of full
// scale until the first complete period has been seen (this reset value,
// like the choice of the square-wave edge as the cycle boundary, is this
// implementation's own; refreshing every cycle follows the design).
module norm_tracker #(
  parameter int ADC_W = interp_pkg::ADC_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             valid,
  input  logic [ADC_W-1:0] sample,
  input  logic             cycle_start,
  output logic [ADC_W-1:0] offset,
  output logic [ADC_W-1:0] amp
);
  logic [ADC_W-1:0] run_max, run_min;
  logic [ADC_W-1:0] cur_max, cur_min;
  logic [ADC_W:0]   sum;
  logic [ADC_W-1:0] half_span;

  // extremes including the present sample
  assign cur_max   = (sample > run_max) ? sample : run_max;
  assign cur_min   = (sample < run_min) ? sample : run_min;
  assign sum       = {1'b0, cur_max} + {1'b0, cur_min};
  assign half_span = (cur_max - cur_min) >> 1;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      run_max <= '0;
      run_min <= '1;
      offset  <= ADC_W'(1) << (ADC_W - 1);
      amp     <= ADC_W'(1) << (ADC_W - 2);
    end else if (valid) begin
      if (cycle_start) begin
        offset  <= ADC_W'(sum >> 1);
        amp     <= (half_span == '0) ? ADC_W'(1) : half_span;
        run_max <= sample;
        run_min <= sample;
      end else begin
        run_max <= cur_max;
        run_min <= cur_min;
      end
    end
  end
endmodule
