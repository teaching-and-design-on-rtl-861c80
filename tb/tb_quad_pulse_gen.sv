// tb_quad_pulse_gen: self-checking test of the quadrature pulse output.
// The target jumps by random amounts (both signs) and sometimes moves
// while the output is still catching up. A monitor decodes every change of
// (qa, qb): each must be a single Gray step, at least STEP_CYCLES clocks
// after the previous one. Once busy falls, the decoded count must equal the
// target, and a backlog of k steps must be worked off in k*STEP_CYCLES
// clocks.
module tb_quad_pulse_gen;
  localparam int STEP = 4;
  logic clk = 1'b0;
  logic rst_n, qa, qb, busy;
  logic signed [31:0] target;
  int checks = 0, failures = 0;
  int decoded = 0, last_change = -100, cyc = 0, n_backlog = 0;
  logic [1:0] prev;

  quad_pulse_gen #(.POS_W(32), .STEP_CYCLES(STEP)) dut (.clk, .rst_n, .target, .qa, .qb, .busy);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int idx(input logic [1:0] s);
    case (s)
      2'b00: return 0;
      2'b10: return 1;
      2'b11: return 2;
      default: return 3;
    endcase
  endfunction

  // monitor, sampling between the active clock edges
  always @(posedge clk) cyc++;
  always @(negedge clk) begin
    if (rst_n && {qa, qb} != prev) begin
      int d;
      d = (idx({qa, qb}) - idx(prev)) & 3;
      checks++;
      if (d == 2 || cyc - last_change < STEP) begin
        failures++;
        if (failures < 10) $display("FAIL bad step d=%0d gap=%0d", d, cyc - last_change);
      end
      decoded += (d == 1) ? 1 : -1;
      last_change = cyc;
    end
    prev = {qa, qb};
  end

  initial begin
    rst_n = 1'b0; target = 0; prev = 2'b00;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // timing of a backlog of 10 steps
    begin
      int t0;
      target = 10; t0 = cyc; #1;
      while (busy) @(negedge clk);
      checks++;
      if (cyc - t0 > 10 * STEP + 1 || cyc - t0 < 9 * STEP) begin
        failures++; $display("FAIL 10 steps took %0d clocks", cyc - t0);
      end
    end
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      target = target + int'($urandom % 61) - 30;
      if ($urandom % 2) begin
        repeat ($urandom % 40) @(negedge clk);
        if (busy) n_backlog++;
        target = target + int'($urandom % 21) - 10;
      end
      #1;
      while (busy) @(negedge clk);
      repeat (2) @(negedge clk);
      checks++;
      if (decoded != target) begin
        failures++;
        if (failures < 10) $display("FAIL decoded=%0d target=%0d", decoded, target);
      end
    end
    if (n_backlog == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
