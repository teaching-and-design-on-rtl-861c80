// tb_phase_subdivider: self-checking test of half-period selection,
// subdivision, unwrapping, cycle counting and direction.
// The testbench moves a true phase (in 1/65536 of a period, unbounded) by
// random steps of up to 12000 in either direction, and feeds the block what
// the arccos stage would give: the half-period angle and the sign of the
// other channel. Expected values come straight from the true phase:
//   step_idx = floor(t * N / 65536) with t the phase within the period,
//   position = floor(total * N / 65536) relative to the last re-seed,
//   cycles   = floor(total / 65536)     relative to the last re-seed.
// The subdivision (25, 100, 400, 1600) and the interpolated channel are
// switched during the run, which must re-seed without a jump.
module tb_phase_subdivider;
  logic clk = 1'b0;
  logic rst_n, valid, other_pos, use_b, dir;
  logic [15:0] half_phase;
  logic [10:0] subdiv, step_idx;
  logic signed [31:0] position, cycles;
  int checks = 0, failures = 0;
  longint total, total0, base_pos, base_cyc, e_pos, e_cyc;
  int n_fwd_wrap = 0, n_bwd_wrap = 0, n_switch = 0;
  bit e_dir;

  phase_subdivider #(.PH_W(16), .MAX_SUBDIV(1600), .SUBDIV_W(11), .POS_W(32)) dut (
    .clk, .rst_n, .valid, .half_phase, .other_pos, .use_b, .subdiv,
    .position, .cycles, .dir, .step_idx
  );

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint fdiv(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q--;
    return q;
  endfunction

  task automatic apply(input bit reseed);
    longint t;
    t = total - fdiv(total, 65536) * 65536;
    @(negedge clk);
    valid = 1'b1;
    if (t <= 32768) begin half_phase = 16'(t);         other_pos = ~use_b; end
    else            begin half_phase = 16'(65536 - t); other_pos = use_b;  end
    @(posedge clk); #1;
    valid = 1'b0;
    if (reseed) begin
      total0 = total; base_pos = e_pos; base_cyc = e_cyc;
    end else begin
      longint np, nc;
      np = base_pos + fdiv(total * subdiv, 65536) - fdiv(total0 * subdiv, 65536);
      nc = base_cyc + fdiv(total, 65536) - fdiv(total0, 65536);
      if (np > e_pos) e_dir = 1; else if (np < e_pos) e_dir = 0;
      if (nc > e_cyc) n_fwd_wrap++; else if (nc < e_cyc) n_bwd_wrap++;
      e_pos = np; e_cyc = nc;
    end
    checks++;
    if (longint'(position) != e_pos || longint'(cycles) != e_cyc || dir !== e_dir ||
        longint'(step_idx) != fdiv(t * subdiv, 65536)) begin
      failures++;
      if (failures < 10)
        $display("FAIL N=%0d t=%0d pos=%0d exp=%0d cyc=%0d exp=%0d dir=%b exp=%b idx=%0d",
                 subdiv, t, position, e_pos, cycles, e_cyc, dir, e_dir, step_idx);
    end
  endtask

  initial begin
    int sizes[4] = '{25, 100, 400, 1600};
    rst_n = 1'b0; valid = 0; half_phase = 0; other_pos = 0; use_b = 0; subdiv = 11'd1600;
    total = 12345; e_pos = 0; e_cyc = 0; e_dir = 1;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    apply(1);
    for (int seg = 0; seg < 24; seg++) begin
      int bias;
      bias = (seg % 3 == 0) ? 6000 : (seg % 3 == 1) ? -6000 : 0;
      for (int n = 0; n < 300; n++) begin
        total += bias + int'($urandom % 12001) - 6000;
        apply(0);
      end
      // change a setting: the next sample re-seeds
      if (seg % 2 == 0) begin
        logic [10:0] nn;
        nn = 11'(sizes[$urandom % 4]);
        if (nn == subdiv) nn = (subdiv == 11'd1600) ? 11'd25 : subdiv << 2;
        subdiv = nn;
      end else begin
        use_b = ~use_b;
      end
      n_switch++;
      total += int'($urandom % 2001) - 1000;
      apply(1);
    end
    if (n_fwd_wrap == 0 || n_bwd_wrap == 0 || n_switch == 0) begin
      failures++; $display("FAIL wraps fwd=%0d bwd=%0d", n_fwd_wrap, n_bwd_wrap);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
