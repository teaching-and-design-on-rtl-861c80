// tb_quad_decoder: self-checking test of the 4X quadrature decoder.
// A random walk through the Gray sequence (with occasional holds and a few
// deliberate double changes) is applied; one clock after each change the
// count pulse, direction and illegal flag are compared with values derived
// from the walk itself. The net count over the walk is also checked.
module tb_quad_decoder;
  logic clk = 1'b0;
  logic rst_n, a, b, cnt_en, up, illegal;
  int checks = 0, failures = 0;
  int pos_idx, net = 0, dut_net = 0, n_illegal = 0;

  quad_decoder dut (.clk, .rst_n, .a, .b, .cnt_en, .up, .illegal);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Gray code for count-up index 0..3, written out independently
  function automatic logic [1:0] code(input int i);
    logic [1:0] t [4] = '{2'b00, 2'b10, 2'b11, 2'b01};
    return t[i & 3];
  endfunction

  always @(posedge clk) if (rst_n && cnt_en) dut_net += up ? 1 : -1;

  task automatic expect_out(input bit e_en, input bit e_up, input bit e_ill);
    @(posedge clk); #1;
    checks++;
    if (cnt_en !== e_en || (e_en && up !== e_up) || illegal !== e_ill) begin
      failures++;
      if (failures < 10)
        $display("FAIL en=%b up=%b ill=%b exp %b %b %b", cnt_en, up, illegal, e_en, e_up, e_ill);
    end
  endtask

  initial begin
    rst_n = 1'b0; {a, b} = 2'b00; pos_idx = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      int r;
      r = $urandom % 10;
      @(negedge clk);
      if (r < 4) begin                // step up: A leads B
        pos_idx++; net++;
        {a, b} = code(pos_idx);
        expect_out(1, 1, 0);
      end else if (r < 8) begin       // step down
        pos_idx--; net--;
        {a, b} = code(pos_idx);
        expect_out(1, 0, 0);
      end else if (r < 9) begin       // hold
        expect_out(0, 0, 0);
      end else begin                  // both channels change: illegal
        pos_idx += 2; n_illegal++;
        {a, b} = code(pos_idx);
        expect_out(0, 0, 1);
      end
    end
    @(posedge clk); #1;
    checks++;
    if (dut_net != net) begin failures++; $display("FAIL net %0d exp %0d", dut_net, net); end
    if (n_illegal == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
