// tb_updown_counter: self-checking test of the up/down position counter,
// including wrap-around through zero, against an integer model.
module tb_updown_counter;
  logic clk = 1'b0;
  logic rst_n, en, up;
  logic [15:0] count;
  int checks = 0, failures = 0;
  int model = 0;

  updown_counter #(.COUNT_W(16)) dut (.clk, .rst_n, .en, .up, .count);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; en = 1'b0; up = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      // mostly downward early on so that zero is crossed
      up = (n < 1000) ? ($urandom % 4 == 0) : ($urandom % 2 == 0);
      @(posedge clk);
      if (en) model += up ? 1 : -1;
      #1;
      checks++;
      if (count !== 16'(model)) begin
        failures++;
        if (failures < 10) $display("FAIL count=%0d exp=%0d", count, 16'(model));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
