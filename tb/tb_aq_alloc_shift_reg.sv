// tb_aq_alloc_shift_reg: the allocation ring.
// After reset the ring must read 0...01; it then advances on randomly chosen
// cycles and must always equal 1 << (number of advances mod 20), which also
// covers the wrap from set 19 back to set 0.
module tb_aq_alloc_shift_reg;
  logic clk = 1'b0, rst_n, advance;
  logic [19:0] sel;
  int checks = 0, failures = 0;
  int idx = 0, wraps = 0;

  aq_alloc_shift_reg dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; advance = 1'b1;
    @(negedge clk); @(negedge clk);
    check(sel == 20'h00001, "reset value");
    rst_n = 1'b1;
    for (int c = 0; c < 400; c++) begin
      advance = ($urandom % 4 != 0);
      @(posedge clk);
      if (advance) begin
        idx = (idx + 1) % 20;
        if (idx == 0) wraps++;
      end
      @(negedge clk);
      check(sel == (20'h1 << idx), $sformatf("sel %h exp index %0d", sel, idx));
    end
    check(wraps > 0, "ring never wrapped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
