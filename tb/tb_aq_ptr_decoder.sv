// tb_aq_ptr_decoder: exhaustive test of the 7-to-120 pointer decoder.
// Every pointer code is applied with the enable high and low; the match
// vector must have exactly the named cell set (none for codes 120-127, which
// must raise out_of_range instead), and nothing at all while disabled.
module tb_aq_ptr_decoder;
  logic         en;
  logic [6:0]   ptr;
  logic [119:0] match;
  logic         out_of_range;
  int checks = 0, failures = 0;

  aq_ptr_decoder dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int e = 0; e < 2; e++)
      for (int p = 0; p < 128; p++) begin
        logic [119:0] exp;
        en = e[0]; ptr = 7'(p);
        exp = '0;
        if (e == 1 && p < 120) exp[p] = 1'b1;
        #1;
        check(match == exp, $sformatf("match en=%0d ptr=%0d", e, p));
        check(out_of_range == (e == 1 && p >= 120), $sformatf("range en=%0d ptr=%0d", e, p));
      end
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
