// tb_aq_retire_set_selector: exhaustive test of the retire set selector.
// For every pointer with the active-low request asserted, EN must name the
// set ptr/6 (none for 120-127, which raise the exception), and CMP_EN must be
// the inverted request.  With the request released nothing is enabled.
module tb_aq_retire_set_selector;
  logic        rab_req_n;
  logic [6:0]  rab_ptr;
  logic [19:0] en;
  logic        cmp_en, ptr_exception;
  int checks = 0, failures = 0;

  aq_retire_set_selector dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int r = 0; r < 2; r++)
      for (int p = 0; p < 128; p++) begin
        logic [19:0] exp;
        rab_req_n = r[0]; rab_ptr = 7'(p);
        exp = '0;
        if (r == 0 && p < 120) exp[p / 6] = 1'b1;
        #1;
        check(en == exp, $sformatf("en req_n=%0d ptr=%0d got %h", r, p, en));
        check(cmp_en == (r == 0), "cmp_en");
        check(ptr_exception == (r == 0 && p >= 120), $sformatf("exception ptr=%0d", p));
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
