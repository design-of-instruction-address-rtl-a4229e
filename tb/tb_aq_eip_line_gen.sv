// tb_aq_eip_line_gen: EIP-line computation.
// For random CS bases and linear lines, every offset 0..31 of the line is
// converted; rebuilding {line2 ? EIP2 : EIP1, offset} must give the effective
// address linear - CS_Base, and line2 must be set exactly for offsets at or
// above the five low bits of CS_Base.
module tb_aq_eip_line_gen;
  import aq_pkg::*;
  line_t    lin_line, eip1, eip2;
  addr_t    cs_base;
  ofs_t     cur_ofs [5];
  ofs_t     nxt_ofs [5];
  eip_ofs_t cur_eip [5];
  eip_ofs_t nxt_eip [5];
  int checks = 0, failures = 0;

  aq_eip_line_gen dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic addr_t rebuild(input eip_ofs_t e);
    return {(e.line2 ? eip2 : eip1), e.ofs};
  endfunction

  initial begin
    for (int t = 0; t < 300; t++) begin
      cs_base  = $urandom;
      if (t % 7 == 0) cs_base[4:0] = '0;
      lin_line = line_t'($urandom);
      for (int o = 0; o < 32; o += 5) begin
        for (int k = 0; k < 5; k++) begin
          cur_ofs[k] = 5'(o + k);
          nxt_ofs[k] = 5'(31 - o - k);
        end
        #1;
        for (int k = 0; k < 5; k++) begin
          addr_t lin_c, lin_n;
          lin_c = {lin_line, cur_ofs[k]};
          lin_n = {lin_line, nxt_ofs[k]};
          check(rebuild(cur_eip[k]) == lin_c - cs_base, $sformatf("cur eip base %h lin %h", cs_base, lin_c));
          check(rebuild(nxt_eip[k]) == lin_n - cs_base, "next eip");
          check(cur_eip[k].line2 == (cur_ofs[k] >= cs_base[4:0]), "line2 bit");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
