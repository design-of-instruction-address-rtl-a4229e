// tb_aq_first_cell: first cell of a set.
// Random offsets, split bits and line-select bits are written; the EIP line
// read back must be EIP1/EIP2 by the line-select bit for a normal
// instruction, and for a split instruction EIP1 (upper part of the previous
// line) or EIP0 from the preceding set (lower part).  PC, read-port gating,
// index output and snoop are checked as for the other cells.
module tb_aq_first_cell;
  import aq_pkg::*;
  logic clk = 1'b0, set_enable, split_prev, bu_match, rab_match, smc_hit;
  eip_ofs_t eip_ofs_in;
  ofs_t pc_ofs_in;
  line_t eip0, eip1, eip2, pc_line;
  addr_t smc_addr, eip_bu, pc_bu, eip_rab, pc_rab;
  qptr_t qptr_out;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  eip_ofs_t m_e;
  ofs_t m_p;
  logic m_s;

  aq_first_cell #(.INDEX(6)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 1000; t++) begin
      addr_t exp_eip, exp_pc;
      line_t l;
      @(negedge clk);
      set_enable = ($urandom % 2 == 0) || t == 0;
      split_prev = 1'($urandom);
      eip_ofs_in = 6'($urandom); pc_ofs_in = 5'($urandom);
      eip0 = line_t'($urandom); eip1 = line_t'($urandom); eip2 = line_t'($urandom);
      pc_line = line_t'($urandom);
      bu_match = 1'($urandom); rab_match = 1'($urandom);
      #1;
      check(qptr_out == (set_enable ? 7'd6 : 7'd0), "qptr_out");
      if (t > 0) begin
        if (!m_s) l = m_e.line2 ? eip2 : eip1;
        else      l = m_e.line2 ? eip1 : eip0;
        seen[{m_s, m_e.line2}]++;
        exp_eip = {l, m_e.ofs};
        exp_pc  = {pc_line, m_p};
        smc_addr = ($urandom % 2 != 0) ? exp_pc : addr_t'($urandom);
        #1;
        check(eip_bu  == (bu_match  ? exp_eip : 0), $sformatf("eip_bu split=%0d line2=%0d", m_s, m_e.line2));
        check(pc_bu   == (bu_match  ? exp_pc  : 0), "pc_bu");
        check(eip_rab == (rab_match ? exp_eip : 0), "eip_rab");
        check(pc_rab  == (rab_match ? exp_pc  : 0), "pc_rab");
        check(smc_hit == (smc_addr == exp_pc), "smc_hit");
      end
      @(posedge clk);
      if (set_enable) begin m_e = eip_ofs_in; m_p = pc_ofs_in; m_s = split_prev; end
    end
    for (int i = 0; i < 4; i++) check(seen[i] > 0, "select combination not reached");
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
