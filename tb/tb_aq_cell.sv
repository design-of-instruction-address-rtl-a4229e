// tb_aq_cell: one Scheme-2 storage cell.
// Random offsets are written with set_enable; the cell must rebuild
// EIP = {line2 ? EIP2 : EIP1, offset} and PC = {PC line, offset} on whichever
// read port is matched (zero on the other), keep its contents while
// set_enable is low, present its index only while enabled, and flag a snoop
// address equal to its PC.
module tb_aq_cell;
  import aq_pkg::*;
  logic clk = 1'b0, set_enable, bu_match, rab_match, smc_hit;
  eip_ofs_t eip_ofs_in;
  ofs_t pc_ofs_in;
  line_t eip1, eip2, pc_line;
  addr_t smc_addr, eip_bu, pc_bu, eip_rab, pc_rab;
  qptr_t qptr_out;
  int checks = 0, failures = 0;
  eip_ofs_t m_e;
  ofs_t m_p;

  aq_cell #(.INDEX(77)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    set_enable = 1'b1; eip_ofs_in = '0; pc_ofs_in = '0;
    m_e = '0; m_p = '0;
    for (int t = 0; t < 1000; t++) begin
      addr_t exp_eip, exp_pc;
      @(negedge clk);
      set_enable = ($urandom % 2 == 0) || t == 0;
      eip_ofs_in = 6'($urandom); pc_ofs_in = 5'($urandom);
      eip1 = line_t'($urandom); eip2 = line_t'($urandom); pc_line = line_t'($urandom);
      bu_match = 1'($urandom); rab_match = 1'($urandom);
      #1;
      check(qptr_out == (set_enable ? 7'd77 : 7'd0), "qptr_out");
      if (t > 0) begin
        exp_eip = {(m_e.line2 ? eip2 : eip1), m_e.ofs};
        exp_pc  = {pc_line, m_p};
        smc_addr = ($urandom % 2 != 0) ? exp_pc : addr_t'($urandom);
        #1;
        check(eip_bu  == (bu_match  ? exp_eip : 0), "eip_bu");
        check(pc_bu   == (bu_match  ? exp_pc  : 0), "pc_bu");
        check(eip_rab == (rab_match ? exp_eip : 0), "eip_rab");
        check(pc_rab  == (rab_match ? exp_pc  : 0), "pc_rab");
        check(smc_hit == (smc_addr == exp_pc), "smc_hit");
      end
      @(posedge clk);
      if (set_enable) begin m_e = eip_ofs_in; m_p = pc_ofs_in; end
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
