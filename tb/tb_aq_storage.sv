// tb_aq_storage: the whole Scheme-2 storage without the controller.
// The testbench writes random fetch groups (1 to 5 instructions, random split
// bit, random line addresses) into sets in ring order, keeping for each cell
// the full EIP and PC the storage should rebuild; cell 0 of a split group takes
// its lower-part EIP line from the preceding set's EIP line 1.  After every
// write, random cells of written sets are read through both ports and the
// snoop output is compared with all stored PCs of the valid sets.
module tb_aq_storage;
  import aq_pkg::*;
  localparam int NS = 20, NC = 120;
  logic clk = 1'b0;
  logic [NS-1:0] set_enable, set_valid;
  logic split_prev, smc_valid, smc_exception;
  line_t eip1, eip2, pc_line1, pc_line2;
  eip_ofs_t cur_eip [5];
  eip_ofs_t nxt_eip [5];
  ofs_t cur_pc [5];
  ofs_t nxt_pc [5];
  logic [3:0] last;
  logic [NC-1:0] bu_match, rab_match;
  addr_t smc_addr, eip_bu, pc_bu, eip_rab, pc_rab;
  qptr_t qptr [5];
  int checks = 0, failures = 0;
  addr_t m_eip [NC];
  addr_t m_pc  [NC];
  line_t m_eip1 [NS];
  logic  written [NS];
  int n_split_lo = 0;

  aq_storage dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    foreach (written[i]) written[i] = 1'b0;
    set_valid = '0; bu_match = '0; rab_match = '0; smc_valid = 0; smc_addr = '0;
    for (int t = 0; t < 300; t++) begin
      int s, x;
      s = t % NS;
      x = 1 + $urandom % 5;
      @(negedge clk);
      set_enable = '0; set_enable[s] = 1'b1;
      split_prev = 1'($urandom);
      eip1 = line_t'($urandom); eip2 = line_t'($urandom);
      pc_line1 = line_t'($urandom); pc_line2 = line_t'($urandom);
      for (int k = 0; k < 5; k++) begin
        cur_eip[k] = 6'($urandom); nxt_eip[k] = 6'($urandom);
        cur_pc[k] = 5'($urandom); nxt_pc[k] = 5'($urandom);
      end
      last = '0; if (x < 5) last[x-1] = 1'b1;
      #1;
      for (int k = 0; k < 5; k++) check(qptr[k] == 7'(6 * s + k), "qptr");
      for (int k = 0; k < 6; k++) begin
        eip_ofs_t e; ofs_t p; line_t l;
        if (k < x)       begin e = cur_eip[k];   p = cur_pc[k];   end
        else if (k == x) begin e = nxt_eip[k-1]; p = nxt_pc[k-1]; end
        else if (k < 5)  begin e = cur_eip[k];   p = cur_pc[k];   end
        else             begin e = nxt_eip[4];   p = nxt_pc[4];   end
        if (k == 0 && split_prev) begin
          l = e.line2 ? eip1 : m_eip1[(s + NS - 1) % NS];
          if (!e.line2) n_split_lo++;
        end else l = e.line2 ? eip2 : eip1;
        m_eip[6*s+k] = {l, e.ofs};
        m_pc[6*s+k]  = {(k == 0 ? pc_line1 : pc_line2), p};
      end
      m_eip1[s] = eip1;
      @(posedge clk);
      written[s] = 1'b1;
      @(negedge clk);
      set_enable = '0;
      // set_valid marks the written sets except the one after s, whose
      // reuse would change the split cell's EIP0
      for (int i = 0; i < NS; i++) set_valid[i] = written[i] && i != (s + 1) % NS;
      for (int r = 0; r < 8; r++) begin
        int p, q; logic hit;
        p = 6 * s + ($urandom % 6);
        do q = $urandom % NC; while (!set_valid[q / 6]);
        bu_match = '0; bu_match[p] = 1'b1;
        rab_match = '0; rab_match[q] = 1'b1;
        smc_valid = 1'b1;
        smc_addr = ($urandom % 2 != 0) ? m_pc[q] : addr_t'($urandom);
        #1;
        check(eip_bu == m_eip[p], $sformatf("eip_bu ptr %0d", p));
        check(pc_bu  == m_pc[p],  $sformatf("pc_bu ptr %0d", p));
        check(eip_rab == m_eip[q], $sformatf("eip_rab ptr %0d", q));
        check(pc_rab  == m_pc[q],  $sformatf("pc_rab ptr %0d", q));
        hit = 1'b0;
        for (int i = 0; i < NC; i++) if (set_valid[i / 6] && m_pc[i] == smc_addr) hit = 1'b1;
        check(smc_exception == hit, "smc_exception");
      end
    end
    check(n_split_lo > 0, "previous-set EIP line never used");
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
