// tb_aq_set: one set (index 3) of the Scheme-2 storage.
// Each round writes random line addresses, offsets and split bit, then reads
// all six cells through both ports.  Expected values are built from the
// written fields: cell 0 uses PC line 1 and the first-cell EIP rule (with
// eip0 from the preceding set), cells 1-5 use PC line 2.  The queue pointers
// 18..22 must appear only while set_enable is high, and a snoop hit on any
// cell's PC is reported only when the set is valid.
module tb_aq_set;
  import aq_pkg::*;
  logic clk = 1'b0, set_enable, set_valid, split_prev, smc_valid, smc_hit;
  line_t eip1_in, eip2_in, pc_line1_in, pc_line2_in, eip0, eip1_q;
  eip_ofs_t cell_eip [6];
  ofs_t cell_pc [6];
  addr_t smc_addr, eip_bu, pc_bu, eip_rab, pc_rab;
  logic [5:0] bu_match, rab_match;
  qptr_t qptr [5];
  int checks = 0, failures = 0;
  addr_t m_eip [6];
  addr_t m_pc  [6];

  aq_set #(.SET_IDX(3)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    bu_match = '0; rab_match = '0; smc_valid = 0; smc_addr = '0; set_valid = 0;
    for (int t = 0; t < 200; t++) begin
      // write
      @(negedge clk);
      set_enable = 1'b1;
      split_prev = 1'($urandom);
      eip1_in = line_t'($urandom); eip2_in = line_t'($urandom);
      pc_line1_in = line_t'($urandom); pc_line2_in = line_t'($urandom);
      eip0 = line_t'($urandom);
      for (int k = 0; k < 6; k++) begin cell_eip[k] = 6'($urandom); cell_pc[k] = 5'($urandom); end
      #1;
      for (int k = 0; k < 5; k++) check(qptr[k] == 7'(18 + k), "qptr while enabled");
      for (int k = 0; k < 6; k++) begin
        line_t l;
        if (k == 0 && split_prev) l = cell_eip[k].line2 ? eip1_in : eip0;
        else                      l = cell_eip[k].line2 ? eip2_in : eip1_in;
        m_eip[k] = {l, cell_eip[k].ofs};
        m_pc[k]  = {(k == 0 ? pc_line1_in : pc_line2_in), cell_pc[k]};
      end
      @(posedge clk);
      @(negedge clk);
      set_enable = 1'b0;
      for (int k = 0; k < 6; k++) begin cell_eip[k] = 6'($urandom); cell_pc[k] = 5'($urandom); end
      eip1_in = line_t'($urandom);
      #1;
      for (int k = 0; k < 5; k++) check(qptr[k] == 7'd0, "qptr while idle");
      // read every cell on both ports, with the other port on another cell
      for (int k = 0; k < 6; k++) begin
        int j;
        j = (k + 1 + $urandom % 5) % 6;
        bu_match = 6'(1) << k; rab_match = 6'(1) << j;
        set_valid = 1'($urandom);
        smc_valid = 1'b1;
        smc_addr = ($urandom % 2 != 0) ? m_pc[k] : addr_t'($urandom);
        #1;
        check(eip_bu == m_eip[k], $sformatf("eip_bu cell %0d", k));
        check(pc_bu  == m_pc[k],  $sformatf("pc_bu cell %0d", k));
        check(eip_rab == m_eip[j], $sformatf("eip_rab cell %0d", j));
        check(pc_rab  == m_pc[j],  $sformatf("pc_rab cell %0d", j));
        begin
          logic hit;
          hit = 1'b0;
          for (int i = 0; i < 6; i++) if (m_pc[i] == smc_addr) hit = 1'b1;
          check(smc_hit == (hit && set_valid), "smc_hit");
        end
      end
      bu_match = '0; rab_match = '0;
      #1;
      check(eip_bu == 0 && pc_rab == 0, "ports idle");
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
