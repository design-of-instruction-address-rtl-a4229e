// tb_aq_controller: the address queue controller against a set-level model.
// The model keeps a valid bit and an allocation sequence number per set and
// the ring position.  Random fetcher stalls, retirement requests (into live
// sets, into free sets and out of range) and access pointers are applied.
// Checked every cycle: Set_ENABLE (one-hot at the ring position unless
// stalled or full), queue_full, the effective stall, both access match
// vectors, the pointer exception, and after each edge the valid bits: a retire
// into a live set frees exactly the live sets allocated before it.  Phases
// with slow retirement fill the queue.
module tb_aq_controller;
  localparam int NS = 20, NC = 120;
  logic clk = 1'b0, rst_n, stall, rab_req_n;
  logic [6:0] bu_ptr, rab_ptr;
  logic [NC-1:0] bu_match, rab_match;
  logic [NS-1:0] set_enable, set_valid;
  logic queue_full, stall_eff, ptr_exception;
  int checks = 0, failures = 0;
  logic m_valid [NS];
  int   m_seq   [NS];
  int   m_sel = 0, seq = 1;
  int   n_full = 0, n_free = 0, n_dead = 0;

  aq_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; stall = 0; rab_req_n = 1; bu_ptr = 0; rab_ptr = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (m_valid[i]) begin m_valid[i] = 1'b0; m_seq[i] = 0; end
    for (int c = 0; c < 4000; c++) begin
      logic [NS-1:0] exp_en;
      logic [NC-1:0] exp_bu, exp_rab;
      logic exp_full, slow;
      int rs;
      slow = (c % 1000) > 600;
      stall = ($urandom % 8 == 0);
      bu_ptr = 7'($urandom % 128);
      rab_req_n = !($urandom % (slow ? 20 : 3) == 0);
      rab_ptr = 7'($urandom % ($urandom % 10 == 0 ? 128 : 120));
      #1;
      exp_full = m_valid[m_sel];
      exp_en = '0;
      if (!stall && !exp_full) exp_en[m_sel] = 1'b1;
      exp_bu = '0; if (int'(bu_ptr) < NC) exp_bu[bu_ptr] = 1'b1;
      exp_rab = '0; if (int'(rab_ptr) < NC) exp_rab[rab_ptr] = 1'b1;
      check(queue_full == exp_full, "queue_full");
      check(stall_eff == (stall || exp_full), "stall_eff");
      check(set_enable == exp_en, $sformatf("set_enable %h exp %h", set_enable, exp_en));
      check(bu_match == exp_bu, "bu_match");
      check(rab_match == exp_rab, "rab_match");
      check(ptr_exception == (!rab_req_n && int'(rab_ptr) >= NC), "ptr_exception");
      if (exp_full) n_full++;
      @(posedge clk);
      if (!rab_req_n && int'(rab_ptr) < NC) begin
        rs = int'(rab_ptr) / 6;
        if (m_valid[rs]) begin
          for (int s = 0; s < NS; s++)
            if (m_valid[s] && m_seq[s] < m_seq[rs]) begin m_valid[s] = 1'b0; n_free++; end
        end else n_dead++;
      end
      if (exp_en[m_sel]) begin
        m_valid[m_sel] = 1'b1; m_seq[m_sel] = seq++;
        m_sel = (m_sel + 1) % NS;
      end
      @(negedge clk);
      for (int s = 0; s < NS; s++)
        check(set_valid[s] == m_valid[s], $sformatf("valid[%0d]", s));
    end
    check(n_full > 0 && n_free > 0 && n_dead > 0, "scenarios not all reached");
    $display("full=%0d freed=%0d retire-into-free=%0d", n_full, n_free, n_dead);
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
