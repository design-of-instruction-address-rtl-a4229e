// tb_aq_set_controller: one set controller against a cycle model.
// Random set selection, stall, retire enable, compare enable and bus ages are
// applied; a model of the valid bit and age (reset to 0 on allocation, +1 on
// each non-stalled cycle while valid, cleared when a valid compare sees an
// age strictly greater than the bus) predicts valid, set_enable, queue_full,
// ac_drive and ac_out every cycle.  Equal ages must not retire the set.
module tb_aq_set_controller;
  logic clk = 1'b0, rst_n;
  logic set_sel, stall, en, cmp_en, ac_valid;
  logic [4:0] ac_in, ac_out;
  logic ac_drive, set_enable, queue_full, valid;
  int checks = 0, failures = 0;
  logic m_valid;
  logic [4:0] m_age;
  int n_retire = 0, n_equal = 0, n_alloc = 0;

  aq_set_controller dut (.*);
  always #5 clk = ~clk;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 1'b0; set_sel = 0; stall = 0; en = 0; cmp_en = 0; ac_valid = 0; ac_in = 0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    m_valid = 1'b0; m_age = '0;
    for (int c = 0; c < 3000; c++) begin
      // allocate only when the set is free, as the controller's stall ensures
      set_sel  = ($urandom % 8 == 0);
      stall    = ($urandom % 5 == 0) || (set_sel && m_valid);
      en       = ($urandom % 6 == 0);
      cmp_en   = ($urandom % 3 == 0);
      ac_valid = ($urandom % 4 != 0);
      ac_in    = ($urandom % 2 == 0) ? m_age : 5'($urandom % 20);
      #1;
      check(set_enable == (set_sel && !stall), "set_enable");
      check(queue_full == (set_sel && m_valid), "queue_full");
      check(ac_drive == (en && m_valid), "ac_drive");
      check(ac_out == ((en && m_valid) ? m_age : 5'd0), "ac_out");
      check(valid == m_valid, "valid");
      @(posedge clk);
      if (set_sel && !stall) begin
        m_valid = 1'b1; m_age = '0; n_alloc++;
      end else begin
        logic ov;
        ov = m_valid;
        if (cmp_en && ac_valid && m_valid && m_age > ac_in) begin m_valid = 1'b0; n_retire++; end
        else if (cmp_en && ac_valid && m_valid && m_age == ac_in) n_equal++;
        if (ov && !stall) m_age = m_age + 1'b1;
      end
      @(negedge clk);
      if (m_valid) check(dut.age == m_age, "age");
    end
    check(n_alloc > 0 && n_retire > 0 && n_equal > 0, "scenarios not all reached");
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
