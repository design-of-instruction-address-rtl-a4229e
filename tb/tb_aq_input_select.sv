// tb_aq_input_select: routing of fetched offsets into the six cells.
// For every count x of delivered instructions (1..5) with random offsets,
// cells 0..x-1 must hold the instructions' own offsets and cell x the next
// offset of instruction x-1.
module tb_aq_input_select;
  import aq_pkg::*;
  eip_ofs_t cur_eip [5];
  eip_ofs_t nxt_eip [5];
  ofs_t     cur_pc  [5];
  ofs_t     nxt_pc  [5];
  logic [3:0] last;
  eip_ofs_t cell_eip [6];
  ofs_t     cell_pc  [6];
  int checks = 0, failures = 0;

  aq_input_select dut (.*);

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int t = 0; t < 500; t++) begin
      int x;
      x = 1 + t % 5;
      for (int k = 0; k < 5; k++) begin
        cur_eip[k] = 6'($urandom); nxt_eip[k] = 6'($urandom);
        cur_pc[k]  = 5'($urandom); nxt_pc[k]  = 5'($urandom);
      end
      last = '0;
      if (x < 5) last[x-1] = 1'b1;
      #1;
      for (int k = 0; k < x; k++) begin
        check(cell_eip[k] == cur_eip[k], $sformatf("x=%0d cell %0d eip", x, k));
        check(cell_pc[k]  == cur_pc[k],  $sformatf("x=%0d cell %0d pc", x, k));
      end
      check(cell_eip[x] == nxt_eip[x-1], $sformatf("x=%0d next eip", x));
      check(cell_pc[x]  == nxt_pc[x-1],  $sformatf("x=%0d next pc", x));
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
