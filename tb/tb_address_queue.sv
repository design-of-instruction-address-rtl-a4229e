// tb_address_queue: end-to-end test of the instruction address queue.
//
// The testbench plays fetcher, reorder buffer, branch unit and load/store
// unit around the queue at its default size (20 sets of 6 cells).  A program
// generator walks a linear instruction stream: fetch groups of one to five
// instructions of random length inside one cache line, sometimes headed by an
// instruction split from the previous line, sometimes ended by a taken jump,
// with random fetcher stalls.  A reference model keeps the full 32-bit EIP
// (linear address minus CS base) and PC of every cell and the list of live sets
// in allocation order.  Every cycle it checks the queue pointers handed out,
// both access ports against the model, the snoop result against every cell of
// every valid set, queue_full, and the freeing of sets on retirement (a
// retire names the last retired instruction, all older sets go free).
// Two phases use CS bases with different low bits, and each phase has a
// stretch where the reorder buffer retires slowly so the queue fills.
// Mechanisms counted and required: allocation, fetcher stall, queue full,
// retirement, split-line instruction, EIP line 1 / line 2 / previous-set line
// (EIP0) selection, next-address cell read, snoop hit and miss, out-of-range
// retire pointer.
module tb_address_queue;
  import aq_pkg::*;

  localparam int unsigned NS  = NUM_SETS;
  localparam int unsigned CPS = CELLS_PER_SET;
  localparam int unsigned FW  = FETCH_W;
  localparam int unsigned NC  = NS * CPS;

  logic   clk = 1'b0;
  logic   rst_n;
  logic   stall, queue_full, alloc, split_prev, rab_req_n, smc_valid;
  addr_t  cs_base, smc_addr, bu_eip, bu_pc, rab_eip, rab_pc;
  line_t  pc_line1, pc_line2;
  logic [FW-2:0] last;
  ofs_t   cur_ofs [FW];
  ofs_t   nxt_ofs [FW];
  qptr_t  qptr    [FW];
  qptr_t  bu_ptr, rab_ptr;
  logic   ptr_exception, smc_exception;

  address_queue dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int unsigned cycle = 0;

  // ---------------- reference model ----------------
  addr_t  m_eip  [NC];     // expected EIP of each cell
  addr_t  m_pc   [NC];     // expected PC of each cell (every cell, junk too)
  logic   m_instr[NC];     // cell holds a delivered instruction
  logic   m_next [NC];     // cell holds the next sequential address
  logic   m_split0[NS];    // cell 0 of the set is a split instruction
  logic   m_valid[NS];
  int unsigned m_seq[NS];  // allocation sequence number
  int unsigned seq_ctr = 0;
  int unsigned m_sel = 0;  // set the ring points at
  int     set_order[$];    // live sets, oldest first
  int     rob[$];          // pointers of allocated, unretired instructions

  // ---------------- mechanism counters ----------------
  int n_alloc = 0, n_stall = 0, n_full = 0, n_retire = 0, n_split = 0;
  int n_eip1 = 0, n_eip2 = 0, n_eip0 = 0, n_next = 0, n_smc_hit = 0;
  int n_smc_miss = 0, n_ptrexc = 0, n_bu = 0, n_rab = 0, n_eip0_lost = 0;

  // ---------------- program generator ----------------
  addr_t lpc;              // linear address of the next instruction
  logic  after_jump;
  // current fetch group
  int    g_x;
  addr_t g_addr [FW];
  addr_t g_next [FW];
  logic  g_split;
  logic  g_jump;
  logic  g_valid = 1'b0;
  int    slow_retire;

  task automatic check(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL cycle %0d: %s", cycle, what);
    end
  endtask

  function automatic int unsigned rnd(input int unsigned lo, input int unsigned hi);
    return lo + ($urandom % (hi - lo + 1));
  endfunction

  // Build a fetch group starting at lpc.
  task automatic make_group();
    addr_t a;
    int unsigned o, len, want;
    a = lpc;
    o = 32'(a[4:0]);
    g_split = 1'b0;
    g_x = 0;
    // an instruction near the line end may run into the next line
    if (!after_jump && o >= 26 && ($urandom % 2 == 0 || o == 31)) begin
      len = (32 - o) + rnd(1, 4);
      g_split = 1'b1;
    end else begin
      if (o == 31) o = 30;   // never happens after a jump: targets stop at 24
      len = rnd(1, 31 - o < 7 ? 31 - o : 7);
    end
    g_addr[0] = a;
    g_next[0] = a + len;
    g_x = 1;
    want = rnd(1, FW);
    while (g_x < int'(want)) begin
      a = g_next[g_x-1];
      o = 32'(a[4:0]);
      if (o >= 31) break;
      len = rnd(1, 31 - o < 7 ? 31 - o : 7);
      g_addr[g_x] = a;
      g_next[g_x] = a + len;
      g_x++;
    end
    g_jump = ($urandom % 12 == 0);
    g_valid = 1'b1;
  endtask

  // Drive the fetcher inputs for the current group.
  task automatic drive_group();
    line_t cur_line;
    cur_line   = g_split ? g_next[0][ADDR_W-1:OFS_W] : g_addr[0][ADDR_W-1:OFS_W];
    pc_line1   = g_addr[0][ADDR_W-1:OFS_W];
    pc_line2   = cur_line;
    split_prev = g_split;
    last       = '0;
    if (g_x < int'(FW)) last[g_x-1] = 1'b1;
    for (int k = 0; k < int'(FW); k++) begin
      if (k < g_x) begin
        cur_ofs[k] = g_addr[k][4:0];
        nxt_ofs[k] = g_next[k][4:0];
      end else begin
        cur_ofs[k] = ofs_t'($urandom);
        nxt_ofs[k] = ofs_t'($urandom);
      end
    end
  endtask

  // Commit the driven group into the model (called when alloc was high).
  task automatic commit_group();
    int unsigned s, base;
    addr_t pcv;
    s = m_sel;
    base = s * CPS;
    for (int k = 0; k < int'(CPS); k++) begin
      // what the input select network feeds cell k
      if (k == 0)                pcv = g_addr[0];
      else if (k == g_x)         pcv = {pc_line2, g_next[k-1][4:0]};
      else if (k < int'(FW))     pcv = {pc_line2, cur_ofs[k]};
      else                       pcv = {pc_line2, nxt_ofs[FW-1]};
      m_pc[base+k]    = pcv;
      m_eip[base+k]   = pcv - cs_base;
      m_instr[base+k] = (k < g_x);
      m_next[base+k]  = (k == g_x);
    end
    m_split0[s] = g_split;
    m_valid[s]  = 1'b1;
    m_seq[s]    = seq_ctr++;
    set_order.push_back(int'(s));
    for (int k = 0; k < g_x; k++) rob.push_back(int'(base) + k);
    if (g_split) n_split++;
    for (int k = 0; k < g_x; k++) begin
      if (k == 0 && g_split && g_addr[0][4:0] < cs_base[4:0]) n_eip0++;
      else if (g_addr[k][4:0] < cs_base[4:0]) n_eip1++;
      else n_eip2++;
    end
    m_sel = (m_sel + 1) % NS;
    lpc = g_next[g_x-1];
    after_jump = 1'b0;
    if (g_jump) begin
      lpc = {$urandom} & 32'hFFFF_FFE0;
      lpc[4:0] = 5'(rnd(0, 24));
      after_jump = 1'b1;
    end
    g_valid = 1'b0;
    n_alloc++;
  endtask

  // An access result is checked only for cells the model knows.
  task automatic check_read(input int p, input addr_t eip, input addr_t pc, input string port);
    int s;
    logic eip0_lost;
    s = p / CPS;
    if (!m_valid[s] || !(m_instr[p] || m_next[p])) return;
    // The first cell of a set with a split instruction reads EIP line 1 of
    // the preceding set; once that set is allocated again the value is gone.
    eip0_lost = (p % CPS == 0) && m_split0[s] && m_valid[s] &&
                (m_seq[(s + NS - 1) % NS] > m_seq[s]);
    check(pc == m_pc[p], $sformatf("%s PC ptr %0d got %h exp %h", port, p, pc, m_pc[p]));
    if (eip0_lost) n_eip0_lost++;
    else check(eip == m_eip[p], $sformatf("%s EIP ptr %0d got %h exp %h", port, p, eip, m_eip[p]));
    if (m_next[p]) n_next++;
  endtask

  function automatic int pick_live();
    int p;
    for (int t = 0; t < 40; t++) begin
      p = int'($urandom % NC);
      if (m_valid[p / CPS] && (m_instr[p] || m_next[p])) return p;
    end
    return -1;
  endfunction

  task automatic run_phase(input addr_t base, input int unsigned ncycles);
    int p, q, nret, rs, oldest_pos;
    logic exp_hit, exp_full, retiring, bad_ptr;
    cs_base = base;
    rst_n = 1'b0;
    stall = 1'b0; rab_req_n = 1'b1; smc_valid = 1'b0; bu_ptr = '0; rab_ptr = '0;
    smc_addr = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (m_valid[i]) begin m_valid[i] = 1'b0; m_seq[i] = 0; m_split0[i] = 1'b0; end
    foreach (m_instr[i]) begin m_instr[i] = 1'b0; m_next[i] = 1'b0; end
    set_order.delete(); rob.delete();
    m_sel = 0; seq_ctr = 1;
    lpc = {$urandom} & 32'hFFFF_FFE0; after_jump = 1'b1; g_valid = 1'b0;
    for (int unsigned c = 0; c < ncycles; c++) begin
      cycle++;
      slow_retire = (c > ncycles / 4 && c < ncycles / 2) ? 1 : 0;
      // ---- drive ----
      if (!g_valid) make_group();
      drive_group();
      stall = ($urandom % 10 == 0);
      // reorder buffer: retire a few or access one
      retiring = 1'b0; bad_ptr = 1'b0; nret = 0;
      rab_req_n = 1'b1;
      if ($urandom % 150 == 0) begin
        bad_ptr = 1'b1;
        rab_req_n = 1'b0;
        rab_ptr = qptr_t'(rnd(NC, 127));
      end else if (rob.size() > 0 && ($urandom % ((slow_retire != 0) ? 12 : 2) == 0)) begin
        nret = int'(rnd(1, 4));
        if (nret > rob.size()) nret = rob.size();
        retiring = 1'b1;
        rab_req_n = 1'b0;
        rab_ptr = qptr_t'(rob[nret-1]);
      end else begin
        p = pick_live();
        rab_ptr = (p < 0) ? '0 : qptr_t'(p);
      end
      p = pick_live();
      bu_ptr = (p < 0) ? '0 : qptr_t'(p);
      // snoop: half the time a stored PC, else a random address
      smc_valid = ($urandom % 3 == 0);
      q = pick_live();
      smc_addr = ($urandom % 2 == 0 && q >= 0) ? m_pc[q] : addr_t'($urandom);
      #1;
      // ---- check combinational outputs ----
      exp_full = m_valid[m_sel];
      check(queue_full == exp_full, $sformatf("queue_full %0b exp %0b", queue_full, exp_full));
      check(alloc == !(exp_full || stall), "alloc");
      for (int k = 0; k < int'(FW); k++)
        if (alloc)
          check(qptr[k] == qptr_t'(m_sel * CPS + k),
                $sformatf("qptr[%0d] %0d exp %0d", k, qptr[k], m_sel * CPS + k));
      if (p >= 0) begin check_read(p, bu_eip, bu_pc, "BU"); n_bu++; end
      if (!bad_ptr) begin check_read(int'(rab_ptr), rab_eip, rab_pc, "RAB"); n_rab++; end
      check(ptr_exception == bad_ptr, "ptr_exception");
      if (bad_ptr) n_ptrexc++;
      exp_hit = 1'b0;
      for (int i = 0; i < int'(NC); i++)
        if (m_valid[i / CPS] && m_pc[i] == smc_addr) exp_hit = 1'b1;
      exp_hit &= smc_valid;
      check(smc_exception == exp_hit, $sformatf("smc_exception %0b exp %0b", smc_exception, exp_hit));
      if (smc_valid && exp_hit) n_smc_hit++;
      if (smc_valid && !exp_hit) n_smc_miss++;
      if (stall) n_stall++;
      if (exp_full) n_full++;
      // ---- clock edge ----
      @(posedge clk);
      // retirement: free every live set older than the one holding rab_ptr
      if (retiring) begin
        rs = int'(rab_ptr) / int'(CPS);
        oldest_pos = -1;
        foreach (set_order[i]) if (set_order[i] == rs) oldest_pos = i;
        if (oldest_pos > 0) n_retire++;
        for (int i = 0; i < oldest_pos; i++) m_valid[set_order[i]] = 1'b0;
        for (int i = 0; i < oldest_pos; i++) void'(set_order.pop_front());
        for (int i = 0; i < nret; i++) void'(rob.pop_front());
      end
      if (!exp_full && !stall) commit_group();
      @(negedge clk);
      // registered state check
      for (int s = 0; s < int'(NS); s++)
        check(dut.set_valid[s] == m_valid[s], $sformatf("set %0d valid %0b exp %0b", s, dut.set_valid[s], m_valid[s]));
    end
  endtask

  initial begin
    run_phase(32'h0001_2345 & 32'hFFFF_FFE0 | 32'd29, 3000);  // CS base low bits 29
    run_phase(32'h0100_0000 | 32'd7, 3000);                   // CS base low bits 7
    $display("mechanisms: alloc=%0d stall=%0d full=%0d retire=%0d split=%0d eip1=%0d eip2=%0d eip0=%0d next=%0d smc_hit=%0d smc_miss=%0d ptr_exc=%0d bu=%0d rab=%0d eip0_lost=%0d",
             n_alloc, n_stall, n_full, n_retire, n_split, n_eip1, n_eip2, n_eip0, n_next,
             n_smc_hit, n_smc_miss, n_ptrexc, n_bu, n_rab, n_eip0_lost);
    check(n_alloc   > 0, "allocation never happened");
    check(n_stall   > 0, "fetcher stall never happened");
    check(n_full    > 0, "queue full never happened");
    check(n_retire  > 0, "retirement never freed a set");
    check(n_split   > 0, "split-line instruction never happened");
    check(n_eip1    > 0, "EIP line 1 never used");
    check(n_eip2    > 0, "EIP line 2 never used");
    check(n_eip0    > 0, "previous-set EIP line never used");
    check(n_next    > 0, "next-address cell never read");
    check(n_smc_hit > 0, "snoop hit never happened");
    check(n_smc_miss > 0, "snoop miss never happened");
    check(n_ptrexc  > 0, "out-of-range pointer never happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
