// tb_aq_sizing_workload: the queue under the sizing workload of the design.
//
// The queue size of 20 sets was chosen for a degree-5 fetcher running SPEC95,
// where a fetch delivers 2.68 x86 instructions on average, an x86 instruction
// becomes 1.39 micro-ops on average, the reorder buffer holds 64 micro-ops and
// fetch plus decode take two stages.  This testbench drives the queue with
// that mix: fetch groups of 1-5 instructions with a mean of 2.68 (shortened
// where a cache line ends), one or two micro-ops per instruction with mean
// 1.39, entry into a 64-entry reorder buffer two cycles after fetch, random
// execution latency of 1-12 cycles (40-80 cycles for 3 percent of them, as
// for cache misses, so that the reorder buffer fills), and in-order retirement of up to five
// completed instructions per cycle.  The fetcher stalls only when the reorder
// buffer plus the two front-end stages could not take the group.
// Every retirement reads the retired instruction's EIP and PC through the
// reorder buffer port, and a random live pointer is read through the branch
// unit port; both are checked against a reference model, as are queue_full
// and every set's valid bit.  The testbench reports the delivered group size,
// the micro-ops per instruction, and how many cycles the queue itself stalled
// the fetcher while the reorder buffer and front end still had room.  Those
// figures are measurements, not pass criteria.
module tb_aq_sizing_workload;
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

  localparam int ROB_SIZE = 64, FRONT = 2, RET_W = 5, CYCLES = 20000;

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

  // reorder buffer model
  typedef struct { int ptr; int rops; longint enter; longint done; } rob_e_t;
  rob_e_t robq[$];
  rob_e_t pipe[$];   // fetched, not yet in the reorder buffer
  int     grp_rops;
  int     rob_rops = 0, pipe_rops = 0;
  longint now = 0;
  int     n_rob_stall = 0, n_q_stall = 0, n_instr = 0, n_rops = 0, n_ret_sets = 0;

  // requested group sizes 18/24/28/16/14 percent for 1..5 (mean 2.84);
  // groups cut short at a line end bring the delivered mean to about 2.68
  function automatic int group_size();
    int r;
    r = int'($urandom % 100);
    if (r < 18) return 1;
    if (r < 42) return 2;
    if (r < 70) return 3;
    if (r < 86) return 4;
    return 5;
  endfunction

  task automatic make_sized_group();
    addr_t a;
    int unsigned o, len, want;
    a = lpc;
    o = 32'(a[4:0]);
    g_split = 1'b0;
    if (!after_jump && o >= 27 && ($urandom % 2 == 0 || o == 31)) begin
      len = (32 - o) + rnd(1, 3);
      g_split = 1'b1;
    end else begin
      if (o == 31) o = 30;
      len = rnd(1, 31 - o < 5 ? 31 - o : 5);
    end
    g_addr[0] = a;
    g_next[0] = a + len;
    g_x = 1;
    want = group_size();
    while (g_x < int'(want)) begin
      a = g_next[g_x-1];
      o = 32'(a[4:0]);
      if (o >= 31) break;
      len = rnd(1, 31 - o < 5 ? 31 - o : 5);
      g_addr[g_x] = a;
      g_next[g_x] = a + len;
      g_x++;
    end
    g_jump = ($urandom % 16 == 0);
    grp_rops = 0;
    g_valid = 1'b1;
  endtask

  int g_rops [FW];

  initial begin
    int p, nret, rs, oldest_pos, last_ptr;
    logic exp_full, retiring;
    cs_base = 32'h0000_8000 | 32'd19;
    rst_n = 1'b0;
    stall = 1'b0; rab_req_n = 1'b1; smc_valid = 1'b0; bu_ptr = '0; rab_ptr = '0; smc_addr = '0;
    @(negedge clk); @(negedge clk);
    rst_n = 1'b1;
    foreach (m_valid[i]) begin m_valid[i] = 1'b0; m_seq[i] = 0; m_split0[i] = 1'b0; end
    foreach (m_instr[i]) begin m_instr[i] = 1'b0; m_next[i] = 1'b0; end
    m_sel = 0; seq_ctr = 1;
    lpc = 32'h0040_0000; after_jump = 1'b1; g_valid = 1'b0;
    for (int c = 0; c < CYCLES; c++) begin
      cycle++;
      now++;
      if (!g_valid) begin
        make_sized_group();
        for (int k = 0; k < g_x; k++) begin
          g_rops[k] = ($urandom % 100 < 39) ? 2 : 1;
          grp_rops += g_rops[k];
        end
      end
      drive_group();
      // reorder buffer full (counting the front-end stages) stalls the fetcher
      stall = (rob_rops + pipe_rops + grp_rops > ROB_SIZE);
      // retirement: up to RET_W completed instructions, oldest first
      nret = 0;
      while (nret < robq.size() && nret < RET_W && robq[nret].done <= now) nret++;
      retiring = (nret > 0);
      rab_req_n = !retiring;
      if (retiring) begin
        last_ptr = robq[nret-1].ptr;
        rab_ptr = qptr_t'(last_ptr);
      end else begin
        p = pick_live();
        rab_ptr = (p < 0) ? '0 : qptr_t'(p);
      end
      p = pick_live();
      bu_ptr = (p < 0) ? '0 : qptr_t'(p);
      #1;
      exp_full = m_valid[m_sel];
      check(queue_full == exp_full, "queue_full");
      check(alloc == !(exp_full || stall), "alloc");
      if (retiring) begin check_read(last_ptr, rab_eip, rab_pc, "RAB"); n_rab++; end
      if (p >= 0) begin check_read(p, bu_eip, bu_pc, "BU"); n_bu++; end
      if (stall) n_rob_stall++;
      else if (exp_full) n_q_stall++;
      @(posedge clk);
      if (retiring) begin
        rs = last_ptr / int'(CPS);
        oldest_pos = -1;
        foreach (set_order[i]) if (set_order[i] == rs) oldest_pos = i;
        for (int i = 0; i < oldest_pos; i++) m_valid[set_order[i]] = 1'b0;
        for (int i = 0; i < oldest_pos; i++) void'(set_order.pop_front());
        if (oldest_pos > 0) n_ret_sets += oldest_pos;
        for (int i = 0; i < nret; i++) begin
          rob_rops -= robq[0].rops;
          void'(robq.pop_front());
        end
      end
      // micro-ops leave the front end after FRONT cycles
      while (pipe.size() > 0 && pipe[0].enter <= now) begin
        rob_e_t e;
        e = pipe.pop_front();
        e.done = now + (($urandom % 100 < 3) ? longint'(rnd(40, 80)) : longint'(rnd(1, 12)));
        pipe_rops -= e.rops;
        rob_rops += e.rops;
        robq.push_back(e);
      end
      if (!exp_full && !stall) begin
        for (int k = 0; k < g_x; k++) begin
          rob_e_t e;
          e.ptr = int'(m_sel * CPS) + k;
          e.rops = g_rops[k];
          e.enter = now + longint'(FRONT);
          e.done = 0;
          pipe.push_back(e);
          pipe_rops += e.rops;
          n_rops += e.rops;
        end
        n_instr += g_x;
        commit_group();
      end
      @(negedge clk);
      for (int s = 0; s < int'(NS); s++)
        check(dut.set_valid[s] == m_valid[s], $sformatf("set %0d valid", s));
    end
    $display("cycles=%0d fetch cycles=%0d instructions=%0d (%.2f per fetch) micro-ops per instruction=%.2f",
             CYCLES, n_alloc, n_instr, real'(n_instr) / real'(n_alloc), real'(n_rops) / real'(n_instr));
    $display("reorder-buffer stalls=%0d queue-only stalls=%0d (%.2f%% of cycles) sets freed=%0d EIP0 reads lost=%0d",
             n_rob_stall, n_q_stall, 100.0 * real'(n_q_stall) / real'(CYCLES), n_ret_sets, n_eip0_lost);
    check(n_rob_stall > 0, "reorder buffer never filled");
    check(n_ret_sets > 0, "retirement never freed a set");
    check(n_q_stall > 0, "queue never filled before the reorder buffer");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #5_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
