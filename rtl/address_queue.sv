// address_queue: instruction address queue for a degree-5 x86 superscalar
// processor, line-offset storage ("Scheme 2").
//
// Instead of carrying 32-bit instruction addresses down the pipeline, the
// fetcher stores each instruction's effective address (EIP) and linear
// address (PC) here and passes on a 7-bit queue pointer.  Units that need an
// address read it back through a pointer: the branch unit (for branch targets
// and BTB updates) and the reorder buffer (for exceptions).  Writes to memory
// are snooped against the stored linear addresses to catch self-modifying
// code.
//
// Operations:
//  Allocate  - every cycle the fetcher is not stalled one whole set of six
//              cells is written: the delivered instructions (up to five) and
//              the next sequential address.  qptr[0..4] are the pointers of
//              cells 0..4 of that set (6*set + cell), valid while alloc is high.
//  Access    - bu_ptr and rab_ptr each read one EIP/PC pair, combinationally.
//  Retire    - rab_req_n low with rab_ptr naming the last retired instruction
//              frees, at the next edge, every set older than the set holding
//              it.  A pointer in 120..127 raises ptr_exception.
//  Snoop     - smc_exception is high when smc_valid and smc_addr equals the
//              linear address of any cell of a valid set.
// queue_full is high when the set to be allocated next is still valid; the
// queue then stalls allocation itself.  Sizes (20 sets, 6 cells, 7-bit
// pointers, 32-bit addresses, 32-byte lines) are the document's.
//
// Fetcher interface: pc_line1 is the cache line of the first delivered
// instruction (the previous line when split_prev says that instruction was
// split across lines), pc_line2 the current cache line.  cur_ofs[k]/nxt_ofs[k]
// are the linear offsets of instruction k and of the address after it; last[k]
// marks instruction k as the last delivered (all low: five delivered).  The
// EIP lines and EIP offsets are derived here from pc_line2 and cs_base.  This
// grouping of the fetcher signals is this design's choice; the document shows
// them coming from the fetcher's instruction cells.
module address_queue #(
  parameter int unsigned NUM_SETS = aq_pkg::NUM_SETS
) (
  input  logic            clk,
  input  logic            rst_n,
  // fetcher
  input  logic            stall,
  output logic            queue_full,
  output logic            alloc,
  input  aq_pkg::addr_t   cs_base,
  input  aq_pkg::line_t   pc_line1,
  input  aq_pkg::line_t   pc_line2,
  input  logic            split_prev,
  input  logic [aq_pkg::FETCH_W-2:0] last,
  input  aq_pkg::ofs_t    cur_ofs [aq_pkg::FETCH_W],
  input  aq_pkg::ofs_t    nxt_ofs [aq_pkg::FETCH_W],
  output aq_pkg::qptr_t   qptr    [aq_pkg::FETCH_W],
  // branch unit access port
  input  aq_pkg::qptr_t   bu_ptr,
  output aq_pkg::addr_t   bu_eip,
  output aq_pkg::addr_t   bu_pc,
  // reorder buffer access and retire port
  input  aq_pkg::qptr_t   rab_ptr,
  input  logic            rab_req_n,
  output aq_pkg::addr_t   rab_eip,
  output aq_pkg::addr_t   rab_pc,
  output logic            ptr_exception,
  // self-modifying-code snoop
  input  aq_pkg::addr_t   smc_addr,
  input  logic            smc_valid,
  output logic            smc_exception
);
  localparam int unsigned CPS = aq_pkg::CELLS_PER_SET;
  localparam int unsigned FW  = aq_pkg::FETCH_W;

  logic [NUM_SETS*CPS-1:0] bu_match, rab_match;
  logic [NUM_SETS-1:0]     set_enable, set_valid;
  logic                    stall_eff;
  aq_pkg::line_t           eip1, eip2;
  aq_pkg::eip_ofs_t        cur_eip [FW];
  aq_pkg::eip_ofs_t        nxt_eip [FW];

  aq_controller #(
    .NUM_SETS(NUM_SETS), .CELLS_PER_SET(CPS),
    .PTR_W(aq_pkg::PTR_W), .AGE_W(aq_pkg::AGE_W)
  ) u_ctrl (
    .clk, .rst_n, .stall, .bu_ptr, .rab_ptr, .rab_req_n,
    .bu_match, .rab_match, .set_enable, .set_valid,
    .queue_full, .stall_eff, .ptr_exception
  );

  aq_eip_line_gen #(.FETCH_W(FW)) u_eipgen (
    .lin_line(pc_line2), .cs_base, .cur_ofs, .nxt_ofs,
    .eip1, .eip2, .cur_eip, .nxt_eip
  );

  aq_storage #(.NUM_SETS(NUM_SETS), .CELLS_PER_SET(CPS)) u_store (
    .clk, .set_enable, .set_valid, .split_prev,
    .eip1, .eip2, .pc_line1, .pc_line2,
    .cur_eip, .nxt_eip, .cur_pc(cur_ofs), .nxt_pc(nxt_ofs), .last,
    .bu_match, .rab_match, .smc_addr, .smc_valid,
    .qptr, .eip_bu(bu_eip), .pc_bu(bu_pc), .eip_rab(rab_eip), .pc_rab(rab_pc),
    .smc_exception
  );

  assign alloc = !stall_eff;
endmodule
