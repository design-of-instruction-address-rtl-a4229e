// aq_storage: address storage of the line-offset ("Scheme 2") address queue.
//
// The storage takes, every cycle, the offsets of up to five fetched
// instructions and of the next sequential address from the fetcher's
// instruction cells, routes them into six cells with aq_input_select, and
// writes them, with the four line addresses, into the one set whose
// set_enable is high.  The sets form a ring: each set passes its EIP line 1 to
// the following set as that set's eip0 (set 0 takes it from the last set).
// Two read ports, selected by the one-hot cell matches from the controller,
// return the 32-bit EIP and PC to the branch unit (bu) and to the reorder
// buffer (rab); the set outputs are ORed since at most one cell matches.
// qptr gives the pointers of cells 0-4 of the set being allocated, i.e. the
// queue pointers the fetcher hands on with the five instructions.
// smc_exception is high when a snooped write address equals the PC held in any
// cell of a valid set.
// Timing: writes at the clock edge, reads, pointers and snoop combinational.
//
// The organisation follows the document.  ORing instead of three-state buses
// is this design's choice.
module aq_storage #(
  parameter int unsigned NUM_SETS      = aq_pkg::NUM_SETS,
  parameter int unsigned CELLS_PER_SET = aq_pkg::CELLS_PER_SET
) (
  input  logic              clk,
  input  logic [NUM_SETS-1:0] set_enable,
  input  logic [NUM_SETS-1:0] set_valid,
  input  logic              split_prev,
  input  aq_pkg::line_t     eip1,
  input  aq_pkg::line_t     eip2,
  input  aq_pkg::line_t     pc_line1,
  input  aq_pkg::line_t     pc_line2,
  input  aq_pkg::eip_ofs_t  cur_eip [CELLS_PER_SET-1],
  input  aq_pkg::eip_ofs_t  nxt_eip [CELLS_PER_SET-1],
  input  aq_pkg::ofs_t      cur_pc  [CELLS_PER_SET-1],
  input  aq_pkg::ofs_t      nxt_pc  [CELLS_PER_SET-1],
  input  logic [CELLS_PER_SET-3:0] last,
  input  logic [NUM_SETS*CELLS_PER_SET-1:0] bu_match,
  input  logic [NUM_SETS*CELLS_PER_SET-1:0] rab_match,
  input  aq_pkg::addr_t     smc_addr,
  input  logic              smc_valid,
  output aq_pkg::qptr_t     qptr [CELLS_PER_SET-1],
  output aq_pkg::addr_t     eip_bu,
  output aq_pkg::addr_t     pc_bu,
  output aq_pkg::addr_t     eip_rab,
  output aq_pkg::addr_t     pc_rab,
  output logic              smc_exception
);
  localparam int unsigned FW = CELLS_PER_SET - 1;

  aq_pkg::eip_ofs_t cell_eip [CELLS_PER_SET];
  aq_pkg::ofs_t     cell_pc  [CELLS_PER_SET];
  aq_pkg::line_t    eip1_q   [NUM_SETS];
  aq_pkg::qptr_t    s_qptr   [NUM_SETS][FW];
  aq_pkg::addr_t    s_eip_bu [NUM_SETS];
  aq_pkg::addr_t    s_pc_bu  [NUM_SETS];
  aq_pkg::addr_t    s_eip_rab[NUM_SETS];
  aq_pkg::addr_t    s_pc_rab [NUM_SETS];
  logic [NUM_SETS-1:0] s_smc;

  aq_input_select #(.FETCH_W(FW)) u_sel (
    .cur_eip, .nxt_eip, .cur_pc, .nxt_pc, .last, .cell_eip, .cell_pc
  );

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    aq_set #(.SET_IDX(s), .CELLS_PER_SET(CELLS_PER_SET)) u_set (
      .clk,
      .set_enable (set_enable[s]),
      .set_valid  (set_valid[s]),
      .split_prev,
      .eip1_in    (eip1),
      .eip2_in    (eip2),
      .pc_line1_in(pc_line1),
      .pc_line2_in(pc_line2),
      .eip0       (eip1_q[(s + NUM_SETS - 1) % NUM_SETS]),
      .cell_eip, .cell_pc,
      .smc_addr, .smc_valid,
      .bu_match   (bu_match[s*CELLS_PER_SET +: CELLS_PER_SET]),
      .rab_match  (rab_match[s*CELLS_PER_SET +: CELLS_PER_SET]),
      .eip1_q     (eip1_q[s]),
      .qptr       (s_qptr[s]),
      .eip_bu     (s_eip_bu[s]),
      .pc_bu      (s_pc_bu[s]),
      .eip_rab    (s_eip_rab[s]),
      .pc_rab     (s_pc_rab[s]),
      .smc_hit    (s_smc[s])
    );
  end

  always_comb begin
    eip_bu  = '0;
    pc_bu   = '0;
    eip_rab = '0;
    pc_rab  = '0;
    for (int unsigned k = 0; k < FW; k++) qptr[k] = '0;
    for (int unsigned s = 0; s < NUM_SETS; s++) begin
      eip_bu  |= s_eip_bu[s];
      pc_bu   |= s_pc_bu[s];
      eip_rab |= s_eip_rab[s];
      pc_rab  |= s_pc_rab[s];
      for (int unsigned k = 0; k < FW; k++) qptr[k] |= s_qptr[s][k];
    end
  end

  assign smc_exception = |s_smc;
endmodule
