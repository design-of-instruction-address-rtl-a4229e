// aq_set: one set of the line-offset ("Scheme 2") address queue.
//
// A set holds the addresses fetched in one cycle.  Since all instructions of a
// fetch come from at most two cache lines, the 27-bit line addresses are kept
// once per set in four registers: EIP line 1 and EIP line 2 of the current
// cache line, PC line 1 (the line of the first instruction, which is the
// previous cache line when that instruction was split across lines) and PC line
// 2 (the current cache line).  The six cells keep only offsets.  Cell 0 is an
// aq_first_cell and can also name EIP line 1 of the preceding set (eip0), which
// this set receives on a local bus; cells 1-5 are aq_cell.  Cell 0 rebuilds its
// PC from PC line 1, cells 1-5 from PC line 2.
// Everything is written at the clock edge ending a cycle with set_enable high.
// Reads are combinational: the cells' read ports are ORed.  The snoop result
// is reported only for a valid set and a valid snoop.  Cells 0-4 give the five
// queue pointers while the set is being allocated; cell 5 only ever holds the
// next sequential address, so its pointer is not sent out.
//
// The four line registers, the cell layout and the eip0 bus follow the
// document.  Which PC line cells 1-5 use, and gating the snoop with the set's
// valid bit, are this design's choices (the document does not say).
module aq_set #(
  parameter int unsigned SET_IDX       = 0,
  parameter int unsigned CELLS_PER_SET = aq_pkg::CELLS_PER_SET
) (
  input  logic              clk,
  input  logic              set_enable,
  input  logic              set_valid,
  input  logic              split_prev,
  input  aq_pkg::line_t     eip1_in,
  input  aq_pkg::line_t     eip2_in,
  input  aq_pkg::line_t     pc_line1_in,
  input  aq_pkg::line_t     pc_line2_in,
  input  aq_pkg::line_t     eip0,                       // from the preceding set
  input  aq_pkg::eip_ofs_t  cell_eip [CELLS_PER_SET],
  input  aq_pkg::ofs_t      cell_pc  [CELLS_PER_SET],
  input  aq_pkg::addr_t     smc_addr,
  input  logic              smc_valid,
  input  logic [CELLS_PER_SET-1:0] bu_match,
  input  logic [CELLS_PER_SET-1:0] rab_match,
  output aq_pkg::line_t     eip1_q,                     // to the next set
  output aq_pkg::qptr_t     qptr [CELLS_PER_SET-1],
  output aq_pkg::addr_t     eip_bu,
  output aq_pkg::addr_t     pc_bu,
  output aq_pkg::addr_t     eip_rab,
  output aq_pkg::addr_t     pc_rab,
  output logic              smc_hit
);
  aq_pkg::line_t eip2_q, pc_line1_q, pc_line2_q;
  aq_pkg::addr_t c_eip_bu [CELLS_PER_SET];
  aq_pkg::addr_t c_pc_bu  [CELLS_PER_SET];
  aq_pkg::addr_t c_eip_rab[CELLS_PER_SET];
  aq_pkg::addr_t c_pc_rab [CELLS_PER_SET];
  aq_pkg::qptr_t c_qptr   [CELLS_PER_SET];
  logic [CELLS_PER_SET-1:0] c_smc;

  always_ff @(posedge clk) begin
    if (set_enable) begin
      eip1_q     <= eip1_in;
      eip2_q     <= eip2_in;
      pc_line1_q <= pc_line1_in;
      pc_line2_q <= pc_line2_in;
    end
  end

  aq_first_cell #(.INDEX(SET_IDX*CELLS_PER_SET)) u_cell0 (
    .clk, .set_enable, .split_prev,
    .eip_ofs_in(cell_eip[0]), .pc_ofs_in(cell_pc[0]),
    .eip0, .eip1(eip1_q), .eip2(eip2_q), .pc_line(pc_line1_q),
    .smc_addr, .bu_match(bu_match[0]), .rab_match(rab_match[0]),
    .qptr_out(c_qptr[0]), .eip_bu(c_eip_bu[0]), .pc_bu(c_pc_bu[0]),
    .eip_rab(c_eip_rab[0]), .pc_rab(c_pc_rab[0]), .smc_hit(c_smc[0])
  );

  for (genvar k = 1; k < CELLS_PER_SET; k++) begin : g_cell
    aq_cell #(.INDEX(SET_IDX*CELLS_PER_SET + k)) u_cell (
      .clk, .set_enable,
      .eip_ofs_in(cell_eip[k]), .pc_ofs_in(cell_pc[k]),
      .eip1(eip1_q), .eip2(eip2_q), .pc_line(pc_line2_q),
      .smc_addr, .bu_match(bu_match[k]), .rab_match(rab_match[k]),
      .qptr_out(c_qptr[k]), .eip_bu(c_eip_bu[k]), .pc_bu(c_pc_bu[k]),
      .eip_rab(c_eip_rab[k]), .pc_rab(c_pc_rab[k]), .smc_hit(c_smc[k])
    );
  end

  always_comb begin
    eip_bu  = '0;
    pc_bu   = '0;
    eip_rab = '0;
    pc_rab  = '0;
    for (int unsigned k = 0; k < CELLS_PER_SET; k++) begin
      eip_bu  |= c_eip_bu[k];
      pc_bu   |= c_pc_bu[k];
      eip_rab |= c_eip_rab[k];
      pc_rab  |= c_pc_rab[k];
    end
    for (int unsigned k = 0; k < CELLS_PER_SET - 1; k++)
      qptr[k] = c_qptr[k];
  end

  assign smc_hit = set_valid && smc_valid && (|c_smc);
endmodule
