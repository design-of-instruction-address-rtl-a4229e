// aq_cell: one storage cell of the line-offset ("Scheme 2") address queue.
//
// A cell keeps only the low bits of an instruction's two addresses: a 5-bit
// EIP offset, one bit saying whether the instruction lies on EIP line 1 or
// EIP line 2 of its cache line, and a 5-bit linear (PC) offset.  The 27-bit line
// addresses live once per set (aq_set) and come in as eip1, eip2 and pc_line.
// Reading rebuilds the full addresses:
//   EIP = {line2 ? eip2 : eip1, eip offset},   PC = {pc_line, pc offset}.
// Two read ports, for the branch unit and for the reorder buffer, each drive
// the rebuilt addresses when their match line is high and zero otherwise, so
// the set can OR its cells together.  For self-modifying-code snooping the
// rebuilt PC is compared with the snooped write address (smc_hit).  While the
// set is being allocated (set_enable) the cell presents its fixed queue index
// on qptr_out.
// Timing: the offsets are captured at the clock edge that ends the cycle with
// set_enable high; reads and the compare are combinational.
//
// Storage contents, widths, the EIP1/EIP2 multiplexer, the read ports, the
// compare and the index output follow the document.  Edge-triggered registers
// stand in for the enabled latches it draws, and AND-OR gating stands in for
// its three-state drivers; both are this design's choices.  The compare is an
// exact 32-bit equality, as drawn; the document does not say which bits it
// compares.
module aq_cell #(
  parameter int unsigned INDEX = 0
) (
  input  logic              clk,
  input  logic              set_enable,
  input  aq_pkg::eip_ofs_t  eip_ofs_in,
  input  aq_pkg::ofs_t      pc_ofs_in,
  input  aq_pkg::line_t     eip1,
  input  aq_pkg::line_t     eip2,
  input  aq_pkg::line_t     pc_line,
  input  aq_pkg::addr_t     smc_addr,
  input  logic              bu_match,
  input  logic              rab_match,
  output aq_pkg::qptr_t     qptr_out,
  output aq_pkg::addr_t     eip_bu,
  output aq_pkg::addr_t     pc_bu,
  output aq_pkg::addr_t     eip_rab,
  output aq_pkg::addr_t     pc_rab,
  output logic              smc_hit
);
  aq_pkg::eip_ofs_t eip_ofs_q;
  aq_pkg::ofs_t     pc_ofs_q;
  aq_pkg::addr_t    eip, pc;

  always_ff @(posedge clk) begin
    if (set_enable) begin
      eip_ofs_q <= eip_ofs_in;
      pc_ofs_q  <= pc_ofs_in;
    end
  end

  assign eip      = {(eip_ofs_q.line2 ? eip2 : eip1), eip_ofs_q.ofs};
  assign pc       = {pc_line, pc_ofs_q};
  assign qptr_out = set_enable ? aq_pkg::PTR_W'(INDEX) : '0;
  assign eip_bu   = bu_match  ? eip : '0;
  assign pc_bu    = bu_match  ? pc  : '0;
  assign eip_rab  = rab_match ? eip : '0;
  assign pc_rab   = rab_match ? pc  : '0;
  assign smc_hit  = (pc == smc_addr);
endmodule
