// aq_first_cell: the first storage cell of each set ("Scheme 2").
//
// It works like aq_cell but must also hold a split-line instruction: one that
// began on the previous cache line and was completed in this fetch.  Its EIP
// line may be neither EIP line 1 nor EIP line 2 of the current line.  If it lay
// on the upper part of the previous line (line-select bit set) its EIP line is
// the current EIP line 1; if it lay on the lower part, its EIP line is EIP
// line 1 of the previous line, which the preceding set still holds and
// supplies as eip0.  A split bit, latched with the offsets, widens the EIP
// multiplexer to four inputs, selected by {split, !line2}:
//   0: EIP2   1: EIP1   2: EIP1   3: EIP0
// so a non-split instruction reads as in aq_cell.  pc_line is the set's first
// PC line, which for a split instruction is the previous cache line.
// Timing as aq_cell: capture on set_enable, combinational reads.
//
// The four-input multiplexer, its input order and the eip0 bus from the
// preceding set follow the document's figure of the first cell; the select
// encoding {split, !line2} is read from that input order and Section 2.1.
// Registers for latches and AND-OR gating for three-state drivers are this
// design's choices, as in aq_cell.
module aq_first_cell #(
  parameter int unsigned INDEX = 0
) (
  input  logic              clk,
  input  logic              set_enable,
  input  logic              split_prev,   // Split_Previous from InsCell0
  input  aq_pkg::eip_ofs_t  eip_ofs_in,
  input  aq_pkg::ofs_t      pc_ofs_in,
  input  aq_pkg::line_t     eip0,         // EIP1 of the preceding set
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
  logic             split_q;
  aq_pkg::line_t    eip_line;
  aq_pkg::addr_t    eip, pc;

  always_ff @(posedge clk) begin
    if (set_enable) begin
      eip_ofs_q <= eip_ofs_in;
      pc_ofs_q  <= pc_ofs_in;
      split_q   <= split_prev;
    end
  end

  always_comb begin
    unique case ({split_q, !eip_ofs_q.line2})
      2'd0:    eip_line = eip2;
      2'd1:    eip_line = eip1;
      2'd2:    eip_line = eip1;
      default: eip_line = eip0;
    endcase
  end

  assign eip      = {eip_line, eip_ofs_q.ofs};
  assign pc       = {pc_line, pc_ofs_q};
  assign qptr_out = set_enable ? aq_pkg::PTR_W'(INDEX) : '0;
  assign eip_bu   = bu_match  ? eip : '0;
  assign pc_bu    = bu_match  ? pc  : '0;
  assign eip_rab  = rab_match ? eip : '0;
  assign pc_rab   = rab_match ? pc  : '0;
  assign smc_hit  = (pc == smc_addr);
endmodule
