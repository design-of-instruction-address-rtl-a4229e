// aq_eip_line_gen: EIP-line addresses of a cache line.
//
// The L1 cache is indexed by linear address, the program counter (EIP) by
// effective address, and EIP = linear - CS_Base.  When CS_Base is not a
// multiple of the 32-byte line size, one cache line holds the end of one EIP
// line and the start of the next.  With the linear line L and
// CS_Base = {Bh, b} (b = its five LSBs):
//   EIP line 1 = L - Bh - 1   for offsets o <  b (lower part of the line)
//   EIP line 2 = L - Bh       for offsets o >= b (upper part of the line)
// and the offset within the EIP line is (o - b) mod 32.  The block computes
// the two EIP lines of the current cache line and, for each fetched
// instruction, the 6-bit EIP offset {o >= b, (o - b) mod 32} for its own
// address and for the address after it.  The same rule serves an instruction
// split from the previous cache line: its EIP line is then EIP line 1 of this
// line (upper part) or EIP line 1 of the previous line (lower part), which the
// first cell of a set resolves.  Purely combinational.
//
// The rule "offset below the five LSBs of CS_Base means EIP line 1, otherwise
// EIP line 2" is the document's; the document leaves this computation to the
// fetch controller without drawing it, so the arithmetic form is this
// design's own.
module aq_eip_line_gen #(
  parameter int unsigned FETCH_W = aq_pkg::FETCH_W
) (
  input  aq_pkg::line_t     lin_line,             // current linear cache line
  input  aq_pkg::addr_t     cs_base,              // code segment base
  input  aq_pkg::ofs_t      cur_ofs [FETCH_W],    // linear offsets
  input  aq_pkg::ofs_t      nxt_ofs [FETCH_W],
  output aq_pkg::line_t     eip1,
  output aq_pkg::line_t     eip2,
  output aq_pkg::eip_ofs_t  cur_eip [FETCH_W],
  output aq_pkg::eip_ofs_t  nxt_eip [FETCH_W]
);
  aq_pkg::line_t base_line;
  aq_pkg::ofs_t  base_ofs;

  assign base_line = cs_base[aq_pkg::ADDR_W-1:aq_pkg::OFS_W];
  assign base_ofs  = cs_base[aq_pkg::OFS_W-1:0];
  assign eip2      = lin_line - base_line;
  assign eip1      = eip2 - 1'b1;

  always_comb begin
    for (int unsigned k = 0; k < FETCH_W; k++) begin
      cur_eip[k].line2 = (cur_ofs[k] >= base_ofs);
      cur_eip[k].ofs   = cur_ofs[k] - base_ofs;
      nxt_eip[k].line2 = (nxt_ofs[k] >= base_ofs);
      nxt_eip[k].ofs   = nxt_ofs[k] - base_ofs;
    end
  end
endmodule
