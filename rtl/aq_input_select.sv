// aq_input_select: routes the fetched offsets into the six cells of a set.
//
// Up to FETCH_W (5) instructions are delivered per cycle by the fetcher's
// instruction cells InsCell0..4; each gives its current offsets (EIP offset
// with line-select bit, linear offset) and the offsets of the address that
// follows it.  If x instructions are delivered, cells 0..x-1 of the set get the
// instructions and cell x gets the next sequential address.  Cell 0 always takes
// InsCell0; cell FETCH_W always takes InsCell4's next address; each cell k in
// between has a two-way multiplexer that takes InsCell(k-1)'s next address
// when last[k-1] says InsCell(k-1) is the last delivered instruction, else
// InsCell k's own address.  Cells past the next address get don't-care values.
// Purely combinational.
//
// The four multiplexer pairs and their control by the fetcher's "Last 3..0"
// follow the document; reading last as one bit per instruction (last[k] high
// when InsCell k is the last one, none high for five instructions) is this
// design's choice, since the document does not give its encoding.
module aq_input_select #(
  parameter int unsigned FETCH_W = aq_pkg::FETCH_W
) (
  input  aq_pkg::eip_ofs_t cur_eip [FETCH_W],
  input  aq_pkg::eip_ofs_t nxt_eip [FETCH_W],
  input  aq_pkg::ofs_t     cur_pc  [FETCH_W],
  input  aq_pkg::ofs_t     nxt_pc  [FETCH_W],
  input  logic [FETCH_W-2:0] last,
  output aq_pkg::eip_ofs_t cell_eip [FETCH_W+1],
  output aq_pkg::ofs_t     cell_pc  [FETCH_W+1]
);
  always_comb begin
    cell_eip[0] = cur_eip[0];
    cell_pc[0]  = cur_pc[0];
    for (int unsigned k = 1; k < FETCH_W; k++) begin
      cell_eip[k] = last[k-1] ? nxt_eip[k-1] : cur_eip[k];
      cell_pc[k]  = last[k-1] ? nxt_pc[k-1]  : cur_pc[k];
    end
    cell_eip[FETCH_W] = nxt_eip[FETCH_W-1];
    cell_pc[FETCH_W]  = nxt_pc[FETCH_W-1];
  end
endmodule
