// aq_ptr_decoder: queue-pointer decoder ("Decoder 7x128").
//
// A functional unit names a queue cell by a 7-bit pointer.  This block turns
// the pointer into a one-hot match vector over the NUM_CELLS real cells; the
// remaining codes (120-127 at the default size) drive no cell and raise
// out_of_range instead.  The decoder is enabled by en; with en low every
// match line is low.  Purely combinational.
//
// The 7-to-128 decoding and the use of codes 120-127 as an error follow the
// document; the enable input and the single out_of_range flag are this
// design's choices.
module aq_ptr_decoder #(
  parameter int unsigned PTR_W     = aq_pkg::PTR_W,
  parameter int unsigned NUM_CELLS = aq_pkg::NUM_CELLS
) (
  input  logic                 en,
  input  logic [PTR_W-1:0]     ptr,
  output logic [NUM_CELLS-1:0] match,
  output logic                 out_of_range
);
  always_comb begin
    for (int unsigned c = 0; c < NUM_CELLS; c++)
      match[c] = en && (ptr == PTR_W'(c));
    out_of_range = en && (32'(ptr) >= NUM_CELLS);
  end
endmodule
