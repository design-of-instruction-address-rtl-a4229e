// aq_retire_set_selector: turns a retirement request into set enables.
//
// When the reorder buffer retires instructions it sends the queue pointer of
// the last retired one (rab_ptr) with an active-low request (rab_req_n).  The
// pointer is decoded over all cells and the six match lines of each set are
// ORed into EN_i, so exactly one set is named.  CMP_EN is the inverted
// request: it tells every set controller to compare its age with the age the
// named set puts on the AC bus.  A pointer above the last cell raises
// ptr_exception.  Purely combinational.
//
// The structure (decoder, OR of six lines per set, inverter to CMP_EN, an
// exception for codes 120-127) follows the document's figure of the retire set
// selector.  The figure prints an "Exception Generation" box without its
// insides; here it is a single flag.
module aq_retire_set_selector #(
  parameter int unsigned PTR_W         = aq_pkg::PTR_W,
  parameter int unsigned NUM_SETS      = aq_pkg::NUM_SETS,
  parameter int unsigned CELLS_PER_SET = aq_pkg::CELLS_PER_SET
) (
  input  logic                rab_req_n,
  input  logic [PTR_W-1:0]    rab_ptr,
  output logic [NUM_SETS-1:0] en,
  output logic                cmp_en,
  output logic                ptr_exception
);
  localparam int unsigned NUM_CELLS = NUM_SETS * CELLS_PER_SET;

  logic [NUM_CELLS-1:0] match;

  aq_ptr_decoder #(.PTR_W(PTR_W), .NUM_CELLS(NUM_CELLS)) u_dec (
    .en          (!rab_req_n),
    .ptr         (rab_ptr),
    .match       (match),
    .out_of_range(ptr_exception)
  );

  always_comb begin
    for (int unsigned s = 0; s < NUM_SETS; s++)
      en[s] = |match[s*CELLS_PER_SET +: CELLS_PER_SET];
  end

  assign cmp_en = !rab_req_n;
endmodule
