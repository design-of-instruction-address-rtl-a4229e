// aq_controller: the Address Queue Controller.
//
// One controller serves the effective-address and linear-address storage
// together, since both addresses of an instruction always enter and leave at
// the same time.  It holds:
//  * allocation selection: a one-hot ring (aq_alloc_shift_reg) naming the set
//    written in the current cycle; it advances on every non-stalled cycle;
//  * queue status: a valid bit and age per set (aq_set_controller); the ORed
//    Queue_Full_i form queue_full;
//  * retirement selection: aq_retire_set_selector turns the reorder buffer's
//    pointer and active-low request into EN_i and CMP_EN; the named set puts
//    its age on the AC bus (an OR of the gated set outputs) and every older set
//    frees itself;
//  * access control: two pointer decoders give one-hot cell matches for the
//    branch unit port and the reorder buffer port.  The reorder buffer uses the
//    same pointer for access and retirement.
// Timing: all outputs are combinational from the inputs and the registers;
// allocation and retirement take effect at the next clock edge.
//
// stall_eff = stall | queue_full: the document says the fetcher must stall
// when the queue is full; forcing the stall inside the queue as well is this
// design's choice, so nothing is overwritten whatever the fetcher does.
module aq_controller #(
  parameter int unsigned NUM_SETS      = aq_pkg::NUM_SETS,
  parameter int unsigned CELLS_PER_SET = aq_pkg::CELLS_PER_SET,
  parameter int unsigned PTR_W         = aq_pkg::PTR_W,
  parameter int unsigned AGE_W         = aq_pkg::AGE_W
) (
  input  logic                                clk,
  input  logic                                rst_n,
  input  logic                                stall,       // fetcher stall
  input  logic [PTR_W-1:0]                    bu_ptr,      // BuEipPtr
  input  logic [PTR_W-1:0]                    rab_ptr,     // RabEipPtr
  input  logic                                rab_req_n,   // RabEipReq_
  output logic [NUM_SETS*CELLS_PER_SET-1:0]   bu_match,
  output logic [NUM_SETS*CELLS_PER_SET-1:0]   rab_match,
  output logic [NUM_SETS-1:0]                 set_enable,  // Set_ENABLE_i
  output logic [NUM_SETS-1:0]                 set_valid,
  output logic                                queue_full,  // Queue_Full
  output logic                                stall_eff,
  output logic                                ptr_exception
);
  localparam int unsigned NUM_CELLS = NUM_SETS * CELLS_PER_SET;

  logic [NUM_SETS-1:0] sel, en, full_i, ac_drive;
  logic [AGE_W-1:0]    ac_out [NUM_SETS];
  logic [AGE_W-1:0]    ac_bus;
  logic                ac_valid, cmp_en;

  aq_alloc_shift_reg #(.NUM_SETS(NUM_SETS)) u_ring (
    .clk, .rst_n, .advance(!stall_eff), .sel
  );

  aq_retire_set_selector #(
    .PTR_W(PTR_W), .NUM_SETS(NUM_SETS), .CELLS_PER_SET(CELLS_PER_SET)
  ) u_retsel (
    .rab_req_n, .rab_ptr, .en, .cmp_en, .ptr_exception
  );

  // Access decoders are always enabled: an access port is a plain read.
  aq_ptr_decoder #(.PTR_W(PTR_W), .NUM_CELLS(NUM_CELLS)) u_bu_dec (
    .en(1'b1), .ptr(bu_ptr), .match(bu_match), .out_of_range()
  );
  aq_ptr_decoder #(.PTR_W(PTR_W), .NUM_CELLS(NUM_CELLS)) u_rab_dec (
    .en(1'b1), .ptr(rab_ptr), .match(rab_match), .out_of_range()
  );

  for (genvar s = 0; s < NUM_SETS; s++) begin : g_set
    aq_set_controller #(.AGE_W(AGE_W)) u_setc (
      .clk, .rst_n,
      .set_sel   (sel[s]),
      .stall     (stall_eff),
      .en        (en[s]),
      .cmp_en,
      .ac_in     (ac_bus),
      .ac_valid,
      .ac_out    (ac_out[s]),
      .ac_drive  (ac_drive[s]),
      .set_enable(set_enable[s]),
      .queue_full(full_i[s]),
      .valid     (set_valid[s])
    );
  end

  // AC bus: at most one set drives it, the others drive zero.
  always_comb begin
    ac_bus = '0;
    for (int unsigned s = 0; s < NUM_SETS; s++)
      ac_bus |= ac_out[s];
  end
  assign ac_valid   = |ac_drive;
  assign queue_full = |full_i;
  assign stall_eff  = stall || queue_full;
endmodule
