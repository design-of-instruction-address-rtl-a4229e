// aq_set_controller: valid bit and age of one set of the address queue.
//
// Allocation: when the allocation ring selects this set (set_sel) and the
// fetcher is not stalled, set_enable goes high for that cycle; the storage
// latches the fetched addresses and at the clock edge the set becomes valid
// with age 0.
// Aging: a valid set counts up by one on every cycle in which the fetcher is
// not stalled.  Since every valid set counts together, a larger age means an
// older set, i.e. earlier in program order.
// Retirement: when the retire selector names this set (en) and it is valid,
// the set drives its age onto the AC bus (ac_out, with ac_drive).  When
// cmp_en is high and the bus carries a valid age (ac_valid), every valid set
// whose age is strictly greater than ac_in clears its valid bit: all sets
// before the one holding the last retired instruction are freed, that set
// itself is not, because a later instruction in it may still be in flight.
// Queue status: queue_full is high when the allocation ring points at this set
// while it is still valid.
//
// Valid bit, age counter, the AC bus compare with "greater than", EN_i,
// CMP_EN, Set_ENABLE_i and Queue_Full_i follow the document.  The stall input
// is the queue's effective stall (fetcher stall or queue full), so a full queue
// never overwrites a live set.  The ac_drive/ac_valid pair, which keeps a
// pointer into a free set from retiring everything, is this design's own
// choice, as is reading the age register directly (a clocked register needs no
// separate age latch against races).
module aq_set_controller #(
  parameter int unsigned AGE_W = aq_pkg::AGE_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             set_sel,     // allocation ring points here
  input  logic             stall,       // effective stall of the fetcher
  input  logic             en,          // EN_i from the retire set selector
  input  logic             cmp_en,      // CMP_EN
  input  logic [AGE_W-1:0] ac_in,       // age on the AC bus
  input  logic             ac_valid,    // the AC bus is driven by a valid set
  output logic [AGE_W-1:0] ac_out,      // this set's age, when named by en
  output logic             ac_drive,    // this set drives the AC bus
  output logic             set_enable,  // Set_ENABLE_i: store this cycle
  output logic             queue_full,  // Queue_Full_i
  output logic             valid
);
  logic [AGE_W-1:0] age;
  logic             retire_me;

  assign set_enable = set_sel && !stall;
  assign queue_full = set_sel && valid;
  assign ac_drive   = en && valid;
  assign ac_out     = ac_drive ? age : '0;
  assign retire_me  = cmp_en && ac_valid && valid && (age > ac_in);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      valid <= 1'b0;
      age   <= '0;
    end else if (set_enable) begin
      valid <= 1'b1;
      age   <= '0;
    end else begin
      if (retire_me)
        valid <= 1'b0;
      if (valid && !stall)
        age <= age + 1'b1;
    end
  end

  a_no_overwrite: assert property (@(posedge clk) disable iff (!rst_n)
    set_enable |-> !valid);
endmodule
