// aq_alloc_shift_reg: allocation pointer of the address queue.
//
// A NUM_SETS-bit register holding a single 1 names the set that stores the
// addresses fetched in the current cycle.  Reset loads 0...01 (set 0); on
// every clock edge where advance is high the content rotates left by one bit,
// so the sets are used in ring order.  Output sel is the register itself.
//
// The one-hot ring, its reset value and its rotation follow the document.
// The synchronous active-low reset is this design's choice.
module aq_alloc_shift_reg #(
  parameter int unsigned NUM_SETS = aq_pkg::NUM_SETS
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                advance,
  output logic [NUM_SETS-1:0] sel
);
  always_ff @(posedge clk) begin
    if (!rst_n)
      sel <= NUM_SETS'(1);
    else if (advance)
      sel <= {sel[NUM_SETS-2:0], sel[NUM_SETS-1]};
  end

  a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot(sel));
endmodule
