// aq_pkg: sizes shared by the instruction address queue.
//
// The queue keeps, for every instruction the fetcher delivers, its effective
// address (EIP, the program counter inside the code segment) and its linear
// address (PC, EIP plus the code-segment base, used to access the L1 cache).
// Addresses are 32 bits; a cache line is 32 bytes, so an address splits into
// a 27-bit line and a 5-bit offset.  The default organisation is 20 sets of
// six cells: one set per fetch cycle, holding up to five instructions plus the
// next sequential address.  A queue pointer is 7 bits and names a cell as
// 6*set + cell, so codes 0-119 are cells and 120-127 are illegal.  The age of
// a set fits in 5 bits.  All of these numbers are the document's; only the
// package layout is this design's own.
package aq_pkg;
  localparam int unsigned ADDR_W        = 32;  // address width
  localparam int unsigned OFS_W         = 5;   // byte offset in a 32-byte line
  localparam int unsigned LINE_W        = ADDR_W - OFS_W;  // 27-bit line address
  localparam int unsigned NUM_SETS      = 20;  // sets in the queue
  localparam int unsigned CELLS_PER_SET = 6;   // fetch width plus one
  localparam int unsigned FETCH_W       = CELLS_PER_SET - 1;  // instructions per fetch
  localparam int unsigned NUM_CELLS     = NUM_SETS * CELLS_PER_SET;  // 120
  localparam int unsigned PTR_W         = 7;   // queue pointer width
  localparam int unsigned AGE_W         = 5;   // width of the AC bus

  typedef logic [ADDR_W-1:0] addr_t;
  typedef logic [LINE_W-1:0] line_t;
  typedef logic [OFS_W-1:0]  ofs_t;
  typedef logic [PTR_W-1:0]  qptr_t;

  // EIP offset as carried from the fetcher to a cell: bit 5 says the
  // instruction lies on "EIP line 2" of its cache line, bits 4..0 are its
  // offset within that EIP line.
  typedef struct packed {
    logic  line2;
    ofs_t  ofs;
  } eip_ofs_t;
endpackage
