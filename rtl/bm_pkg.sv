// bm_pkg: constants shared by the blocks of the VOQ buffer manager.
//
// The switch has 16 ports, so every buffer manager keeps 16 virtual output
// queues (OHR0-15 / OTR0-15). A cell is moved as 72-bit beats (two 36-bit
// buffer chips side by side), and the pointer memory is accessed 36 bits at a
// time, two accesses per 72-bit pointer entry. All pointer work of one cell is
// scheduled on a cell slot of ten clocks: five two-clock pipeline stages.
//
// The 16 ports, the 72-bit cell buffer, the 36-bit pointer bus and the
// two-clock stages follow the design description. The buffer depth, the
// slot length, the number of beats per cell, the request FIFO depth and the
// queue limit are this design's own choices.
package bm_pkg;

  localparam int unsigned N_PORTS     = 16;  // switch size 16x16
  localparam int unsigned BEAT_W      = 72;  // cell buffer word (A chip + B chip)
  localparam int unsigned PTR_W       = 36;  // pointer memory data bus
  localparam int unsigned CELL_AW     = 12;  // 4096 cell buffers
  localparam int unsigned CELL_BEATS  = 6;   // 53-byte ATM cell in 6 x 9 bytes
  localparam int unsigned SLOT_CYCLES = 10;  // 5 stages x 2 clocks
  localparam int unsigned RFC_DEPTH   = 4;   // request/grant round trip in slots
  localparam int unsigned Q_LIMIT     = 1024;// policing threshold per VOQ

  // Phases of the cell slot at which each pointer operation is scheduled.
  // Stage 0: new cell (idle pop, link to VOQ tail, store bitmap).
  localparam int unsigned PH_WPM_LINK   = 0;
  localparam int unsigned PH_WPM_BITMAP = 1;
  // Stage 1: multicast stitching of the previous outgoing cell.
  localparam int unsigned PH_STITCH     = 2;
  localparam int unsigned PH_MC_UPDATE  = 3;
  // Stage 2: read the pointer entry of the outgoing head cell.
  localparam int unsigned PH_RD_NEXT    = 4;
  localparam int unsigned PH_RD_BITMAP  = 5;
  // Stage 3: move the VOQ head, free the address.
  localparam int unsigned PH_DEQ        = 6;
  localparam int unsigned PH_FREE       = 7;
  // Stage 4 (phases 8, 9): synchronisation, slot-end bookkeeping.

  // Pointer entry halves in the pointer memory.
  localparam logic HALF_NEXT   = 1'b0;  // bits 35:0 - next cell address
  localparam logic HALF_BITMAP = 1'b1;  // bits 71:36 - multicast leaf bitmap

endpackage
