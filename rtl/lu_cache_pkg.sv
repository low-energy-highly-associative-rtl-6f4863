// Shared constants and types of the last-use (LU) predicted CAM data cache.
//
// The cache is 32 KB, 32-way set associative with 32-byte lines. It is split
// into M = size / (ways * line) = 32 sub-caches, each a small fully
// associative cache with a 32-entry CAM tag store and a 32-line data RAM.
// With a 32-bit address this leaves a 22-bit tag, 5 sub-cache select bits and
// 5 byte-offset bits, of which 3 select one of the eight 32-bit words of a
// line. The geometry follows the original scheme; the 32-bit address and the field
// order (tag | sub-cache | word | byte) are this design's choice.
package lu_cache_pkg;

  localparam int unsigned DC_ADDR_W      = 32;
  localparam int unsigned DC_WORD_W      = 32;
  localparam int unsigned DC_CACHE_BYTES = 32768;
  localparam int unsigned DC_WAYS        = 32;
  localparam int unsigned DC_LINE_BYTES  = 32;

  // States of a sub-cache access.
  //   SC_IDLE : ready; a request is searched against the LU line(s) only
  //   SC_FULL : LU miss latched, full precharge and full CAM search
  //   SC_WAKE : hit line was drowsy, one cycle to bring it to normal mode
  //   SC_MISS : true miss, waiting for the refill line
  typedef enum logic [1:0] {
    SC_IDLE = 2'd0,
    SC_FULL = 2'd1,
    SC_WAKE = 2'd2,
    SC_MISS = 2'd3
  } sc_state_e;

  // States of the refill / write-back controller.
  typedef enum logic [1:0] {
    MC_IDLE = 2'd0,
    MC_WB   = 2'd1,
    MC_RD   = 2'd2
  } mc_state_e;

endpackage
