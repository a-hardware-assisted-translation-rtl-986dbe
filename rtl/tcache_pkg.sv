// tcache_pkg: constants and types shared by the translation-cache hardware
// manager.
//
// The manager is a fixed-size look-up table that maps the source program
// counter of a basic block (BB) to the address where its translation (TBB)
// starts in the translation cache (TCache). The table size follows the
// TCache size: 32 KB - 256 entries, 16 KB - 128, 8 KB - 64, 4 KB - 32.
// The default here is the largest of these. The source PC is 16 bits wide
// (an 8051 program counter) and the target address 32 bits (an Arm
// Cortex-M3 address); both widths are this design's reading and can be
// changed by parameter.
//
// The register map of the AHB-Lite slave is this design's own choice
// (word offsets from the peripheral's base address):
//   0x0  QUERY/RESULT  write: source PC to look up
//                      read : target address of the last look-up, 0 on miss
//   0x4  SRC_NEW       read/write: source PC of the entry to insert
//   0x8  TGT_NEW       write: target address; commits (SRC_NEW, TGT_NEW) as
//                      a new entry at the circular insertion index
//                      read : last target address written
//   0xC  CTRL          write bit 0 = 1: flush (invalidate all entries)
//                      read : 0
package tcache_pkg;

  localparam int unsigned DEFAULT_ENTRIES = 256;
  localparam int unsigned DEFAULT_SRC_W   = 16;
  localparam int unsigned DEFAULT_TGT_W   = 32;

  // Value returned for a query that misses. It cannot be a real TCache
  // address because the TCache is never placed at the bottom of memory.
  localparam logic [31:0] MISS_ADDR = 32'h0000_0000;

  // Register select, HADDR[3:2].
  typedef enum logic [1:0] {
    REG_QUERY   = 2'd0,
    REG_SRC_NEW = 2'd1,
    REG_TGT_NEW = 2'd2,
    REG_CTRL    = 2'd3
  } tcache_reg_e;

  localparam int unsigned CTRL_FLUSH_BIT = 0;

  // AHB-Lite transfer types and responses used by the slave.
  typedef enum logic [1:0] {
    HTRANS_IDLE   = 2'b00,
    HTRANS_BUSY   = 2'b01,
    HTRANS_NONSEQ = 2'b10,
    HTRANS_SEQ    = 2'b11
  } htrans_e;

  localparam logic [2:0] HSIZE_WORD = 3'b010;
  localparam logic       HRESP_OKAY = 1'b0;

endpackage
