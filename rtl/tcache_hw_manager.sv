// tcache_hw_manager: translation-cache hardware manager, top level.
//
// A memory-mapped peripheral that relieves dynamic-binary-translation
// software of its translation-cache bookkeeping. The software keeps the
// translated code, its space management and the full-flush eviction; the
// peripheral keeps a fixed-size table pairing each basic block's source PC
// with the start of its translation and answers a look-up in one cycle,
// returning the translation's address on a hit or 0 on a miss. New entries
// go in round-robin: once the table has wrapped, the oldest pairs are
// overwritten and looking them up misses, in exchange for never needing a
// software hash table behind the hardware.
//
// Structure: tcache_ahb_regs (AHB-Lite slave, register map in tcache_pkg)
// drives tcache_lut (CAM of source PCs with valid bits, RAM of target
// addresses, circular insertion index).
//
// Ports are a plain AHB-Lite slave port. Timing: no wait states; a QUERY
// write followed at once by a QUERY read returns the result in the read's
// data phase. ENTRIES should match the TCache size: 32, 64, 128 and 256
// entries for 4, 8, 16 and 32 KB, the pairing the document found from its
// benchmarks; 256 is the default. HREADYOUT and HRESP are constant (the
// slave never waits and never errs). The table's hit flag and wrap pulse
// are not used by the register interface, which returns 0 for a miss.
module tcache_hw_manager #(
  parameter int unsigned ENTRIES = tcache_pkg::DEFAULT_ENTRIES,
  parameter int unsigned SRC_W   = tcache_pkg::DEFAULT_SRC_W,
  parameter int unsigned TGT_W   = tcache_pkg::DEFAULT_TGT_W
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [31:0] HADDR,
  input  logic [1:0]  HTRANS,
  input  logic        HWRITE,
  input  logic [2:0]  HSIZE,
  input  logic [31:0] HWDATA,
  input  logic        HREADY,
  output logic [31:0] HRDATA,
  output logic        HREADYOUT,
  output logic        HRESP
);

  logic             flush;
  logic             ins_valid;
  logic [SRC_W-1:0] ins_src;
  logic [TGT_W-1:0] ins_tgt;
  logic             q_valid;
  logic [SRC_W-1:0] q_src;
  logic [TGT_W-1:0] res_tgt;
  logic             res_hit;
  logic             ins_wrap;

  tcache_ahb_regs #(.SRC_W(SRC_W), .TGT_W(TGT_W)) u_regs (
    .HCLK      (HCLK),
    .HRESETn   (HRESETn),
    .HSEL      (HSEL),
    .HADDR     (HADDR),
    .HTRANS    (HTRANS),
    .HWRITE    (HWRITE),
    .HSIZE     (HSIZE),
    .HWDATA    (HWDATA),
    .HREADY    (HREADY),
    .HRDATA    (HRDATA),
    .HREADYOUT (HREADYOUT),
    .HRESP     (HRESP),
    .flush     (flush),
    .ins_valid (ins_valid),
    .ins_src   (ins_src),
    .ins_tgt   (ins_tgt),
    .q_valid   (q_valid),
    .q_src     (q_src),
    .res_tgt   (res_tgt)
  );

  tcache_lut #(.ENTRIES(ENTRIES), .SRC_W(SRC_W), .TGT_W(TGT_W)) u_lut (
    .clk       (HCLK),
    .rst_n     (HRESETn),
    .flush     (flush),
    .ins_valid (ins_valid),
    .ins_src   (ins_src),
    .ins_tgt   (ins_tgt),
    .q_valid   (q_valid),
    .q_src     (q_src),
    .res_tgt   (res_tgt),
    .res_hit   (res_hit),
    .ins_wrap  (ins_wrap)
  );

endmodule
