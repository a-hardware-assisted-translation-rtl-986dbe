// tcache_ram: target-address store of the translation-cache look-up table.
//
// One word per table entry, holding the address in TCache memory where the
// translated basic block of that entry starts. It is written together with
// the source PC in the CAM, at the same index, and read at the index the
// CAM search returns. Written as a register array with an asynchronous
// read, so the CAM match and the read fit in one clock cycle; the document
// reports the look-up table in flip-flops. Words are not reset: a word is
// only used when the CAM entry at that index is valid.
//
// Interface and timing: 'we' writes 'wdata' into 'widx' at the clock edge;
// 'rdata' is combinational in 'ridx' and shows the old word during a write
// to the same index.
module tcache_ram #(
  parameter int unsigned ENTRIES = tcache_pkg::DEFAULT_ENTRIES,
  parameter int unsigned DATA_W  = tcache_pkg::DEFAULT_TGT_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [IDX_W-1:0]  widx,
  input  logic [DATA_W-1:0] wdata,
  input  logic [IDX_W-1:0]  ridx,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [ENTRIES];

  always_ff @(posedge clk) begin
    if (we) mem[widx] <= wdata;
  end

  assign rdata = mem[ridx];

endmodule
