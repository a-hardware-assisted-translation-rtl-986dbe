// tcache_circ_index: circular insertion index of the translation-cache
// look-up table.
//
// New translations are written to the table one after another. The index
// points at the entry the next insertion writes; each insertion ('advance')
// moves it on by one, and past the last entry it wraps to entry 0, so the
// oldest entries are overwritten first. A look-up of an overwritten block
// then misses although its code is still in the TCache memory; the software
// simply translates it again. This follows the document. A flush (or reset)
// returns the index to 0; flush winning over a simultaneous advance is this
// design's choice.
//
// Interface: 'idx' is registered and valid every cycle. 'wrap' is
// combinational and high in the cycle of an advance that takes the index
// from ENTRIES-1 back to 0 (the overflow of the circular list).
// Timing: the new index appears the cycle after 'advance'.
module tcache_circ_index #(
  parameter int unsigned ENTRIES = tcache_pkg::DEFAULT_ENTRIES,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             advance,
  output logic [IDX_W-1:0] idx,
  output logic             wrap
);

  localparam logic [IDX_W-1:0] LAST = IDX_W'(ENTRIES - 1);

  assign wrap = advance && !flush && (idx == LAST);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)       idx <= '0;
    else if (flush)   idx <= '0;
    else if (advance) idx <= (idx == LAST) ? '0 : idx + 1'b1;
  end

endmodule
