// tcache_cam: source-address content-addressable memory with valid bits.
//
// Each of the ENTRIES entries holds one source PC (the key) and a valid
// bit. A search compares the key with every entry in parallel; entries
// whose valid bit is clear never match, which keeps stale words from
// giving false hits after power-up or a flush, as the document requires.
// When several entries match, the lowest index wins (this design's choice;
// the DBT software inserts a block only after it missed, so in normal use
// a key is present at most once).
//
// Interface and timing:
//   write : 'we' writes 'wkey' into entry 'widx' and sets its valid bit at
//           the clock edge.
//   clear : clears every valid bit at the clock edge (wins over 'we');
//           so does the asynchronous reset. Keys are not reset.
//   search: 'hit' and 'hit_idx' are combinational in 'skey' and see the
//           contents before a write in the same cycle.
module tcache_cam #(
  parameter int unsigned ENTRIES = tcache_pkg::DEFAULT_ENTRIES,
  parameter int unsigned KEY_W   = tcache_pkg::DEFAULT_SRC_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             we,
  input  logic [IDX_W-1:0] widx,
  input  logic [KEY_W-1:0] wkey,
  input  logic [KEY_W-1:0] skey,
  output logic             hit,
  output logic [IDX_W-1:0] hit_idx
);

  logic [KEY_W-1:0]   key   [ENTRIES];
  logic [ENTRIES-1:0] valid;
  logic [ENTRIES-1:0] match;

  // Keys: plain registers without reset.
  always_ff @(posedge clk) begin
    if (we) key[widx] <= wkey;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     valid       <= '0;
    else if (clear) valid       <= '0;
    else if (we)    valid[widx] <= 1'b1;
  end

  // Parallel compare.
  always_comb begin
    for (int unsigned i = 0; i < ENTRIES; i++)
      match[i] = valid[i] && (key[i] == skey);
  end

  // Priority encoder: lowest matching index.
  always_comb begin
    hit     = |match;
    hit_idx = '0;
    for (int i = ENTRIES - 1; i >= 0; i--)
      if (match[i]) hit_idx = IDX_W'(i);
  end

endmodule
