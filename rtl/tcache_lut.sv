// tcache_lut: the translation-cache look-up table (CAM + valid bit + RAM +
// circular index logic).
//
// It records, for each translated basic block, the pair (source PC, start
// address of its translation in TCache memory) and answers the question
// "is this source PC translated, and where?" in one clock cycle, whatever
// the number of blocks cached.
//
//   insert : 'ins_valid' writes ('ins_src', 'ins_tgt') into the entry at
//            the circular index and sets its valid bit; the index then moves
//            on and, past the last entry, wraps and overwrites the oldest
//            entries. There is no software fall-back table: a look-up of an
//            overwritten block misses and the block is translated again.
//   query  : 'q_valid' searches 'q_src'. On a hit the target address of
//            the matching entry is returned, on a miss the address 0 (the
//            TCache never starts at address 0). The CAM index is not
//            returned.
//   flush  : invalidates every entry and returns the index to 0; the
//            TCache software flushes when the TCache memory is full.
// All of this follows the document; the widths, the register on the result
// and the priority of flush over a same-cycle insert are this design's.
//
// Timing: the search of 'q_src' is combinational; its result is registered
// at the edge that ends the q_valid cycle and is held in 'res_tgt' /
// 'res_hit' until the next query or a flush (which clears it to 0). A
// query in the same cycle as an insert sees the table before the insert.
// 'ins_wrap' pulses with the insertion that makes the circular index
// overflow.
module tcache_lut #(
  parameter int unsigned ENTRIES = tcache_pkg::DEFAULT_ENTRIES,
  parameter int unsigned SRC_W   = tcache_pkg::DEFAULT_SRC_W,
  parameter int unsigned TGT_W   = tcache_pkg::DEFAULT_TGT_W,
  localparam int unsigned IDX_W  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             flush,
  input  logic             ins_valid,
  input  logic [SRC_W-1:0] ins_src,
  input  logic [TGT_W-1:0] ins_tgt,
  input  logic             q_valid,
  input  logic [SRC_W-1:0] q_src,
  output logic [TGT_W-1:0] res_tgt,
  output logic             res_hit,
  output logic             ins_wrap
);

  logic [IDX_W-1:0] ins_idx;
  logic [IDX_W-1:0] hit_idx;
  logic             hit;
  logic [TGT_W-1:0] hit_tgt;
  logic             do_ins;

  assign do_ins = ins_valid && !flush;

  tcache_circ_index #(.ENTRIES(ENTRIES)) u_index (
    .clk     (clk),
    .rst_n   (rst_n),
    .flush   (flush),
    .advance (do_ins),
    .idx     (ins_idx),
    .wrap    (ins_wrap)
  );

  tcache_cam #(.ENTRIES(ENTRIES), .KEY_W(SRC_W)) u_cam (
    .clk     (clk),
    .rst_n   (rst_n),
    .clear   (flush),
    .we      (do_ins),
    .widx    (ins_idx),
    .wkey    (ins_src),
    .skey    (q_src),
    .hit     (hit),
    .hit_idx (hit_idx)
  );

  tcache_ram #(.ENTRIES(ENTRIES), .DATA_W(TGT_W)) u_ram (
    .clk   (clk),
    .we    (do_ins),
    .widx  (ins_idx),
    .wdata (ins_tgt),
    .ridx  (hit_idx),
    .rdata (hit_tgt)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_tgt <= '0;
      res_hit <= 1'b0;
    end else if (flush) begin
      res_tgt <= '0;
      res_hit <= 1'b0;
    end else if (q_valid) begin
      res_tgt <= hit ? hit_tgt : TGT_W'(tcache_pkg::MISS_ADDR);
      res_hit <= hit;
    end
  end

endmodule
