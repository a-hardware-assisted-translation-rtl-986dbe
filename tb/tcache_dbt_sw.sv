// tcache_dbt_sw: testbench model of the translation software that uses the
// translation-cache hardware manager, acting as AHB-Lite master.
//
// It runs a synthetic guest program of N_BB basic blocks. Block i starts at
// source PC 0x0100 + 8*i and its translation is 16 + (i*2654435761 >> 7) %
// 180 bytes long, rounded down to a word (about 104 bytes on average, so a
// TCache of TCACHE_BYTES holds more translations than the table has entries
// and the table wraps before the memory fills). Execution follows loops:
// a random start block, a random length of up to 1.5*ENTRIES blocks, repeated
// 2 to 6 times. For each block executed the model does what the translation
// software does:
//   1. write QUERY and read it straight back (pipelined, 3 bus cycles);
//   2. on a hit, "execute" the translation at the returned address;
//   3. on a miss, translate: if the TCache memory has no room, flush the
//      table (CTRL) and empty the memory; allocate the translation, then
//      write SRC_NEW and TGT_NEW to insert the pair.
// A reference model of the table (source PC, target, valid, circular
// index) predicts every result. The model counts hits, cold misses, misses
// of blocks whose translation is still in TCache memory but whose table
// entry was overwritten, insertions, table wraps and memory-full flushes.
// At the end it raises 'want_reset' and checks that the reset the
// testbench then applies has emptied the table.
module tcache_dbt_sw #(
  parameter int unsigned ENTRIES      = 256,
  parameter int unsigned TCACHE_BYTES = 32768,
  parameter int unsigned N_BB         = 1200,
  parameter int unsigned N_EXEC       = 20000,
  parameter logic [31:0] TC_BASE      = 32'h2000_8000
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  output logic        HSEL,
  output logic [31:0] HADDR,
  output logic [1:0]  HTRANS,
  output logic        HWRITE,
  output logic [2:0]  HSIZE,
  output logic [31:0] HWDATA,
  output logic        HREADY,
  input  logic [31:0] HRDATA,
  input  logic        HREADYOUT,
  input  logic        HRESP,
  output logic        want_reset,
  output logic        done,
  output int          checks,
  output int          failures,
  output int          n_hit,
  output int          n_cold_miss,
  output int          n_false_miss,
  output int          n_insert,
  output int          n_wrap,
  output int          n_flush
);

  localparam logic [31:0] A_QUERY = 32'h0, A_SRC = 32'h4, A_TGT = 32'h8, A_CTRL = 32'hC;

  assign HREADY = HREADYOUT;

  `include "ahb_master_tasks.svh"

  // Reference table.
  logic [15:0] msrc [ENTRIES];
  logic [31:0] mtgt [ENTRIES];
  bit          mval [ENTRIES];
  int          mptr;
  // Software view of TCache memory: translation address per block, 0 = none.
  logic [31:0] in_mem [N_BB];
  int unsigned alloc;
  int          cyc_now;
  int          n_bus_err;

  always @(posedge HCLK) begin
    cyc_now <= cyc_now + 1;
    if (HRESETn && (!HREADYOUT || HRESP)) n_bus_err <= n_bus_err + 1;
  end

  function automatic logic [15:0] bb_pc(input int i);
    return 16'h0100 + 16'(i * 8);
  endfunction

  function automatic int unsigned bb_size(input int i);
    int unsigned h;
    h = (32'(i) * 32'd2654435761) >> 7;
    return (16 + h % 180) & ~32'd3;
  endfunction

  function automatic logic [31:0] model_lookup(input logic [15:0] s);
    for (int k = 0; k < ENTRIES; k++)
      if (mval[k] && msrc[k] == s) return mtgt[k];
    return 32'h0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %m: %s", what);
    end
  endtask

  task automatic run_block(input int i);
    logic [31:0] r, e;
    logic [31:0] t;
    int cyc, c0;
    e  = model_lookup(bb_pc(i));
    c0 = cyc_now;
    ahb_write_read(A_QUERY, {16'h0, bb_pc(i)}, A_QUERY, r, cyc);
    check(r == e, $sformatf("block %0d pc %h: got %h expected %h", i, bb_pc(i), r, e));
    check(cyc == 3 && cyc_now - c0 == 3, "query answered in 3 bus cycles");
    if (e != 0) begin
      n_hit++;
      check(e == in_mem[i], "hit returns the translation's address");
      return;
    end
    if (in_mem[i] != 0) n_false_miss++; else n_cold_miss++;
    // Translate. Evict everything when the memory is full.
    if (alloc + bb_size(i) > TCACHE_BYTES) begin
      ahb_write(A_CTRL, 32'h1);
      for (int k = 0; k < ENTRIES; k++) mval[k] = 1'b0;
      for (int k = 0; k < N_BB; k++) in_mem[k] = 32'h0;
      mptr = 0; alloc = 0; n_flush++;
    end
    t = TC_BASE + alloc;
    alloc += bb_size(i);
    in_mem[i] = t;
    ahb_write2(A_SRC, {16'h0, bb_pc(i)}, A_TGT, t);
    msrc[mptr] = bb_pc(i); mtgt[mptr] = t; mval[mptr] = 1'b1;
    if (mptr == ENTRIES - 1) n_wrap++;
    mptr = (mptr + 1) % ENTRIES;
    n_insert++;
  endtask

  initial begin
    int executed, start, len, reps;
    logic [31:0] r;
    done = 1'b0; want_reset = 1'b0; checks = 0; failures = 0; cyc_now = 0; n_bus_err = 0;
    n_hit = 0; n_cold_miss = 0; n_false_miss = 0; n_insert = 0; n_wrap = 0; n_flush = 0;
    HSEL = 0; HADDR = 0; HTRANS = 0; HWRITE = 0; HSIZE = 3'b010; HWDATA = 0;
    for (int k = 0; k < ENTRIES; k++) mval[k] = 1'b0;
    for (int k = 0; k < N_BB; k++) in_mem[k] = 32'h0;
    mptr = 0; alloc = 0;
    @(posedge HRESETn);
    // Empty table: the first query of every block misses.
    ahb_write_read(A_QUERY, 32'h0100, A_QUERY, r, start);
    check(r == 0, "first access misses");
    executed = 0;
    while (executed < N_EXEC) begin
      start = $urandom_range(0, N_BB - 1);
      len   = $urandom_range(4, ENTRIES + ENTRIES / 2);
      reps  = $urandom_range(2, 6);
      for (int rr = 0; rr < reps; rr++)
        for (int b = 0; b < len; b++) begin
          run_block((start + b) % N_BB);
          executed++;
        end
    end
    check(n_bus_err == 0, "no wait states or error responses");
    // Reset empties the table: insert a pair, see it hit, ask for a reset,
    // then see it miss.
    want_reset = 1'b0;
    ahb_write2(A_SRC, 32'h0ABC, A_TGT, TC_BASE);
    ahb_write_read(A_QUERY, 32'h0ABC, A_QUERY, r, start);
    check(r == TC_BASE, "hit before reset");
    want_reset = 1'b1;
    @(negedge HRESETn);
    want_reset = 1'b0;
    @(posedge HRESETn);
    ahb_write_read(A_QUERY, 32'h0ABC, A_QUERY, r, start);
    check(r == 0, "miss after reset");
    ahb_read(A_SRC, r);
    check(r == 0, "SRC_NEW cleared by reset");
    done = 1'b1;
  end

endmodule
