// tb_tcache_lut: self-checking test of the look-up table with 8 entries.
// Random inserts (from a pool of 24 source PCs, inserted only after they
// missed, as the translation software does), queries and flushes are
// checked against a reference table: the result must appear the cycle
// after the query (one-cycle look-up), be the target on a hit and 0 on a
// miss, and entries past the table size must overwrite the oldest ones.
module tb_tcache_lut;
  localparam int unsigned E = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush, ins_valid, q_valid;
  logic [15:0] ins_src, q_src;
  logic [31:0] ins_tgt, res_tgt;
  logic res_hit, ins_wrap;
  int checks = 0, failures = 0;
  int nhit = 0, nmiss = 0, nwrap = 0, nflush = 0, noverw = 0;

  logic [15:0] msrc [E];
  logic [31:0] mtgt [E];
  bit          mval [E];
  int          mptr;
  bit          ever [logic [15:0]];   // inserted since the last flush

  always #5 clk = ~clk;

  tcache_lut #(.ENTRIES(E)) dut (.clk, .rst_n, .flush, .ins_valid, .ins_src,
    .ins_tgt, .q_valid, .q_src, .res_tgt, .res_hit, .ins_wrap);

  function automatic logic [31:0] model_lookup(input logic [15:0] s, output bit h);
    h = 1'b0;
    for (int i = 0; i < E; i++)
      if (mval[i] && msrc[i] == s) begin h = 1'b1; return mtgt[i]; end
    return 32'h0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic do_query(input logic [15:0] s, output bit h);
    logic [31:0] e;
    e = model_lookup(s, h);
    @(negedge clk); q_valid = 1'b1; q_src = s;
    @(negedge clk); q_valid = 1'b0;
    check(res_tgt == e && res_hit == h,
          $sformatf("query %h: got %h/%0b expected %h/%0b", s, res_tgt, res_hit, e, h));
    if (h) nhit++; else nmiss++;
    if (!h && ever.exists(s)) noverw++;
  endtask

  task automatic do_insert(input logic [15:0] s, input logic [31:0] t);
    @(negedge clk); ins_valid = 1'b1; ins_src = s; ins_tgt = t;
    #1;
    check(ins_wrap == (mptr == E - 1), "wrap pulse");
    if (ins_wrap) nwrap++;
    @(negedge clk); ins_valid = 1'b0;
    msrc[mptr] = s; mtgt[mptr] = t; mval[mptr] = 1'b1; mptr = (mptr + 1) % E;
    ever[s] = 1'b1;
  endtask

  task automatic do_flush();
    @(negedge clk); flush = 1'b1;
    @(negedge clk); flush = 1'b0;
    for (int i = 0; i < E; i++) mval[i] = 1'b0;
    mptr = 0; ever.delete(); nflush++;
    check(res_tgt == 0 && !res_hit, "result cleared by flush");
  endtask

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit h;
    logic [15:0] s;
    flush = 0; ins_valid = 0; q_valid = 0; ins_src = 0; q_src = 0; ins_tgt = 0;
    mptr = 0;
    for (int i = 0; i < E; i++) mval[i] = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    do_query(16'h0000, h);
    check(!h, "empty table misses");
    // Result holds between queries.
    repeat (3) @(negedge clk);
    check(res_tgt == 0 && !res_hit, "result held");
    for (int n = 0; n < 3000; n++) begin
      s = 16'h0100 + 16'($urandom_range(0, 23)) * 16'h0010;
      do_query(s, h);
      if (!h) do_insert(s, 32'h2000_1000 + 32'($urandom_range(0, 4095)) * 4);
      if ($urandom_range(0, 299) == 0) do_flush();
    end
    // Same-cycle query and insert: the query sees the table before it.
    begin
      logic [31:0] e;
      do_flush();
      @(negedge clk); ins_valid = 1; ins_src = 16'hBEEF; ins_tgt = 32'h2000_7000;
      q_valid = 1; q_src = 16'hBEEF;
      @(negedge clk); ins_valid = 0; q_valid = 0;
      msrc[0] = 16'hBEEF; mtgt[0] = 32'h2000_7000; mval[0] = 1; mptr = 1;
      check(res_tgt == 0 && !res_hit, "same-cycle query misses");
      do_query(16'hBEEF, h);
      e = mtgt[0];
      check(h && res_tgt == e, "hit after insert");
    end
    check(nhit > 0 && nmiss > 0 && nwrap > 0 && nflush > 0 && noverw > 0,
          "every mechanism exercised");
    $display("hits=%0d misses=%0d overwritten-misses=%0d wraps=%0d flushes=%0d",
             nhit, nmiss, noverw, nwrap, nflush);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
