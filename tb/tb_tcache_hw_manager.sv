// tb_tcache_hw_manager: end-to-end test of the translation-cache hardware
// manager at its default size (256 entries, paired with a 32 KB TCache).
// The peripheral is driven over AHB-Lite by tcache_dbt_sw, a model of the
// translation software running a looping synthetic guest program, which
// checks every look-up against a reference table. Each mechanism must
// occur: hits, cold misses, misses of overwritten entries after the
// circular index wrapped, insertions, wraps and memory-full flushes. An
// asynchronous reset in the middle of the run must empty the table.
module tb_tcache_hw_manager;
  logic        HCLK = 1'b0;
  logic        HRESETn = 1'b0;
  logic        HSEL, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [2:0]  HSIZE;
  logic        HREADYOUT, HRESP;
  logic        done, want_reset;
  int sw_checks, sw_failures, n_hit, n_cold, n_false, n_ins, n_wrap, n_flush;
  int checks = 0, failures = 0;

  always #5 HCLK = ~HCLK;

  tcache_hw_manager dut (.HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE,
    .HSIZE, .HWDATA, .HREADY, .HRDATA, .HREADYOUT, .HRESP);

  tcache_dbt_sw #(.ENTRIES(256), .TCACHE_BYTES(32768)) sw (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY,
    .HRDATA, .HREADYOUT, .HRESP, .want_reset, .done, .checks(sw_checks), .failures(sw_failures),
    .n_hit, .n_cold_miss(n_cold), .n_false_miss(n_false), .n_insert(n_ins),
    .n_wrap, .n_flush);

  task automatic need(input int count, input string what);
    checks++;
    if (count == 0) begin failures++; $display("FAIL mechanism never happened: %s", what); end
  endtask

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + sw_checks, failures + sw_failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge HCLK);
    HRESETn = 1'b1;
    wait (want_reset);
    @(negedge HCLK); HRESETn = 1'b0;
    @(negedge HCLK); HRESETn = 1'b1;
    wait (done);
    need(n_hit, "hit");
    need(n_cold, "miss (block never translated)");
    need(n_false, "miss of an overwritten entry (false miss)");
    need(n_ins, "insertion");
    need(n_wrap, "circular index overflow");
    need(n_flush, "flush on full TCache memory");
    $display("hits=%0d cold_misses=%0d false_misses=%0d inserts=%0d wraps=%0d flushes=%0d",
             n_hit, n_cold, n_false, n_ins, n_wrap, n_flush);
    $display("TB_RESULT checks=%0d failures=%0d", checks + sw_checks, failures + sw_failures);
    $finish;
  end
endmodule
