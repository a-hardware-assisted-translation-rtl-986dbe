// tb_tcache_circ_index: self-checking test of the circular insertion index.
// Two instances, the default 256 entries and a 5-entry one (a size that is
// not a power of two), are advanced, flushed and reset at random while a
// reference counter modulo ENTRIES predicts 'idx' and 'wrap'.
module tb_tcache_circ_index;
  localparam int unsigned E0 = 256;
  localparam int unsigned E1 = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic flush, advance;
  logic [7:0] idx0;
  logic [2:0] idx1;
  logic wrap0, wrap1;
  int checks = 0, failures = 0;
  int m0, m1, wraps0, wraps1;

  always #5 clk = ~clk;

  tcache_circ_index u0 (.clk, .rst_n, .flush, .advance, .idx(idx0), .wrap(wrap0));
  tcache_circ_index #(.ENTRIES(E1)) u1 (.clk, .rst_n, .flush, .advance, .idx(idx1), .wrap(wrap1));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: idx0=%0d m0=%0d idx1=%0d m1=%0d", what, idx0, m0, idx1, m1);
    end
  endtask

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    flush = 1'b0; advance = 1'b0; m0 = 0; m1 = 0; wraps0 = 0; wraps1 = 0;
    repeat (3) @(negedge clk);
    check(idx0 == 0 && idx1 == 0, "reset");
    rst_n = 1'b1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      advance = ($urandom_range(0, 9) != 0);
      flush   = ($urandom_range(0, 999) == 0);
      #1;
      check(wrap0 == (advance && !flush && m0 == E0 - 1), "wrap0");
      check(wrap1 == (advance && !flush && m1 == E1 - 1), "wrap1");
      if (wrap0) wraps0++;
      if (wrap1) wraps1++;
      @(posedge clk);
      if (flush) begin m0 = 0; m1 = 0; end
      else if (advance) begin m0 = (m0 + 1) % E0; m1 = (m1 + 1) % E1; end
      #1;
      check(int'(idx0) == m0, "idx0");
      check(int'(idx1) == m1, "idx1");
    end
    // Force one flush and an asynchronous reset mid-count.
    @(negedge clk); advance = 1'b1; flush = 1'b1;
    @(negedge clk); flush = 1'b0; advance = 1'b0;
    check(idx0 == 0 && idx1 == 0, "flush wins over advance");
    @(negedge clk); advance = 1'b1;
    @(negedge clk); advance = 1'b0;
    check(idx0 == 1 && idx1 == 1, "advance after flush");
    rst_n = 1'b0; #1;
    check(idx0 == 0 && idx1 == 0, "async reset");
    check(wraps0 > 0 && wraps1 > 0, "wrap seen");
    $display("wraps: %0d (256 entries), %0d (5 entries)", wraps0, wraps1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
