// tb_tcache_ahb_regs: self-checking test of the AHB-Lite register
// interface. The look-up table is replaced by a small reference: it
// registers the query key on q_valid and answers {16'h2000, key} in the next
// cycle, which lets the test see that each register write produces the
// right control pulse with the right data in its data phase, and that a
// pipelined QUERY read returns the fresh result with no wait states.
module tb_tcache_ahb_regs;
  logic        HCLK = 1'b0;
  logic        HRESETn = 1'b0;
  logic        HSEL, HWRITE, HREADY;
  logic [31:0] HADDR, HWDATA, HRDATA;
  logic [1:0]  HTRANS;
  logic [2:0]  HSIZE;
  logic        HREADYOUT, HRESP;
  logic        flush, ins_valid, q_valid;
  logic [15:0] ins_src, q_src;
  logic [31:0] ins_tgt, res_tgt;
  int checks = 0, failures = 0;
  int n_q = 0, n_ins = 0, n_fl = 0, stall = 0;
  logic [15:0] last_q, last_ins_src;
  logic [31:0] last_ins_tgt;

  always #5 HCLK = ~HCLK;
  assign HREADY = HREADYOUT;

  tcache_ahb_regs dut (.HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE,
    .HWDATA, .HREADY, .HRDATA, .HREADYOUT, .HRESP, .flush, .ins_valid, .ins_src,
    .ins_tgt, .q_valid, .q_src, .res_tgt);

  always @(posedge HCLK) begin
    if (q_valid) begin res_tgt <= {16'h2000, q_src}; last_q <= q_src; n_q++; end
    if (ins_valid) begin last_ins_src <= ins_src; last_ins_tgt <= ins_tgt; n_ins++; end
    if (flush) n_fl++;
    if (!HREADYOUT || HRESP) stall++;
  end

  `include "ahb_master_tasks.svh"

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] r;
    int cyc, q0, i0, f0;
    HSEL = 0; HTRANS = 0; HWRITE = 0; HSIZE = 3'b010; HADDR = 0; HWDATA = 0;
    res_tgt = 0;
    repeat (2) @(negedge HCLK);
    HRESETn = 1'b1;
    ahb_read(32'h4, r);  check(r == 0, "SRC_NEW reset value");
    ahb_read(32'h8, r);  check(r == 0, "TGT_NEW reset value");
    for (int n = 0; n < 500; n++) begin
      logic [15:0] s;
      logic [31:0] t;
      s = 16'($urandom); t = $urandom;
      // query: write then pipelined read
      q0 = n_q;
      ahb_write_read(32'h0, {16'hFFFF, s}, 32'h0, r, cyc);
      check(n_q == q0 + 1 && last_q == s, "one q_valid with the key");
      check(r == {16'h2000, s} && cyc == 3, $sformatf("QUERY result %h in %0d cycles", r, cyc));
      // insertion: SRC_NEW then TGT_NEW, back to back
      i0 = n_ins;
      ahb_write2(32'h4, {16'h0, s}, 32'h8, t);
      @(negedge HCLK);
      check(n_ins == i0 + 1 && last_ins_src == s && last_ins_tgt == t, "insert pulse and data");
      ahb_read(32'h4, r); check(r == {16'h0, s}, "SRC_NEW readback");
      ahb_read(32'h8, r); check(r == t, "TGT_NEW readback");
      ahb_read(32'hC, r); check(r == 0, "CTRL reads 0");
      // a read of QUERY has no side effect
      q0 = n_q;
      ahb_read(32'h0, r); check(r == {16'h2000, s} && n_q == q0, "QUERY re-read");
      // writing SRC_NEW alone inserts nothing
      i0 = n_ins;
      ahb_write(32'h4, 32'h1234); @(negedge HCLK);
      check(n_ins == i0, "no insert from SRC_NEW");
      // CTRL: bit 0 flushes, other bits do not
      f0 = n_fl;
      ahb_write(32'hC, 32'hFFFF_FFFE); @(negedge HCLK);
      check(n_fl == f0, "CTRL without bit 0");
      ahb_write(32'hC, 32'h1); @(negedge HCLK);
      check(n_fl == f0 + 1, "CTRL flush");
      // HSEL low: ignored
      @(negedge HCLK); HSEL = 0; HTRANS = 2'b10; HWRITE = 1; HADDR = 32'hC;
      @(negedge HCLK); HTRANS = 0; HWRITE = 0; HWDATA = 1;
      @(negedge HCLK);
      check(n_fl == f0 + 1, "unselected write ignored");
    end
    check(stall == 0, "no wait states or error responses");
    $display("queries=%0d inserts=%0d flushes=%0d", n_q, n_ins, n_fl);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
