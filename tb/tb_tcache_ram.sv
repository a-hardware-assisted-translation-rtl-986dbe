// tb_tcache_ram: self-checking test of the target-address store at its
// default size (256 words of 32 bits). Every word is written once, then
// random writes and reads are compared with a reference array, including a
// read of the word being written in the same cycle (old value expected).
module tb_tcache_ram;
  localparam int unsigned E = 256;

  logic clk = 1'b0;
  logic we;
  logic [7:0] widx, ridx;
  logic [31:0] wdata, rdata;
  int checks = 0, failures = 0;
  logic [31:0] m [E];

  always #5 clk = ~clk;

  tcache_ram dut (.clk, .we, .widx, .wdata, .ridx, .rdata);

  task automatic expect_read();
    checks++;
    if (rdata !== m[ridx]) begin
      failures++;
      $display("FAIL ridx=%0d rdata=%h expected %h", ridx, rdata, m[ridx]);
    end
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = 1'b0; widx = '0; ridx = '0; wdata = '0;
    for (int i = 0; i < E; i++) begin
      @(negedge clk);
      we = 1'b1; widx = 8'(i); wdata = 32'h2000_0000 + 32'(i) * 32'h84;
      m[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < E; i++) begin ridx = 8'(i); #1; expect_read(); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      we    = $urandom_range(0, 1) == 1;
      widx  = 8'($urandom);
      ridx  = ($urandom_range(0, 3) == 0) ? widx : 8'($urandom);
      wdata = $urandom;
      #1;
      expect_read();
      @(posedge clk);
      if (we) m[widx] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
