// tb_tcache_cam: self-checking test of the source-address CAM.
// A 16-entry CAM with a 4-bit key (so that matches and duplicate keys are
// frequent) is written, cleared and searched at random; a reference model
// of keys and valid bits gives the expected hit and lowest matching index.
module tb_tcache_cam;
  localparam int unsigned E = 16;
  localparam int unsigned K = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic clear, we;
  logic [3:0] widx, hit_idx;
  logic [K-1:0] wkey, skey;
  logic hit;
  int checks = 0, failures = 0;
  int nhit = 0, nmiss = 0, ndup = 0;

  logic [K-1:0] mkey [E];
  bit           mval [E];

  always #5 clk = ~clk;

  tcache_cam #(.ENTRIES(E), .KEY_W(K)) dut (.clk, .rst_n, .clear, .we, .widx,
                                            .wkey, .skey, .hit, .hit_idx);

  task automatic expect_search();
    bit eh = 1'b0;
    int ei = 0;
    int nm = 0;
    for (int i = E - 1; i >= 0; i--)
      if (mval[i] && mkey[i] == skey) begin eh = 1'b1; ei = i; nm++; end
    checks++;
    if (hit !== eh || (eh && int'(hit_idx) != ei)) begin
      failures++;
      $display("FAIL key=%0h hit=%0b/%0b idx=%0d/%0d", skey, hit, eh, hit_idx, ei);
    end
    if (eh) nhit++; else nmiss++;
    if (nm > 1) ndup++;
  endtask

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    clear = 1'b0; we = 1'b0; widx = '0; wkey = '0; skey = '0;
    for (int i = 0; i < E; i++) begin mval[i] = 1'b0; mkey[i] = '0; end
    repeat (2) @(negedge clk);
    // After reset nothing may hit, whatever the key words hold.
    for (int k = 0; k < (1 << K); k++) begin
      skey = K'(k); #1; expect_search();
    end
    rst_n = 1'b1;
    for (int n = 0; n < 4000; n++) begin
      @(negedge clk);
      we    = ($urandom_range(0, 2) == 0);
      clear = ($urandom_range(0, 199) == 0);
      widx  = 4'($urandom);
      wkey  = K'($urandom);
      skey  = K'($urandom);
      #1;
      expect_search();          // same-cycle search sees the old contents
      @(posedge clk);
      if (clear) for (int i = 0; i < E; i++) mval[i] = 1'b0;
      else if (we) begin mkey[widx] = wkey; mval[widx] = 1'b1; end
    end
    @(negedge clk); we = 1'b0; clear = 1'b0;
    for (int k = 0; k < (1 << K); k++) begin
      skey = K'(k); #1; expect_search();
    end
    checks++;
    if (nhit == 0 || nmiss == 0 || ndup == 0) begin
      failures++;
      $display("FAIL coverage hit=%0d miss=%0d dup=%0d", nhit, nmiss, ndup);
    end
    $display("searches: %0d hits, %0d misses, %0d with duplicate keys", nhit, nmiss, ndup);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
