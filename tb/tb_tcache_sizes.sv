// tb_tcache_sizes: the four TCache configurations side by side. The table
// size follows the TCache size as 4 KB - 32, 8 KB - 64, 16 KB - 128 and
// 32 KB - 256 entries. Each pair runs the same looping synthetic guest
// program through its own tcache_hw_manager with the tcache_dbt_sw
// software model, which checks every look-up. The test prints, per size,
// how often the table hit, missed, wrapped and was flushed, and requires
// every one of these to happen in every configuration.
module tb_tcache_sizes;
  localparam int NCFG = 4;
  localparam int unsigned ENT [NCFG] = '{32, 64, 128, 256};

  logic HCLK = 1'b0;
  logic HRESETn = 1'b0;
  always #5 HCLK = ~HCLK;

  logic [NCFG-1:0] done, want_reset;
  int ck [NCFG], fl [NCFG], hit [NCFG], cold [NCFG], fals [NCFG];
  int ins [NCFG], wrp [NCFG], fsh [NCFG];
  int checks = 0, failures = 0;

  for (genvar g = 0; g < NCFG; g++) begin : g_cfg
    logic        HSEL, HWRITE, HREADY, HREADYOUT, HRESP;
    logic [31:0] HADDR, HWDATA, HRDATA;
    logic [1:0]  HTRANS;
    logic [2:0]  HSIZE;

    tcache_hw_manager #(.ENTRIES(ENT[g])) dut (.HCLK, .HRESETn, .HSEL, .HADDR,
      .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY, .HRDATA, .HREADYOUT, .HRESP);

    tcache_dbt_sw #(.ENTRIES(ENT[g]), .TCACHE_BYTES(ENT[g] * 128), .N_BB(1200),
                    .N_EXEC(8000)) sw (
      .HCLK, .HRESETn, .HSEL, .HADDR, .HTRANS, .HWRITE, .HSIZE, .HWDATA, .HREADY,
      .HRDATA, .HREADYOUT, .HRESP, .want_reset(want_reset[g]), .done(done[g]),
      .checks(ck[g]), .failures(fl[g]), .n_hit(hit[g]), .n_cold_miss(cold[g]),
      .n_false_miss(fals[g]), .n_insert(ins[g]), .n_wrap(wrp[g]), .n_flush(fsh[g]));
  end

  task automatic need(input int count, input int g, input string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL %0d entries: never happened: %s", ENT[g], what);
    end
  endtask

  function automatic int total_checks();
    int s = checks;
    for (int g = 0; g < NCFG; g++) s += ck[g];
    return s;
  endfunction

  function automatic int total_failures();
    int s = failures;
    for (int g = 0; g < NCFG; g++) s += fl[g];
    return s;
  endfunction

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end

  initial begin
    repeat (3) @(negedge HCLK);
    HRESETn = 1'b1;
    wait (&want_reset);
    @(negedge HCLK); HRESETn = 1'b0;
    @(negedge HCLK); HRESETn = 1'b1;
    wait (&done);
    for (int g = 0; g < NCFG; g++) begin
      need(hit[g], g, "hit");
      need(cold[g], g, "cold miss");
      need(fals[g], g, "false miss");
      need(wrp[g], g, "circular index overflow");
      need(fsh[g], g, "flush");
      $display("%0d KB / %0d entries: hits=%0d cold=%0d false=%0d inserts=%0d wraps=%0d flushes=%0d hit-rate=%0d%%",
               ENT[g] / 8, ENT[g], hit[g], cold[g], fals[g], ins[g], wrp[g], fsh[g],
               100 * hit[g] / (hit[g] + cold[g] + fals[g]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", total_checks(), total_failures());
    $finish;
  end
endmodule
