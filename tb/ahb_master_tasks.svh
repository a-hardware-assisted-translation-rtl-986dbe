// ahb_master_tasks.svh: AHB-Lite master tasks shared by the testbenches.
// Included inside a module that declares HCLK, HSEL, HADDR, HTRANS, HWRITE,
// HSIZE, HWDATA, HREADY (all driven from here except HCLK), HRDATA and
// HREADYOUT. Signals are driven and sampled at the falling clock edge; the
// slave samples at the rising edge. Each task leaves the bus idle.

// Single write: address phase, then data phase.
task automatic ahb_write(input logic [31:0] addr, input logic [31:0] data);
  @(negedge HCLK);
  HSEL = 1'b1; HTRANS = 2'b10; HWRITE = 1'b1; HSIZE = 3'b010; HADDR = addr;
  @(negedge HCLK);
  HSEL = 1'b0; HTRANS = 2'b00; HWRITE = 1'b0; HWDATA = data;
endtask

// Single read: address phase, then data phase; HRDATA sampled in it.
task automatic ahb_read(input logic [31:0] addr, output logic [31:0] data);
  @(negedge HCLK);
  HSEL = 1'b1; HTRANS = 2'b10; HWRITE = 1'b0; HSIZE = 3'b010; HADDR = addr;
  @(negedge HCLK);
  HSEL = 1'b0; HTRANS = 2'b00;
  data = HRDATA;
endtask

// Write immediately followed by a read, pipelined: the read's address
// phase overlaps the write's data phase. Three bus cycles in all.
task automatic ahb_write_read(input logic [31:0] waddr, input logic [31:0] wdata,
                              input logic [31:0] raddr, output logic [31:0] rdata,
                              output int cycles);
  @(negedge HCLK);
  HSEL = 1'b1; HTRANS = 2'b10; HWRITE = 1'b1; HSIZE = 3'b010; HADDR = waddr;
  cycles = 1;
  @(negedge HCLK);
  HWDATA = wdata; HWRITE = 1'b0; HADDR = raddr;
  cycles++;
  @(negedge HCLK);
  HSEL = 1'b0; HTRANS = 2'b00;
  cycles++;
  rdata = HRDATA;
endtask

// Two writes back to back, pipelined.
task automatic ahb_write2(input logic [31:0] a0, input logic [31:0] d0,
                          input logic [31:0] a1, input logic [31:0] d1);
  @(negedge HCLK);
  HSEL = 1'b1; HTRANS = 2'b10; HWRITE = 1'b1; HSIZE = 3'b010; HADDR = a0;
  @(negedge HCLK);
  HWDATA = d0; HADDR = a1;
  @(negedge HCLK);
  HSEL = 1'b0; HTRANS = 2'b00; HWRITE = 1'b0; HWDATA = d1;
endtask
