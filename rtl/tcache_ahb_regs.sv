// tcache_ahb_regs: AHB-Lite slave register interface of the translation-
// cache hardware manager.
//
// The processor reaches the look-up table only through memory-mapped
// registers on an AMBA 3 AHB-Lite bus, as the document describes; the
// register map itself (see tcache_pkg) is this design's choice:
//   write QUERY   -> a look-up of HWDATA[SRC_W-1:0] ('q_valid' pulse)
//   read  QUERY   -> target address of the last look-up, 0 on a miss
//   write SRC_NEW -> source PC of the next entry
//   write TGT_NEW -> inserts (SRC_NEW, HWDATA) ('ins_valid' pulse)
//   write CTRL    -> bit 0 = 1 flushes the table ('flush' pulse)
//
// Timing: no wait states (HREADYOUT = 1, HRESP = OKAY). The address phase
// is registered; the write data is acted on in the data phase, so the
// look-up, the insert or the flush takes place in the data-phase cycle and
// the table changes at its closing edge. The look-up result is registered
// in the table, so a read of QUERY whose address phase overlaps the data
// phase of the QUERY write returns the new result: a write-then-read pair
// answers in three bus cycles, one of them the one-cycle look-up. HRDATA is
// driven in the read's data phase from registers only.
// Only word transfers are supported (checked by an assertion); unused bits
// read 0. HADDR[31:4] is not decoded (HSEL selects the slave) and
// HTRANS[0] is not needed (SEQ and NONSEQ are treated alike). The
// assertions sample HRESETn at the clock, so lint reports the reset as used
// both synchronously and asynchronously; that use is in checking code only.
module tcache_ahb_regs #(
  parameter int unsigned SRC_W = tcache_pkg::DEFAULT_SRC_W,
  parameter int unsigned TGT_W = tcache_pkg::DEFAULT_TGT_W
) (
  input  logic             HCLK,
  input  logic             HRESETn,
  // AHB-Lite slave port
  input  logic             HSEL,
  input  logic [31:0]      HADDR,
  input  logic [1:0]       HTRANS,
  input  logic             HWRITE,
  input  logic [2:0]       HSIZE,
  input  logic [31:0]      HWDATA,
  input  logic             HREADY,
  output logic [31:0]      HRDATA,
  output logic             HREADYOUT,
  output logic             HRESP,
  // to / from the look-up table
  output logic             flush,
  output logic             ins_valid,
  output logic [SRC_W-1:0] ins_src,
  output logic [TGT_W-1:0] ins_tgt,
  output logic             q_valid,
  output logic [SRC_W-1:0] q_src,
  input  logic [TGT_W-1:0] res_tgt
);

  import tcache_pkg::*;

  // Address phase, registered into the data phase.
  logic        dp_active;
  logic        dp_write;
  tcache_reg_e dp_reg;

  logic        ap_active;
  assign ap_active = HSEL && HREADY && HTRANS[1];

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_active <= 1'b0;
      dp_write  <= 1'b0;
      dp_reg    <= REG_QUERY;
    end else if (HREADY) begin
      dp_active <= ap_active;
      dp_write  <= HWRITE;
      dp_reg    <= tcache_reg_e'(HADDR[3:2]);
    end
  end

  logic wr;
  assign wr = dp_active && dp_write;

  // Registers.
  logic [SRC_W-1:0] src_new;
  logic [TGT_W-1:0] tgt_last;

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      src_new  <= '0;
      tgt_last <= '0;
    end else if (wr) begin
      if (dp_reg == REG_SRC_NEW) src_new  <= HWDATA[SRC_W-1:0];
      if (dp_reg == REG_TGT_NEW) tgt_last <= HWDATA[TGT_W-1:0];
    end
  end

  // Controls to the table, all in the write's data phase.
  assign q_valid   = wr && (dp_reg == REG_QUERY);
  assign q_src     = HWDATA[SRC_W-1:0];
  assign ins_valid = wr && (dp_reg == REG_TGT_NEW);
  assign ins_src   = src_new;
  assign ins_tgt   = HWDATA[TGT_W-1:0];
  assign flush     = wr && (dp_reg == REG_CTRL) && HWDATA[CTRL_FLUSH_BIT];

  // Read data.
  always_comb begin
    HRDATA = '0;
    if (dp_active && !dp_write) begin
      unique case (dp_reg)
        REG_QUERY:   HRDATA[TGT_W-1:0] = res_tgt;
        REG_SRC_NEW: HRDATA[SRC_W-1:0] = src_new;
        REG_TGT_NEW: HRDATA[TGT_W-1:0] = tgt_last;
        REG_CTRL:    HRDATA            = '0;
      endcase
    end
  end

  assign HREADYOUT = 1'b1;
  assign HRESP     = HRESP_OKAY;

  // Bus rules this slave relies on.
  a_word_only: assert property (@(posedge HCLK)
    (HRESETn && ap_active) |-> (HSIZE == HSIZE_WORD))
    else $error("tcache_ahb_regs: only word transfers are supported");
  a_aligned: assert property (@(posedge HCLK)
    (HRESETn && ap_active) |-> (HADDR[1:0] == 2'b00))
    else $error("tcache_ahb_regs: unaligned address");

endmodule
