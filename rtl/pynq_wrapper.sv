// pynq_wrapper: programmable-logic side of a trace-monitoring system for a
// 64-bit CHERI RISC-V core.
//
// The core itself sits outside this module; its exported signals arrive on
// the tr_* ports (one instruction per tr_valid as it leaves pipeline stage 1,
// 39 performance-event bits, the 32 integer registers), its memory bus on
// the mem_a_* ports and its console on the con_* ports.  Inside:
//
//   cms        filters the trace down to branches, jumps and returns plus
//              the instruction after each, and builds 1024-bit records with
//              event counts, tick count and a0..a3
//   axis_fifo  trace FIFO, TRACE_DEPTH records, filled by the CMS
//   dma_s2mm   on software request, drains records from the FIFO into a
//              contiguous buffer in PS memory, one AXI4 burst per record
//              on the hp_* write channels
//   console_io output and input character FIFOs, driven by software through
//              edge-detected GPIO lines (ps_out_*, ps_in_*)
//   bram_tdp   program memory; port A to the core, port B (ps_b_*) to the
//              software loader
//
// The dma_* ports are the DMA's control registers as software sees them.
// All logic runs on one clock; reset is active-low and synchronous.  The
// partitioning and the data path follow the document; port names and the
// simple handshakes at the edges are this design's own.
module pynq_wrapper
  import cms_pkg::*;
#(
  parameter int unsigned TRACE_DEPTH = 2048,
  parameter int unsigned CON_DEPTH   = 64,
  parameter int unsigned MEM_AW      = 14,
  parameter int unsigned HP_W        = 64,
  parameter int unsigned PA_W        = 32,
  parameter int unsigned LEN_W       = 16,
  localparam int unsigned TCW        = $clog2(TRACE_DEPTH + 1),
  localparam int unsigned CCW        = $clog2(CON_DEPTH + 1)
) (
  input  logic                        clk,
  input  logic                        rst_n,
  // processor trace
  input  logic                        tr_valid,
  input  logic [XLEN-1:0]             tr_pc,
  input  logic [ILEN-1:0]             tr_instr,
  input  logic [N_EVENTS-1:0]         tr_ev,
  input  logic [N_GPR-1:0][XLEN-1:0]  tr_gpr,
  // processor memory port (port A)
  input  logic                        mem_a_en,
  input  logic [7:0]                  mem_a_we,
  input  logic [MEM_AW-1:0]           mem_a_addr,
  input  logic [63:0]                 mem_a_wdata,
  output logic [63:0]                 mem_a_rdata,
  // processor console
  input  logic [7:0]                  con_out_char,
  input  logic                        con_out_valid,
  output logic                        con_out_ready,
  output logic [7:0]                  con_in_char,
  output logic                        con_in_valid,
  input  logic                        con_in_ready,
  // PS: console GPIO
  output logic [7:0]                  ps_out_char,
  output logic                        ps_out_avail,
  output logic [CCW-1:0]              ps_out_count,
  input  logic                        ps_out_rd,
  input  logic [7:0]                  ps_in_char,
  input  logic                        ps_in_wr,
  output logic                        ps_in_full,
  output logic [CCW-1:0]              ps_in_count,
  // PS: program loader (port B)
  input  logic                        ps_b_en,
  input  logic [7:0]                  ps_b_we,
  input  logic [MEM_AW-1:0]           ps_b_addr,
  input  logic [63:0]                 ps_b_wdata,
  output logic [63:0]                 ps_b_rdata,
  // PS: DMA control
  input  logic                        dma_start,
  input  logic [PA_W-1:0]             dma_dst_addr,
  input  logic [LEN_W-1:0]            dma_n_items,
  output logic                        dma_busy,
  output logic                        dma_done,
  output logic                        dma_error,
  output logic [LEN_W-1:0]            dma_items_done,
  // PS: AXI4 write channels into the high-performance port (HP0)
  output logic [PA_W-1:0]             hp_awaddr,
  output logic [7:0]                  hp_awlen,
  output logic [2:0]                  hp_awsize,
  output logic [1:0]                  hp_awburst,
  output logic                        hp_awvalid,
  input  logic                        hp_awready,
  output logic [HP_W-1:0]             hp_wdata,
  output logic [HP_W/8-1:0]           hp_wstrb,
  output logic                        hp_wlast,
  output logic                        hp_wvalid,
  input  logic                        hp_wready,
  input  logic [1:0]                  hp_bresp,
  input  logic                        hp_bvalid,
  output logic                        hp_bready,
  // status
  output logic [TCW-1:0]              trace_count,
  output logic                        cms_overrun
);

  logic [ITEM_W-1:0] cms_tdata, fifo_tdata;
  logic              cms_tvalid, cms_tready, fifo_tvalid, fifo_tready;

  cms u_cms (
    .clk, .rst_n,
    .tr_valid, .tr_pc, .tr_instr, .ev(tr_ev), .gpr(tr_gpr),
    .m_tdata(cms_tdata), .m_tvalid(cms_tvalid), .m_tready(cms_tready),
    .overrun(cms_overrun)
  );

  axis_fifo #(.WIDTH(ITEM_W), .DEPTH(TRACE_DEPTH)) u_trace_fifo (
    .clk, .rst_n,
    .s_tdata(cms_tdata),  .s_tvalid(cms_tvalid),  .s_tready(cms_tready),
    .m_tdata(fifo_tdata), .m_tvalid(fifo_tvalid), .m_tready(fifo_tready),
    .count(trace_count)
  );

  dma_s2mm #(.ITEM_W(ITEM_W), .MM_W(HP_W), .ADDR_W(PA_W), .LEN_W(LEN_W)) u_dma (
    .clk, .rst_n,
    .start(dma_start), .dst_addr(dma_dst_addr), .n_items(dma_n_items),
    .busy(dma_busy), .done(dma_done), .err(dma_error), .items_done(dma_items_done),
    .s_tdata(fifo_tdata), .s_tvalid(fifo_tvalid), .s_tready(fifo_tready),
    .awaddr(hp_awaddr), .awlen(hp_awlen), .awsize(hp_awsize), .awburst(hp_awburst),
    .awvalid(hp_awvalid), .awready(hp_awready),
    .wdata(hp_wdata), .wstrb(hp_wstrb), .wlast(hp_wlast), .wvalid(hp_wvalid), .wready(hp_wready),
    .bresp(hp_bresp), .bvalid(hp_bvalid), .bready(hp_bready)
  );

  console_io #(.DEPTH(CON_DEPTH)) u_console (
    .clk, .rst_n,
    .con_out_char, .con_out_valid, .con_out_ready,
    .con_in_char, .con_in_valid, .con_in_ready,
    .ps_out_char, .ps_out_avail, .ps_out_count, .ps_out_rd,
    .ps_in_char, .ps_in_wr, .ps_in_full, .ps_in_count
  );

  bram_tdp #(.DATA_W(64), .ADDR_W(MEM_AW)) u_mem (
    .clk,
    .a_en(mem_a_en), .a_we(mem_a_we), .a_addr(mem_a_addr), .a_wdata(mem_a_wdata), .a_rdata(mem_a_rdata),
    .b_en(ps_b_en),  .b_we(ps_b_we),  .b_addr(ps_b_addr),  .b_wdata(ps_b_wdata),  .b_rdata(ps_b_rdata)
  );

endmodule
