// cms: continuous monitoring system.
//
// Watches the instruction stream of the processor as each instruction moves
// from pipeline stage 1 to stage 2 (tr_valid high for one cycle per
// instruction) and keeps only the instructions that matter for control-flow
// profiling: every branch, jump or return (32-bit or compressed form) and the
// one instruction that follows each of them.  For each kept instruction it
// builds a 1024-bit record (layout in cms_pkg) and offers it on an
// AXI4-Stream master port.
//
// Alongside the filter it runs one 7-bit counter per performance event
// (ev[i] high = event i happens this cycle) and a 64-bit cycle counter.  A
// record carries the counts for the cycles after the previous record up to
// and including its own cycle; the counters then restart from zero.  An event
// counter that wraps past 127 sets its bit in the overflow map, so software
// knows the count is only known modulo 128.  Registers a0..a3 are sampled from
// gpr[] in the record's cycle.
//
// Timing: the record appears on m_tdata/m_tvalid the cycle after the
// instruction's tr_valid.  One record is held until m_tready.  If a new record
// is due while the held one is still waiting, the new one is lost, overrun
// pulses for a cycle, and its counts are not cleared, so they fold into the
// next record that is taken.  Reset is active-low and synchronous; the last
// reset cycle counts as the previous collection, so the first record's tick
// count is the number of cycles since reset was released, plus one.
//
// From the document: the filter rule, the 39 counters of 7 bits, the
// overflow map, the 64-bit tick count, a0..a3 and the 1024-bit record.  This
// design's own choices: the record layout, the one-record output register,
// the loss-on-overrun rule and the point in time at which counts are cut.
module cms
  import cms_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  // trace from the processor
  input  logic                          tr_valid,
  input  logic [XLEN-1:0]               tr_pc,
  input  logic [ILEN-1:0]               tr_instr,
  input  logic [N_EVENTS-1:0]           ev,
  input  logic [N_GPR-1:0][XLEN-1:0]    gpr,
  // AXI4-Stream master
  output logic [ITEM_W-1:0]             m_tdata,
  output logic                          m_tvalid,
  input  logic                          m_tready,
  // status
  output logic                          overrun
);

  logic                         follow_q;     // previous instruction was a control transfer
  logic [N_EVENTS-1:0][HPC_W-1:0] cnt_q;
  logic [N_EVENTS-1:0]          ovf_q;
  logic [TICK_W-1:0]            tick_q;
  trace_item_t                  item_q, item_d;

  logic is_cf, collect, slot_free, take;
  logic [N_EVENTS-1:0][HPC_W:0] sum;

  always_comb begin
    is_cf     = is_ctrl_xfer(tr_instr);
    collect   = tr_valid && (is_cf || follow_q);
    slot_free = !m_tvalid || m_tready;
    take      = collect && slot_free;
    for (int i = 0; i < N_EVENTS; i++) begin
      sum[i] = {1'b0, cnt_q[i]} + {{HPC_W{1'b0}}, ev[i]};
    end
    item_d         = '0;
    item_d.pc      = tr_pc;
    item_d.instr   = tr_instr;
    item_d.ticks   = tick_q;
    for (int i = 0; i < N_EVENTS; i++) begin
      item_d.hpc[i]     = sum[i][HPC_W-1:0];
      item_d.hpc_ovf[i] = ovf_q[i] | sum[i][HPC_W];
    end
    for (int r = 0; r < N_ARGREGS; r++) begin
      item_d.gpr_a[r] = gpr[ARG_BASE + r];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      follow_q <= 1'b0;
      cnt_q    <= '0;
      ovf_q    <= '0;
      tick_q   <= TICK_W'(1);   // reset counts as a collection point
      item_q   <= '0;
      m_tvalid <= 1'b0;
      overrun  <= 1'b0;
    end else begin
      if (tr_valid) follow_q <= is_cf;
      overrun <= collect && !slot_free;
      if (take) begin
        cnt_q  <= '0;
        ovf_q  <= '0;
        tick_q <= TICK_W'(1);
        item_q <= item_d;
      end else begin
        for (int i = 0; i < N_EVENTS; i++) begin
          cnt_q[i] <= sum[i][HPC_W-1:0];
          ovf_q[i] <= ovf_q[i] | sum[i][HPC_W];
        end
        tick_q <= tick_q + TICK_W'(1);
      end
      if (take)          m_tvalid <= 1'b1;
      else if (m_tready) m_tvalid <= 1'b0;
    end
  end

  assign m_tdata = item_q;

endmodule
