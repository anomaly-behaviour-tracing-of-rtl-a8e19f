// tb_pynq_wrapper: end-to-end testbench for the whole wrapper at its default
// parameters (2048-record trace FIFO, 64-character console FIFOs, 128 KiB
// program memory).
//
// The testbench plays both the processor and the software on the ARM side:
//   1. software loads a 256-word "program" through memory port B and the
//      processor side reads it back through port A;
//   2. software types an input line through the console GPIO lines, the
//      processor reads it, and the processor prints characters that software
//      reads back through GPIO, all while the program runs;
//   3. the processor runs a program of about 1300 collected trace records
//      (the size of one run of the test program the design was built for),
//      including one stretch long enough for event counters to wrap;
//   4. software starts the DMA for all records in the trace FIFO, and the
//      records found in the destination buffer are compared field by field
//      with a reference model of the monitoring rules;
//   5. a second run collects more records than the FIFO holds, with the DMA
//      idle: the FIFO fills, later records are lost (overrun), and a DMA of
//      2049 records returns exactly the first 2049 of that run.
// Each mechanism (filter hit on a branch/jump/return, on a follower, counter
// wrap, FIFO full, overrun, DMA transfer, console read and write strobes,
// program load) is counted, and one that never happened is a failure.
module tb_pynq_wrapper;
  import cms_pkg::*;

  localparam int TDEPTH = 2048;
  localparam int BEATS  = ITEM_W / 64;

  logic clk = 1'b0, rst_n;
  logic tr_valid;
  logic [XLEN-1:0] tr_pc;
  logic [ILEN-1:0] tr_instr;
  logic [N_EVENTS-1:0] tr_ev;
  logic [N_GPR-1:0][XLEN-1:0] tr_gpr;
  logic mem_a_en; logic [7:0] mem_a_we; logic [13:0] mem_a_addr; logic [63:0] mem_a_wdata, mem_a_rdata;
  logic [7:0] con_out_char, con_in_char, ps_out_char, ps_in_char;
  logic con_out_valid, con_out_ready, con_in_valid, con_in_ready;
  logic ps_out_avail, ps_out_rd, ps_in_wr, ps_in_full;
  logic [6:0] ps_out_count, ps_in_count;
  logic ps_b_en; logic [7:0] ps_b_we; logic [13:0] ps_b_addr; logic [63:0] ps_b_wdata, ps_b_rdata;
  logic dma_start, dma_busy, dma_done;
  logic [31:0] dma_dst_addr, hp_awaddr;
  logic [15:0] dma_n_items, dma_items_done;
  logic [7:0] hp_awlen, hp_wstrb;
  logic [2:0] hp_awsize;
  logic [1:0] hp_awburst, hp_bresp;
  logic hp_awvalid, hp_awready, hp_wlast, hp_wvalid, hp_wready, hp_bvalid, hp_bready;
  logic [63:0] hp_wdata;
  logic dma_error;
  int axi_errs, n_bursts;
  logic [11:0] trace_count;
  logic cms_overrun;

  pynq_wrapper dut (.*);

  // PS memory behind the HP port
  axi_mem_model u_mem (
    .clk, .rst_n,
    .awaddr(hp_awaddr), .awlen(hp_awlen), .awsize(hp_awsize), .awburst(hp_awburst),
    .awvalid(hp_awvalid), .awready(hp_awready),
    .wdata(hp_wdata), .wstrb(hp_wstrb), .wlast(hp_wlast), .wvalid(hp_wvalid), .wready(hp_wready),
    .bresp(hp_bresp), .bvalid(hp_bvalid), .bready(hp_bready),
    .resp_err(1'b0), .ready_pct(90), .proto_errs(axi_errs), .n_bursts(n_bursts)
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  // mechanism counters
  int m_cf = 0, m_follow = 0, m_wrap = 0, m_full = 0, m_overrun = 0, m_dma = 0;
  int m_con_rd = 0, m_con_wr = 0, m_load = 0, m_cpu_in = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (trace_count == 12'(TDEPTH)) m_full++;
  always @(posedge clk) begin
    cyc++;
    if (!rst_n) last_take = cyc;
  end
  always @(posedge clk) if (rst_n && cms_overrun) m_overrun++;

  // ---------------- console: processor side ----------------
  logic [7:0] printed[$], typed[$];
  bit cpu_print = 0, hs_out;
  always @(posedge clk) begin
    hs_out = rst_n && con_out_valid && con_out_ready;
    if (hs_out) printed.push_back(con_out_char);
    if (rst_n && con_in_valid && con_in_ready) begin
      check(typed.size() > 0 && typed[0] == con_in_char, "processor console input");
      if (typed.size() > 0) void'(typed.pop_front());
      m_cpu_in++;
    end
  end
  always @(negedge clk) begin
    if (!con_out_valid || hs_out) begin
      con_out_valid <= cpu_print && ($urandom_range(0, 99) < 5);
      con_out_char  <= 8'($urandom_range(32, 126));
    end
    con_in_ready <= ($urandom_range(0, 9) < 3);
  end

  // ---------------- console: software side ----------------
  bit sw_console = 0;
  initial begin
    ps_out_rd = 0; ps_in_wr = 0; ps_in_char = 0;
    forever begin
      @(negedge clk);
      if (sw_console && ps_out_avail) begin
        check(printed.size() > 0 && printed[0] == ps_out_char, "software console output");
        if (printed.size() > 0) void'(printed.pop_front());
        ps_out_rd = 1;
        repeat (3) @(negedge clk);
        ps_out_rd = 0;
        repeat (2) @(negedge clk);
        m_con_rd++;
      end
    end
  end

  task automatic type_line(string s);
    for (int i = 0; i < s.len(); i++) begin
      while (ps_in_full) @(negedge clk);
      ps_in_char = s[i];
      typed.push_back(s[i]);
      ps_in_wr = 1;
      repeat (3) @(negedge clk);
      ps_in_wr = 0;
      repeat (2) @(negedge clk);
      m_con_wr++;
    end
  endtask

  // ---------------- trace reference model ----------------
  trace_item_t exp_q[$];
  int unsigned ev_cnt [N_EVENTS];
  longint unsigned cyc = 0, last_take = 0;   // rising-edge index; edge of the last record or reset
  bit follow;
  int collected_run;   // records due in this run, kept or lost
  int taken_run;       // records accepted by the CMS in this run
  int keep_limit;      // records the pipeline can hold before loss

  function automatic logic [31:0] make_instr(bit want_cf);
    logic [31:0] r;
    r = $urandom();
    if (want_cf) begin
      case ($urandom_range(0, 4))
        0: r[6:0] = 7'h63;
        1: r[6:0] = 7'h6f;
        2: r = 32'h0000_8067;                                  // ret
        3: r = {16'h0, 3'b110, r[12:2], 2'b01};                // c.beqz
        default: r = {16'h0, 3'b100, 1'b0, 5'd1, 5'd0, 2'b10}; // c.jr ra
      endcase
    end else begin
      case ($urandom_range(0, 3))
        0: r[6:0] = 7'h13;
        1: r[6:0] = 7'h03;
        2: r[6:0] = 7'h23;
        default: r = {16'h0, 3'b010, r[12:2], 2'b01};          // c.li
      endcase
    end
    return r;
  endfunction

  // one processor cycle; instruction issued with probability, cf chance in permille
  task automatic cpu_cycle(int cf_pm, int ev_pct);
    bit cf, collect;
    tr_valid = ($urandom_range(0, 99) < 75);
    cf = ($urandom_range(0, 999) < cf_pm);
    tr_instr = make_instr(cf);
    tr_pc = 64'h8000_0000 + 64'($urandom_range(0, 4095) * 4);
    for (int i = 0; i < N_EVENTS; i++) tr_ev[i] = ($urandom_range(0, 99) < ev_pct);
    for (int r = 10; r < 14; r++) tr_gpr[r] = {$urandom(), $urandom()};
    for (int i = 0; i < N_EVENTS; i++) ev_cnt[i] += tr_ev[i];
    collect = tr_valid && (cf || follow);
    if (tr_valid) begin
      if (collect && !cf) m_follow++;
      if (collect && cf) m_cf++;
      follow = cf;
    end
    if (collect) collected_run++;
    if (collect && taken_run < keep_limit) begin
      trace_item_t e;
      e = '0;
      e.pc = tr_pc; e.instr = tr_instr; e.ticks = (cyc + 1) - last_take;
      for (int i = 0; i < N_EVENTS; i++) begin
        e.hpc[i] = 7'(ev_cnt[i] % 128);
        e.hpc_ovf[i] = (ev_cnt[i] >= 128);
        if (ev_cnt[i] >= 128) m_wrap++;
        ev_cnt[i] = 0;
      end
      for (int r = 0; r < 4; r++) e.gpr_a[r] = tr_gpr[10 + r];
      exp_q.push_back(e);
      last_take = cyc + 1;
      taken_run++;
    end
    @(negedge clk);
  endtask

  task automatic reset_model();
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    follow = 0; taken_run = 0; collected_run = 0;
    exp_q.delete();
  endtask

  // run the program until n records have been collected
  task automatic run_program(int n);
    int stretch_at;
    stretch_at = n / 2;
    while (collected_run < n) begin
      if (collected_run >= stretch_at && stretch_at >= 0) begin
        repeat (400) cpu_cycle(0, 60);     // long straight-line stretch: counters wrap
        stretch_at = -1;
      end
      cpu_cycle(60, 10);
    end
    tr_valid = 0; tr_ev = '0;
  endtask

  // start a DMA of n records to dst and compare the buffer with the model
  task automatic dma_and_check(int n, logic [31:0] dst, int first);
    trace_item_t got, e;
    logic [ITEM_W-1:0] raw;
    dma_start = 1; dma_n_items = 16'(n); dma_dst_addr = dst;
    @(negedge clk);
    dma_start = 0;
    while (!dma_done) @(negedge clk);
    m_dma++;
    check(dma_items_done == 16'(n), "DMA record count");
    check(!dma_error && axi_errs == 0, "AXI writes clean");
    for (int j = 0; j < n; j++) begin
      for (int k = 0; k < BEATS; k++) raw[k*64 +: 64] = u_mem.mem[longint'(dst) + j*128 + k*8];
      got = trace_item_t'(raw);
      e = exp_q[first + j];
      check(got == e, $sformatf("record %0d", first + j));
      if (got.ticks != e.ticks && failures < 20)
        $display("  ticks got %0d exp %0d", got.ticks, e.ticks);
    end
  endtask

  initial begin
    logic [63:0] prog [256];
    rst_n = 0; tr_valid = 0; tr_pc = 0; tr_instr = 0; tr_ev = 0; tr_gpr = '0;
    mem_a_en = 0; mem_a_we = 0; mem_a_addr = 0; mem_a_wdata = 0;
    ps_b_en = 0; ps_b_we = 0; ps_b_addr = 0; ps_b_wdata = 0;
    dma_start = 0; dma_n_items = 0; dma_dst_addr = 0;
    con_out_valid = 0; con_out_char = 0; con_in_ready = 0;
    reset_model();
    keep_limit = 1 << 30;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // 1. program load through port B, read back through port A
    for (int i = 0; i < 256; i++) begin
      prog[i] = {$urandom(), $urandom()};
      ps_b_en = 1; ps_b_we = 8'hff; ps_b_addr = 14'(i); ps_b_wdata = prog[i];
      @(negedge clk);
      m_load++;
    end
    ps_b_en = 0; ps_b_we = 0;
    for (int i = 0; i < 256; i++) begin
      mem_a_en = 1; mem_a_addr = 14'(i);
      @(negedge clk);
      check(mem_a_rdata == prog[i], "program fetch through port A");
    end
    mem_a_en = 0;

    // 2. input line typed before the run; console active during the run
    sw_console = 1;
    type_line("==========");
    cpu_print = 1;

    // 3. first run: ~1300 records; model counts from reset, like the CMS
    run_program(1300);
    repeat (20) @(negedge clk);
    check(int'(trace_count) == exp_q.size(), $sformatf("FIFO holds %0d records, model %0d",
          trace_count, exp_q.size()));

    // 4. DMA the whole run out
    dma_and_check(exp_q.size(), 32'h1800_0000, 0);
    check(trace_count == 0, "FIFO empty after DMA");

    // 5. overfilling run: FIFO plus the CMS output register hold TDEPTH+1
    cpu_print = 0;
    reset_model();
    keep_limit = TDEPTH + 1;
    // restart the monitor so that its counters and the model start together
    repeat (2) @(negedge clk);
    rst_n = 0;
    @(negedge clk);
    rst_n = 1;
    run_program(TDEPTH + 200);
    repeat (20) @(negedge clk);
    check(trace_count == 12'(TDEPTH), "FIFO full");
    dma_and_check(TDEPTH + 1, 32'h1900_0000, 0);

    // let the console drain
    repeat (2000) @(negedge clk);
    check(typed.size() == 0, "processor consumed typed line");

    $display("cf=%0d follow=%0d wrap=%0d full_cycles=%0d overrun=%0d dma=%0d con_rd=%0d con_wr=%0d cpu_in=%0d load=%0d",
             m_cf, m_follow, m_wrap, m_full, m_overrun, m_dma, m_con_rd, m_con_wr, m_cpu_in, m_load);
    check(m_cf > 0, "filter: control transfer collected");
    check(m_follow > 0, "filter: follower collected");
    check(m_wrap > 0, "event counter wrapped");
    check(m_full > 0, "trace FIFO full");
    check(m_overrun > 0, "record lost on overrun");
    check(m_dma == 2, "DMA transfers");
    check(m_con_rd > 0 && m_con_wr > 0 && m_cpu_in > 0, "console traffic");
    check(m_load > 0, "program load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
