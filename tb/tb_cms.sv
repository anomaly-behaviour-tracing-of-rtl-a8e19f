// tb_cms: self-checking testbench for the continuous monitoring system.
//
// Drives a random instruction stream in which the testbench itself decides
// which instructions are control transfers (it builds each instruction from
// a chosen kind), random performance-event bits, random registers and a
// random ready on the stream output.  A reference model, written only from
// the behaviour described in the cms header, predicts every record (fields
// compared one by one), the record order and each overrun pulse.  Phases with
// long stretches free of control transfers and dense events make counters
// wrap, so the overflow map is exercised; phases with ready held low make
// records collide and be lost.
module tb_cms;
  import cms_pkg::*;

  localparam int NCYC = 20000;

  logic clk = 1'b0;
  logic rst_n;
  logic tr_valid;
  logic [XLEN-1:0] tr_pc;
  logic [ILEN-1:0] tr_instr;
  logic [N_EVENTS-1:0] ev;
  logic [N_GPR-1:0][XLEN-1:0] gpr;
  logic [ITEM_W-1:0] m_tdata;
  logic m_tvalid, m_tready, overrun;

  cms dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_rec = 0, n_ovr = 0, n_wrap = 0, n_cf = 0, n_follow_only = 0;

  // reference model state
  trace_item_t exp_q[$];
  int unsigned ev_cnt [N_EVENTS];
  longint unsigned tick;
  bit follow, held, exp_overrun;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  // Build one instruction of a random kind; cf tells whether it is a branch,
  // jump or return.
  function automatic logic [31:0] make_instr(bit want_cf, output bit cf);
    logic [31:0] r;
    int k;
    r = $urandom();
    cf = want_cf;
    if (want_cf) begin
      k = $urandom_range(0, 7);
      case (k)
        0: r[6:0] = 7'h63;                                    // branch
        1: r[6:0] = 7'h6f;                                    // jal
        2: r[6:0] = 7'h67;                                    // jalr
        3: r = {16'h0, 3'b101, r[12:2], 2'b01};               // c.j
        4: r = {16'h0, 3'b110, r[12:2], 2'b01};               // c.beqz
        5: r = {16'h0, 3'b111, r[12:2], 2'b01};               // c.bnez
        6: r = {16'h0, 3'b100, 1'b0, 5'd1, 5'd0, 2'b10};      // c.jr ra (ret)
        default: r = {16'h0, 3'b100, 1'b1, 5'd5, 5'd0, 2'b10}; // c.jalr t0
      endcase
    end else begin
      k = $urandom_range(0, 7);
      case (k)
        0: r[6:0] = 7'h13;                                    // op-imm
        1: r[6:0] = 7'h33;                                    // op
        2: r[6:0] = 7'h03;                                    // load
        3: r[6:0] = 7'h23;                                    // store
        4: r[6:0] = 7'h37;                                    // lui
        5: r = {16'h0, 3'(r[15:13] % 5), r[12:2], 2'b01};     // c.addi .. c.lui etc
        6: r = {16'h0, 3'b100, 1'b0, 5'd10, 5'd11, 2'b10};    // c.mv a0,a1
        default: r = {16'h0, r[15:2], 2'b00};                 // quadrant 0
      endcase
    end
    return r;
  endfunction

  initial begin
    repeat (NCYC + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int phase;
    bit cf, collect, freeslot;
    trace_item_t e, got;
    rst_n = 1'b0; tr_valid = 1'b0; tr_pc = '0; tr_instr = '0; ev = '0; gpr = '0; m_tready = 1'b0;
    foreach (ev_cnt[i]) ev_cnt[i] = 0;
    tick = 0; follow = 0; held = 0; exp_overrun = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCYC; c++) begin
      if (c != 0) @(negedge clk);
      phase = (c / 1000) % 4;
      // checks on the outputs registered at the last edge
      check(overrun == exp_overrun, "overrun flag");
      check(m_tvalid == held, "m_tvalid");
      // new inputs for this cycle
      tr_valid = ($urandom_range(0, 99) < 70);
      tr_pc    = {$urandom(), $urandom()} & ~64'h1;
      case (phase)
        1: tr_instr = make_instr(($urandom_range(0, 999) < 3), cf);   // long runs, counters wrap
        default: tr_instr = make_instr(($urandom_range(0, 99) < 25), cf);
      endcase
      for (int i = 0; i < N_EVENTS; i++)
        ev[i] = (phase == 1) ? ($urandom_range(0, 9) < 8) : ($urandom_range(0, 9) < 2);
      for (int r = 8; r < 16; r++) gpr[r] = {$urandom(), $urandom()};
      m_tready = (phase == 3) ? ($urandom_range(0, 9) < 1) : ($urandom_range(0, 9) < 8);
      // stream handshake at the coming edge
      if (m_tvalid && m_tready) begin
        got = trace_item_t'(m_tdata);
        if (exp_q.size() == 0) begin
          check(0, "record without expectation");
        end else begin
          e = exp_q.pop_front();
          check(got.pc == e.pc, "pc");
          check(got.instr == e.instr, "instr");
          check(got.ticks == e.ticks, $sformatf("ticks got %0d exp %0d", got.ticks, e.ticks));
          check(got.hpc == e.hpc, "hpc");
          check(got.hpc_ovf == e.hpc_ovf, "hpc_ovf");
          check(got.gpr_a == e.gpr_a, "a0..a3");
          check(got.pad == '0, "padding");
          n_rec++;
        end
      end
      // reference model for the coming edge
      tick++;
      for (int i = 0; i < N_EVENTS; i++) ev_cnt[i] += ev[i];
      collect  = tr_valid && (cf || follow);
      freeslot = !held || m_tready;
      if (held && m_tready) held = 0;
      exp_overrun = collect && !freeslot;
      if (tr_valid) begin
        if (!cf && follow) n_follow_only++;
        if (cf) n_cf++;
        follow = cf;
      end
      if (collect && freeslot) begin
        e = '0;
        e.pc = tr_pc; e.instr = tr_instr; e.ticks = tick;
        for (int i = 0; i < N_EVENTS; i++) begin
          e.hpc[i] = 7'(ev_cnt[i] % 128);
          e.hpc_ovf[i] = (ev_cnt[i] >= 128);
          if (ev_cnt[i] >= 128) n_wrap++;
          ev_cnt[i] = 0;
        end
        for (int r = 0; r < 4; r++) e.gpr_a[r] = gpr[10 + r];
        exp_q.push_back(e);
        tick = 0;
        held = 1;
      end
      if (exp_overrun) n_ovr++;
    end
    @(negedge clk);
    $display("records=%0d overruns=%0d wrapped_counters=%0d cf=%0d followers=%0d",
             n_rec, n_ovr, n_wrap, n_cf, n_follow_only);
    check(n_rec > 1000, "enough records");
    check(n_ovr > 0, "overrun seen");
    check(n_wrap > 0, "counter wrap seen");
    check(n_follow_only > 0, "follower collected");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
