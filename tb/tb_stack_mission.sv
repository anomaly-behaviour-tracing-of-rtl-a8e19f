// tb_stack_mission: the trace-collection workload the design was built
// for, run through the whole wrapper at its default parameters.
//
// The testbench stands in for both the processor and the software on the
// ARM side.  The processor side is a small control-flow model of a
// vulnerable "cookie" program: it reads a line from the console, parses it
// cookie by cookie ('-', '=' or a pair of characters classified by a
// hand-written isxdigit with four outcomes), and finally calls a function
// through a pointer that is normally no_cookies but that a crafted input
// (a run of '=' followed by an address) redirects to success at
// 0x800002A4.  Each modelled instruction is presented on the trace port;
// basic blocks are straight-line code ending in a branch, jump, call or
// return.
//
// The software side types each input line through the console GPIO lines,
// reads the program's reply, and after each run drains the trace FIFO with
// the DMA.  It then checks that the records hold exactly the PCs the filter
// rule selects, and runs the detection the design feeds: every window of 10
// consecutive collected PCs (10-grams) from 10 training runs goes into a
// set; a window of the test run not in the set is an anomaly.  Expected
// results: training inputs (200 cookies, every cookie type followed by every
// type, split into 10 lines of 20) show no anomaly against themselves, the
// crafted input shows anomalies, several of its PCs fall inside success and
// none inside no_cookies.
module tb_stack_mission;
  import cms_pkg::*;

  localparam int BEATS = ITEM_W / 64;
  // code layout of the modelled program
  localparam logic [63:0] MAIN      = 64'h8000_0000;
  localparam logic [63:0] READLOOP  = 64'h8000_0040;
  localparam logic [63:0] PARSE     = 64'h8000_0100;
  localparam logic [63:0] DASH      = 64'h8000_0180;
  localparam logic [63:0] EQUAL     = 64'h8000_0190;
  localparam logic [63:0] LOOPEND   = 64'h8000_0200;
  localparam logic [63:0] SUCCESS   = 64'h8000_02A4;
  localparam logic [63:0] SUCC_END  = 64'h8000_02D0;
  localparam logic [63:0] NOCOOK    = 64'h8000_02E0;
  localparam logic [63:0] NOC_END   = 64'h8000_0310;
  localparam logic [63:0] ISXDIGIT  = 64'h8000_0400;
  localparam logic [63:0] EAT       = 64'h8000_0500;

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

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end


  // ---------------- processor model ----------------
  logic [63:0] exp_pcs[$];      // PCs the filter must select, in order
  bit prev_cf;
  logic [63:0] ra_stack[$];

  task automatic issue(logic [63:0] pc, logic [31:0] ins, bit cf);
    tr_valid = 1; tr_pc = pc; tr_instr = ins;
    for (int i = 0; i < N_EVENTS; i++) tr_ev[i] = ($urandom_range(0, 99) < 5);
    if (cf || prev_cf) exp_pcs.push_back(pc);
    prev_cf = cf;
    @(negedge clk);
    tr_valid = 0; tr_ev = '0;
  endtask

  // straight-line code: n instructions from pc
  task automatic straight(inout logic [63:0] pc, input int n);
    for (int i = 0; i < n; i++) begin
      issue(pc, 32'h0005_0513 | (32'(i) << 20), 0);   // addi a0,a0,i
      pc += 4;
    end
  endtask

  task automatic branch(inout logic [63:0] pc, input bit taken, input logic [63:0] target);
    issue(pc, 32'h0000_0463, 1);
    pc = taken ? target : pc + 4;
  endtask

  task automatic jump(inout logic [63:0] pc, input logic [63:0] target);
    issue(pc, 32'h0000_006f, 1);
    pc = target;
  endtask

  task automatic call(inout logic [63:0] pc, input logic [63:0] target);
    issue(pc, 32'h0000_00ef, 1);               // jal ra
    ra_stack.push_back(pc + 4);
    pc = target;
  endtask

  task automatic icall(inout logic [63:0] pc, input logic [63:0] target);
    issue(pc, 32'h0007_80e7, 1);               // jalr ra, a5
    ra_stack.push_back(pc + 4);
    pc = target;
  endtask

  task automatic ret(inout logic [63:0] pc);
    issue(pc, 32'h0000_8067, 1);
    pc = ra_stack.pop_back();
  endtask

  task automatic putc(byte c);
    con_out_valid = 1; con_out_char = c;
    @(posedge clk);
    while (!con_out_ready) @(posedge clk);
    @(negedge clk);
    con_out_valid = 0;
  endtask

  function automatic int xclass(byte c);     // 0 digit, 1 A-F, 2 a-f, 3 other
    if (c >= "0" && c <= "9") return 0;
    if (c >= "A" && c <= "F") return 1;
    if (c >= "a" && c <= "f") return 2;
    return 3;
  endfunction

  task automatic isxdigit(inout logic [63:0] pc, input byte c);
    int k;
    logic [63:0] p;
    k = xclass(c);
    call(pc, ISXDIGIT);
    p = pc;
    straight(p, 2);
    branch(p, k == 0, ISXDIGIT + 64'h40);
    if (k != 0) begin
      branch(p, k == 1, ISXDIGIT + 64'h50);
      if (k != 1) begin
        branch(p, k == 2, ISXDIGIT + 64'h60);
        if (k != 2) begin straight(p, 3); ret(p); end
      end
    end
    if (k == 0 || k == 1 || k == 2) begin straight(p, 2); ret(p); end
    pc = p;
  endtask

  task automatic run_program(string line, bit crafted);
    logic [63:0] pc;
    byte buffer[$];
    byte c;
    string msg;
    int i;
    prev_cf = 0; ra_stack.delete();
    pc = MAIN;
    straight(pc, 5);
    // read the input line from the console until newline
    call(pc, READLOOP);
    do begin
      straight(pc, 3);
      con_in_ready = 1;
      @(posedge clk);
      while (!con_in_valid) @(posedge clk);
      c = con_in_char;
      @(negedge clk);
      con_in_ready = 0;
      if (c != "\n") buffer.push_back(c);
      branch(pc, c != "\n", READLOOP);
    end while (c != "\n");
    ret(pc);
    // parse cookies
    pc = PARSE - 8;
    call(pc, EAT);
    straight(pc, 2);
    i = 0;
    while (i < buffer.size()) begin
      logic [63:0] p;
      pc = PARSE;
      straight(pc, 3);
      branch(pc, buffer[i] == "-", DASH);
      if (buffer[i] == "-") begin
        straight(pc, 2); jump(pc, LOOPEND); i++;
      end else begin
        branch(pc, buffer[i] == "=", EQUAL);
        if (buffer[i] == "=") begin
          straight(pc, 2); jump(pc, LOOPEND); i++;
        end else begin
          isxdigit(pc, buffer[i]);
          if (i + 1 < buffer.size()) isxdigit(pc, buffer[i + 1]);
          straight(pc, 3); jump(pc, LOOPEND); i += 2;
        end
      end
      straight(pc, 2);
      branch(pc, i < buffer.size(), PARSE);
    end
    ret(pc);
    // call through the (possibly overwritten) function pointer
    straight(pc, 2);
    icall(pc, crafted ? SUCCESS : NOCOOK);
    msg = crafted ? "success\n" : "no cookies\n";
    straight(pc, 3);
    for (int k = 0; k < msg.len(); k++) putc(msg[k]);
    straight(pc, 2);
    ret(pc);
    straight(pc, 4);
  endtask

  // ---------------- software side ----------------
  task automatic type_line(string s);
    for (int i = 0; i < s.len(); i++) begin
      while (ps_in_full) @(negedge clk);
      ps_in_char = s[i];
      ps_in_wr = 1;
      repeat (2) @(negedge clk);
      ps_in_wr = 0;
      repeat (2) @(negedge clk);
    end
  endtask

  string reply;
  initial begin
    reply = "";
    ps_out_rd = 0;
    forever begin
      @(negedge clk);
      if (ps_out_avail) begin
        reply = {reply, string'(ps_out_char)};
        ps_out_rd = 1;
        repeat (2) @(negedge clk);
        ps_out_rd = 0;
        repeat (2) @(negedge clk);
      end
    end
  end

  // drain the FIFO with the DMA and return the collected PCs
  task automatic collect(output logic [63:0] pcs[$]);
    int n;
    logic [ITEM_W-1:0] raw;
    trace_item_t it;
    logic [31:0] dst;
    dst = 32'h1800_0000;
    n = int'(trace_count);
    check(n > 0 && n <= 2048, "run fits in the trace FIFO");
    check(!cms_overrun, "no record lost");
    dma_start = 1; dma_n_items = 16'(n); dma_dst_addr = dst;
    @(negedge clk);
    dma_start = 0;
    while (!dma_done) @(negedge clk);
    check(!dma_error && axi_errs == 0, "AXI writes clean");
    pcs.delete();
    for (int j = 0; j < n; j++) begin
      for (int k = 0; k < BEATS; k++) raw[k*64 +: 64] = u_mem.mem[longint'(dst) + j*128 + k*8];
      it = trace_item_t'(raw);
      pcs.push_back(it.pc);
    end
  endtask

  function automatic string gram(logic [63:0] pcs[$], int at);
    string s = "";
    for (int k = 0; k < 10; k++) s = {s, $sformatf("%h,", pcs[at + k][31:0])};
    return s;
  endfunction

  bit seen [string];
  string train [10];
  string cookie_types [10] = '{"AA", "aA", "Aa", "0A", "A0", "a0", "0a", "00", "-", "="};

  task automatic one_run(string line, bit crafted, output logic [63:0] pcs[$]);
    exp_pcs.delete();
    reply = "";
    fork
      type_line({line, "\n"});
      run_program(line, crafted);
    join
    repeat (200) @(negedge clk);
    check(reply == (crafted ? "success\n" : "no cookies\n"), $sformatf("program reply '%s'", reply));
    collect(pcs);
    check(pcs.size() == exp_pcs.size(), $sformatf("record count %0d expected %0d", pcs.size(), exp_pcs.size()));
    for (int j = 0; j < pcs.size() && j < exp_pcs.size(); j++)
      check(pcs[j] == exp_pcs[j], $sformatf("collected PC %0d", j));
  endtask

  initial begin
    logic [63:0] pcs[$];
    int anomalies, in_success, in_nocook, anom_success, max_items;
    rst_n = 0; tr_valid = 0; tr_pc = 0; tr_instr = 0; tr_ev = 0; tr_gpr = '0;
    mem_a_en = 0; mem_a_we = 0; mem_a_addr = 0; mem_a_wdata = 0;
    ps_b_en = 0; ps_b_we = 0; ps_b_addr = 0; ps_b_wdata = 0;
    dma_start = 0; dma_n_items = 0; dma_dst_addr = 0;
    con_out_valid = 0; con_out_char = 0; con_in_ready = 0;
    ps_in_char = 0; ps_in_wr = 0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // training inputs: each cookie type followed by every type, 200 cookies
    foreach (train[t]) train[t] = "";
    begin
      int cookie;
      cookie = 0;
      for (int a = 0; a < 10; a++)
        for (int b = 0; b < 10; b++) begin
          train[cookie / 20] = {train[cookie / 20], cookie_types[a]};
          train[(cookie + 1) / 20] = {train[(cookie + 1) / 20], cookie_types[b]};
          cookie += 2;
        end
    end

    max_items = 0;
    for (int t = 0; t < 10; t++) begin
      one_run(train[t], 0, pcs);
      if (pcs.size() > max_items) max_items = pcs.size();
      for (int j = 0; j + 10 <= pcs.size(); j++) seen[gram(pcs, j)] = 1;
    end
    $display("training: %0d distinct 10-grams, largest run %0d records", seen.num(), max_items);

    // a training run replayed must show no anomaly
    one_run(train[3], 0, pcs);
    anomalies = 0;
    for (int j = 0; j + 10 <= pcs.size(); j++) if (!seen.exists(gram(pcs, j))) anomalies++;
    check(anomalies == 0, "replayed training run clean");

    // crafted input: a run of '=' then the address bytes of success
    begin
      string attack;
      attack = "";
      repeat (38) attack = {attack, "="};
      attack = {attack, string'(8'hA4), string'(8'h02), string'(8'h00), string'(8'h80)};
      one_run(attack, 1, pcs);
    end
    anomalies = 0; in_success = 0; in_nocook = 0; anom_success = 0;
    foreach (pcs[j]) begin
      if (pcs[j] >= SUCCESS && pcs[j] < SUCC_END) in_success++;
      if (pcs[j] >= NOCOOK && pcs[j] < NOC_END) in_nocook++;
    end
    for (int j = 0; j + 10 <= pcs.size(); j++)
      if (!seen.exists(gram(pcs, j))) begin
        anomalies++;
        for (int k = 0; k < 10; k++) if (pcs[j + k] >= SUCCESS && pcs[j + k] < SUCC_END) begin
          anom_success++;
          break;
        end
      end
    $display("test run: %0d records, %0d anomalous 10-grams (%0d touching success), PCs in success=%0d no_cookies=%0d",
             pcs.size(), anomalies, anom_success, in_success, in_nocook);
    check(anomalies > 0, "anomaly detected");
    check(anom_success > 0, "anomaly covers the success function");
    check(in_success > 0, "PCs collected inside success");
    check(in_nocook == 0, "no PC collected inside no_cookies");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
