// tb_dma_s2mm: self-checking testbench for the stream-to-memory DMA.
//
// A stream source offers random 1024-bit records (holding each until it is
// taken, as AXI4-Stream requires) with random gaps; an AXI memory model
// accepts bursts with random ready and checks the burst rules.  For each
// transfer the testbench checks the destination buffer word by word against
// the records that left the stream (destination + 128 bytes per record, low
// word first), that exactly n_items records were taken, one burst each,
// busy/done/items_done, that a start while busy is ignored, that a
// zero-length transfer completes at once, and that an error response sets
// err until the next start.  One transfer with source and memory always
// ready checks the rate of one 64-bit beat per clock.
module tb_dma_s2mm;
  localparam int IW = 1024, MW = 64, BEATS = IW / MW;

  logic clk = 1'b0, rst_n;
  logic start, busy, done, err;
  logic [31:0] dst_addr, awaddr;
  logic [15:0] n_items, items_done;
  logic [IW-1:0] s_tdata;
  logic s_tvalid, s_tready;
  logic [7:0] awlen, wstrb;
  logic [2:0] awsize;
  logic [1:0] awburst, bresp;
  logic awvalid, awready, wlast, wvalid, wready, bvalid, bready;
  logic [MW-1:0] wdata;
  logic resp_err = 1'b0;
  int ready_pct = 100, proto_errs, n_bursts;

  dma_s2mm dut (.*);
  axi_mem_model u_mem (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int src_p = 100;
  logic [IW-1:0] taken[$];          // records the DMA has taken, in order
  int n_taken = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [IW-1:0] rnd_item();
    logic [IW-1:0] w;
    for (int i = 0; i < IW/32; i++) w[i*32 +: 32] = $urandom();
    return w;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // records taken, logged at the rising edge; the source changes at the
  // falling edge
  bit hs;
  always @(posedge clk) begin
    hs = rst_n && s_tvalid && s_tready;
    if (hs) begin
      taken.push_back(s_tdata);
      n_taken++;
    end
  end

  always @(negedge clk) begin
    if (rst_n) begin
      if (!s_tvalid || hs) begin
        s_tvalid <= ($urandom_range(0, 99) < src_p);
        s_tdata  <= rnd_item();
      end
    end
  end

  // run one transfer and check the buffer; returns cycles busy
  task automatic transfer(int n, logic [31:0] dst, bit expect_err, output int cycles);
    int base_taken, base_bursts;
    logic [IW-1:0] rec;
    base_taken = n_taken;
    base_bursts = n_bursts;
    @(negedge clk);
    start = 1'b1; n_items = 16'(n); dst_addr = dst;
    @(negedge clk);
    start = 1'b0; n_items = 16'hdead; dst_addr = 32'hbad0_0000;
    cycles = 1;
    check(!err, "err cleared by start");
    if (n == 0) check(done && !busy, "zero-length transfer done");
    if (n > 1) start = 1'b1;          // ignored: already busy
    while (busy) begin
      check(!done, "done low while busy");
      @(negedge clk);
      start = 1'b0;
      cycles++;
    end
    check(done, "done after transfer");
    check(err == expect_err, "error flag");
    check(n_taken - base_taken == n, "records taken from stream");
    check(n_bursts - base_bursts == n, "one burst per record");
    check(items_done == 16'(n), "items_done at end");
    for (int j = 0; j < n; j++) begin
      rec = taken[j];
      for (int k = 0; k < BEATS; k++) begin
        longint a;
        a = longint'(dst) + j * 128 + k * 8;
        check(u_mem.mem.exists(a) && u_mem.mem[a] == rec[k*MW +: MW],
              $sformatf("record %0d word %0d", j, k));
      end
    end
    repeat (n) void'(taken.pop_front());
    repeat (5) begin
      @(negedge clk);
      check(!wvalid && !awvalid && !busy, "idle after transfer");
    end
  endtask

  initial begin
    int cyc;
    rst_n = 1'b0; start = 1'b0; n_items = '0; dst_addr = '0;
    s_tvalid = 1'b0; s_tdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!busy && !done, "idle after reset");
    // full rate
    src_p = 100; ready_pct = 100;
    transfer(20, 32'h1000_0000, 0, cyc);
    $display("20 records in %0d cycles", cyc);
    check(cyc <= 20 * BEATS + 6, "one beat per clock");
    transfer(0, 32'h2000_0000, 0, cyc);
    transfer(1, 32'h2000_0080, 0, cyc);
    for (int t = 0; t < 12; t++) begin
      src_p = $urandom_range(10, 100); ready_pct = $urandom_range(10, 100);
      transfer($urandom_range(1, 30), 32'h3000_0000 + 32'($urandom_range(0, 4095) * 128), 0, cyc);
    end
    // an error response
    ready_pct = 70; resp_err = 1'b1;
    transfer(3, 32'h3800_0000, 1, cyc);
    resp_err = 1'b0;
    transfer(2, 32'h3900_0000, 0, cyc);
    check(proto_errs == 0, "AXI burst rules");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
