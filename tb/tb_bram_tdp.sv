// tb_bram_tdp: self-checking testbench for the dual-port memory.
//
// Both ports issue random reads and byte-masked writes, mostly inside a small
// address window so that the ports often meet on one word.  A shadow copy of
// the memory predicts each port's read data one clock later (read-first:
// the value before that cycle's writes) and applies writes byte by byte with
// port B applied last.  A first phase loads a block of words through port B
// only and reads them back through port A, as a program load does.
module tb_bram_tdp;
  localparam int AW = 14;

  logic clk = 1'b0;
  logic a_en, b_en;
  logic [7:0] a_we, b_we;
  logic [AW-1:0] a_addr, b_addr;
  logic [63:0] a_wdata, b_wdata, a_rdata, b_rdata;

  bram_tdp dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_coll = 0;
  logic [63:0] shadow [int];

  function automatic logic [63:0] rd(int a);
    return shadow.exists(a) ? shadow[a] : 64'h0;
  endfunction

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_a, exp_b, w;
    bit chk_a, chk_b;
    int aa, ba;
    a_en = 0; b_en = 0; a_we = 0; b_we = 0; a_addr = 0; b_addr = 0; a_wdata = 0; b_wdata = 0;
    // zero the window used below so the shadow starts defined
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      b_en = 1; b_we = 8'hff; b_addr = AW'(i); b_wdata = {$urandom(), $urandom()};
      shadow[i] = b_wdata;
    end
    @(negedge clk); b_en = 0; b_we = 0;
    // program-load readback through port A
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      if (i > 0) check(a_rdata == rd(i - 1), "load readback");
      a_en = 1; a_we = 0; a_addr = AW'(i);
    end
    @(negedge clk); check(a_rdata == rd(1023), "load readback last");
    a_en = 0;
    chk_a = 0; chk_b = 0;
    for (int c = 0; c < 20000; c++) begin
      @(negedge clk);
      if (chk_a) check(a_rdata == exp_a, "port A read");
      if (chk_b) check(b_rdata == exp_b, "port B read");
      a_en = $urandom_range(0, 9) < 8;  b_en = $urandom_range(0, 9) < 8;
      a_we = ($urandom_range(0, 1) != 0) ? 8'($urandom()) : 8'h0;
      b_we = ($urandom_range(0, 1) != 0) ? 8'($urandom()) : 8'h0;
      aa = (c % 4 == 3) ? $urandom_range(0, 2**AW - 1) : $urandom_range(0, 15);
      ba = (c % 4 == 3) ? $urandom_range(0, 2**AW - 1) : $urandom_range(0, 15);
      a_addr = AW'(aa); b_addr = AW'(ba);
      a_wdata = {$urandom(), $urandom()}; b_wdata = {$urandom(), $urandom()};
      chk_a = a_en; chk_b = b_en;
      exp_a = rd(aa); exp_b = rd(ba);
      // a read of a never-written word outside the window is not checked
      if (aa >= 1024 && !shadow.exists(aa)) chk_a = 0;
      if (ba >= 1024 && !shadow.exists(ba)) chk_b = 0;
      if (a_en && b_en && aa == ba && (a_we & b_we) != 0) n_coll++;
      if (a_en && a_we != 0) begin
        w = rd(aa);
        for (int i = 0; i < 8; i++) if (a_we[i]) w[i*8 +: 8] = a_wdata[i*8 +: 8];
        if (aa < 1024 || shadow.exists(aa) || a_we == 8'hff) shadow[aa] = w;
      end
      if (b_en && b_we != 0) begin
        w = rd(ba);
        for (int i = 0; i < 8; i++) if (b_we[i]) w[i*8 +: 8] = b_wdata[i*8 +: 8];
        if (ba < 1024 || shadow.exists(ba) || b_we == 8'hff) shadow[ba] = w;
      end
    end
    $display("write collisions=%0d", n_coll);
    check(n_coll > 0, "collision seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
