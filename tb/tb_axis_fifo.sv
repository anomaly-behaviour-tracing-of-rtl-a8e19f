// tb_axis_fifo: self-checking testbench for the FIFO at its trace-FIFO size
// (2048 x 1024 bits).
//
// A scoreboard queue records every accepted input word; every output
// handshake must deliver the oldest one.  The testbench checks s_tready
// against its own occupancy count (low exactly when 2048 words are held), the
// count output, and the two-edge latency from a write into an empty FIFO to
// m_tvalid.  Phases: random traffic, fill until full with the output
// stalled, drain completely, random traffic again.
module tb_axis_fifo;
  localparam int W = 1024;
  localparam int D = 2048;

  logic clk = 1'b0, rst_n;
  logic [W-1:0] s_tdata, m_tdata;
  logic s_tvalid, s_tready, m_tvalid, m_tready;
  logic [$clog2(D+1)-1:0] count;

  axis_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_full = 0, n_out = 0;
  logic [W-1:0] sb[$];

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  function automatic logic [W-1:0] rnd_word();
    logic [W-1:0] w;
    for (int i = 0; i < W/32; i++) w[i*32 +: 32] = $urandom();
    return w;
  endfunction

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one clock of traffic: in_p / out_p are percent chances of valid / ready
  task automatic step(int in_p, int out_p);
    @(negedge clk);
    check(int'(count) == sb.size(), "count");
    check(s_tready == (sb.size() < D), "s_tready vs occupancy");
    if (sb.size() == D) n_full++;
    s_tvalid = ($urandom_range(0, 99) < in_p);
    s_tdata  = rnd_word();
    m_tready = ($urandom_range(0, 99) < out_p);
    if (m_tvalid && m_tready) begin
      check(sb.size() > 0 && m_tdata == sb[0], "output order/data");
      void'(sb.pop_front());
      n_out++;
    end
    if (s_tvalid && s_tready) sb.push_back(s_tdata);
  endtask

  initial begin
    rst_n = 1'b0; s_tvalid = 1'b0; s_tdata = '0; m_tready = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!m_tvalid && count == 0, "empty after reset");
    // latency into an empty FIFO
    s_tdata = rnd_word(); s_tvalid = 1'b1; sb.push_back(s_tdata);
    @(negedge clk) s_tvalid = 1'b0;
    check(!m_tvalid, "not visible after one edge");
    @(negedge clk);
    check(m_tvalid && m_tdata == sb[0], "visible after two edges");
    repeat (3000) step(50, 50);
    repeat (2500) step(90, 0);
    check(n_full > 0, "reached full");
    repeat (2500) step(0, 90);
    check(sb.size() == 0 && !m_tvalid, "drained");
    repeat (3000) step(60, 70);
    $display("out=%0d full_cycles=%0d", n_out, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
