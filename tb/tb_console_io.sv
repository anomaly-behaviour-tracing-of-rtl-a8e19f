// tb_console_io: self-checking testbench for the console character FIFOs.
//
// The processor side prints random characters and reads input characters
// with random ready; the PS side works only through the GPIO lines, holding
// each strobe high for several cycles as software would.  Checks: every
// printed character reaches the PS once and in order, every typed character
// reaches the processor once and in order (so a long strobe moves exactly
// one character), ps_in_full rises when the input FIFO holds DEPTH
// characters, and a write strobe while full is dropped.
module tb_console_io;
  localparam int DEPTH = 64;

  logic clk = 1'b0, rst_n;
  logic [7:0] con_out_char, con_in_char, ps_out_char, ps_in_char;
  logic con_out_valid, con_out_ready, con_in_valid, con_in_ready;
  logic ps_out_avail, ps_out_rd, ps_in_wr, ps_in_full;
  logic [$clog2(DEPTH+1)-1:0] ps_out_count, ps_in_count;

  console_io #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_out = 0, n_in = 0, n_full = 0;
  logic [7:0] out_q[$], in_q[$];
  bit cpu_reads = 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // processor side: handshakes logged at the rising edge
  always @(posedge clk) begin
    if (rst_n && con_out_valid && con_out_ready) out_q.push_back(con_out_char);
    if (rst_n && con_in_valid && con_in_ready) begin
      checks++;
      if (in_q.size() == 0 || in_q[0] != con_in_char) begin
        failures++;
        $display("FAIL t=%0t processor read %h", $time, con_in_char);
      end else void'(in_q.pop_front());
      n_in++;
    end
  end
  bit hs_out;
  always @(posedge clk) hs_out = rst_n && con_out_valid && con_out_ready;
  always @(negedge clk) begin
    if (rst_n) begin
      if (!con_out_valid || hs_out) begin
        con_out_valid <= ($urandom_range(0, 99) < 30);
        con_out_char  <= 8'($urandom());
      end
      con_in_ready <= cpu_reads && ($urandom_range(0, 99) < 40);
    end
  end

  // software: read one output character through GPIO
  task automatic sw_read();
    logic [7:0] c;
    c = ps_out_char;
    check(out_q.size() > 0 && out_q[0] == c, "PS read order");
    if (out_q.size() > 0) void'(out_q.pop_front());
    n_out++;
    ps_out_rd = 1'b1;
    repeat ($urandom_range(3, 6)) @(negedge clk);
    ps_out_rd = 1'b0;
    repeat ($urandom_range(2, 4)) @(negedge clk);
  endtask

  // software: type one character through GPIO; expect tells whether it
  // should be accepted
  task automatic sw_write(logic [7:0] c, bit expect_taken);
    ps_in_char = c;
    if (expect_taken) in_q.push_back(c);
    ps_in_wr = 1'b1;
    repeat ($urandom_range(3, 6)) @(negedge clk);
    ps_in_wr = 1'b0;
    repeat ($urandom_range(2, 4)) @(negedge clk);
  endtask

  initial begin
    rst_n = 1'b0; con_out_valid = 0; con_out_char = 0; con_in_ready = 0;
    ps_out_rd = 0; ps_in_char = 0; ps_in_wr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (10) @(negedge clk);
    for (int i = 0; i < 2000; i++) begin
      if (ps_out_avail && ($urandom_range(0, 1) != 0)) sw_read();
      else if (!ps_in_full) sw_write(8'($urandom()), 1'b1);
      else @(negedge clk);
    end
    // fill the input FIFO with the processor not reading
    cpu_reads = 0;
    repeat (5) @(negedge clk);
    while (!ps_in_full) sw_write(8'($urandom()), 1'b1);
    n_full++;
    check(int'(ps_in_count) == DEPTH, "input FIFO holds DEPTH characters");
    sw_write(8'h5a, 1'b0);    // dropped
    check(int'(ps_in_count) == DEPTH, "write while full dropped");
    cpu_reads = 1;
    repeat (2000) begin
      @(negedge clk);
      if (ps_out_avail) sw_read();
    end
    check(in_q.size() == 0, "all typed characters delivered");
    $display("ps_reads=%0d cpu_reads=%0d full=%0d", n_out, n_in, n_full);
    check(n_out > 500 && n_in > 500, "enough traffic");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
