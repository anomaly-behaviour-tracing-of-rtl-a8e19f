// tb_edge_detect: self-checking testbench for the rising-edge detector.
//
// Drives random level patterns, including long high stretches, and compares
// the pulse output with a model that delays the level by the register
// stages (SYNC_STAGES + 1 clocks) and marks each 0->1 change: one pulse per
// rising edge, never more.
module tb_edge_detect;
  logic clk = 1'b0, rst_n, level, pulse;

  edge_detect dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_pulse = 0, n_rise = 0;
  logic [2:0] hist;     // hist[0]: level applied for the last edge

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hold;
    rst_n = 1'b0; level = 1'b0; hist = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    hold = 0;
    for (int c = 0; c < 5000; c++) begin
      // expected pulse after the last edge: level seen two edges ago rose
      checks++;
      if (pulse != (hist[1] && !hist[2])) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d pulse=%0d", c, pulse);
      end
      if (pulse) n_pulse++;
      if (hold == 0) begin
        level = ~level;
        hold = $urandom_range(1, (c % 500 < 250) ? 3 : 40);
        if (level) n_rise++;
      end
      hold--;
      hist = {hist[1:0], level};
      @(negedge clk);
    end
    $display("rises=%0d pulses=%0d", n_rise, n_pulse);
    checks++;
    if (n_pulse != n_rise && n_pulse != n_rise - 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
