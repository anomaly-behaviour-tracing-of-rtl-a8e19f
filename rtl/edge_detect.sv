// edge_detect: rising-edge detector for a level signal from a GPIO register.
//
// The input is first passed through SYNC_STAGES flip-flops (the GPIO core
// runs on the same clock, so the default is one stage that only registers
// it), then compared with its previous value.  pulse is high for exactly one
// clock after each 0->1 change, however long the level stays high, so a
// software write of 1 to a GPIO bit causes one FIFO push or pop.  The pulse
// is registered: it is high during the cycle that follows the
// (SYNC_STAGES+1)-th clock edge at which the level is sampled high.
// SYNC_STAGES must be at least 1.  Reset is active-low and synchronous and clears the history to
// 0, so a line already high at reset release counts as an edge.
//
// The document says only that edge detectors limit each read or write to a
// single clock cycle; the structure here is this design's choice.
module edge_detect #(
  parameter int unsigned SYNC_STAGES = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic level,
  output logic pulse
);

  logic [SYNC_STAGES:0] hist_q;   // hist_q[0] newest

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      hist_q <= '0;
      pulse  <= 1'b0;
    end else begin
      hist_q <= {hist_q[SYNC_STAGES-1:0], level};
      pulse  <= hist_q[SYNC_STAGES-1] && !hist_q[SYNC_STAGES];
    end
  end

endmodule
