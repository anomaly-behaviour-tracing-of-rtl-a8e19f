// axi_mem_model: behavioural AXI4 write-only memory slave for testbenches.
//
// Stands in for the processing system's memory behind its high-performance
// port.  It accepts write bursts on AW/W with random ready (ready_pct percent
// of cycles), stores each 64-bit beat in a sparse array indexed by byte
// address (mem), and returns one write response per burst after the burst's
// last beat, OKAY, or SLVERR while resp_err is high.  It checks the AXI rules
// the DMA relies on: INCR bursts of 8-byte beats, wlast exactly on the
// burst's last beat, all strobes set; each violation adds to proto_errs.
// Not synthesizable; for simulation only.
module axi_mem_model (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] awaddr,
  input  logic [7:0]  awlen,
  input  logic [2:0]  awsize,
  input  logic [1:0]  awburst,
  input  logic        awvalid,
  output logic        awready,
  input  logic [63:0] wdata,
  input  logic [7:0]  wstrb,
  input  logic        wlast,
  input  logic        wvalid,
  output logic        wready,
  output logic [1:0]  bresp,
  output logic        bvalid,
  input  logic        bready,
  input  logic        resp_err,
  input  int          ready_pct,
  output int          proto_errs,
  output int          n_bursts
);

  logic [63:0] mem [longint];

  typedef struct { logic [31:0] addr; int len; } aw_t;
  typedef struct { logic [63:0] data; logic last; } w_t;
  aw_t aw_q[$];
  w_t  w_q[$];
  int  b_pending = 0;
  bit  b_hs;

  initial begin
    proto_errs = 0; n_bursts = 0;
    awready = 0; wready = 0; bvalid = 0; bresp = 0;
  end

  always @(posedge clk) begin
    b_hs = rst_n && bvalid && bready;
    if (b_hs) b_pending--;
    if (rst_n && awvalid && awready) begin
      if (awburst != 2'b01 || awsize != 3'd3) proto_errs++;
      aw_q.push_back('{awaddr, int'(awlen)});
    end
    if (rst_n && wvalid && wready) begin
      if (wstrb != 8'hff) proto_errs++;
      w_q.push_back('{wdata, wlast});
    end
    while (aw_q.size() > 0 && w_q.size() > aw_q[0].len) begin
      aw_t a;
      a = aw_q.pop_front();
      for (int b = 0; b <= a.len; b++) begin
        w_t w;
        w = w_q.pop_front();
        if (w.last != (b == a.len)) proto_errs++;
        mem[longint'(a.addr) + 8 * b] = w.data;
      end
      b_pending++;
      n_bursts++;
    end
  end

  always @(negedge clk) begin
    awready <= ($urandom_range(0, 99) < ready_pct);
    wready  <= ($urandom_range(0, 99) < ready_pct);
    if (!bvalid || b_hs) begin
      bvalid <= (b_pending > 0) && ($urandom_range(0, 99) < ready_pct);
      bresp  <= resp_err ? 2'b10 : 2'b00;
    end
  end

endmodule
