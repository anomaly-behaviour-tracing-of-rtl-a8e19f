// dma_s2mm: stream-to-memory DMA for trace records, AXI4 write master.
//
// Software gives a byte destination address and a number of records and
// pulses start.  The DMA then takes that many records from its AXI4-Stream
// input (the trace FIFO) and writes each one to memory as a single INCR
// burst of ITEM_W/MM_W beats (16 beats of 64 bits by default, which is also
// the AXI3 limit of the PS high-performance ports), lowest word first, so the
// buffer holds the records back to back.  The destination must be aligned to
// ITEM_W/8 bytes (128), which keeps every burst inside a 4 KiB page.
//
// Per record the address and data channels run independently (data may lead
// the address); the next record is taken from the stream in the same cycle
// as the current record's last beat and address are both done, so a steady
// stream keeps one beat per clock on W.  Write responses are always accepted;
// items_done counts records whose response has arrived, and a response other
// than OKAY/EXOKAY (bresp[1] set; bresp[0] is not needed) sets err until
// the next start.  busy is high from start
// until the last response; done then goes high and stays high until the next
// start.  A start while busy is ignored.  All AXI IDs are zero.
//
// From the document: a DMA under software control that moves the FIFO
// contents into a previously allocated contiguous buffer through the PS
// high-performance AXI port.  The control signals, one burst per record and
// the response handling are this design's choice.
module dma_s2mm #(
  parameter int unsigned ITEM_W = 1024,
  parameter int unsigned MM_W   = 64,
  parameter int unsigned ADDR_W = 32,
  parameter int unsigned LEN_W  = 16,
  localparam int unsigned BEATS = ITEM_W / MM_W,
  localparam int unsigned BW    = (BEATS > 1) ? $clog2(BEATS) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  // control (from the PS)
  input  logic              start,
  input  logic [ADDR_W-1:0] dst_addr,
  input  logic [LEN_W-1:0]  n_items,
  output logic              busy,
  output logic              done,
  output logic              err,
  output logic [LEN_W-1:0]  items_done,
  // AXI4-Stream slave
  input  logic [ITEM_W-1:0] s_tdata,
  input  logic              s_tvalid,
  output logic              s_tready,
  // AXI4 write address channel
  output logic [ADDR_W-1:0] awaddr,
  output logic [7:0]        awlen,
  output logic [2:0]        awsize,
  output logic [1:0]        awburst,
  output logic              awvalid,
  input  logic              awready,
  // AXI4 write data channel
  output logic [MM_W-1:0]   wdata,
  output logic [MM_W/8-1:0] wstrb,
  output logic              wlast,
  output logic              wvalid,
  input  logic              wready,
  // AXI4 write response channel
  input  logic [1:0]        bresp,
  input  logic              bvalid,
  output logic              bready
);

  localparam int unsigned REC_BYTES = ITEM_W / 8;

  logic [BEATS-1:0][MM_W-1:0] buf_q;
  logic                       buf_valid;   // a record is being written
  logic                       aw_done, w_done;
  logic [BW-1:0]              beat_q;
  logic [LEN_W-1:0]           remaining;   // records not yet taken from the stream
  logic [LEN_W-1:0]           n_total;     // records in the running transfer
  logic [ADDR_W-1:0]          rec_addr, next_addr;
  logic                       aw_hs, w_hs, w_last_hs, rec_end, take;

  always_comb begin
    awaddr    = rec_addr;
    awlen     = 8'(BEATS - 1);
    awsize    = 3'($clog2(MM_W / 8));
    awburst   = 2'b01;                     // INCR
    awvalid   = buf_valid && !aw_done;
    wdata     = buf_q[beat_q];
    wstrb     = '1;
    wlast     = (beat_q == BW'(BEATS - 1));
    wvalid    = buf_valid && !w_done;
    bready    = 1'b1;
    aw_hs     = awvalid && awready;
    w_hs      = wvalid && wready;
    w_last_hs = w_hs && wlast;
    rec_end   = buf_valid && (aw_done || aw_hs) && (w_done || w_last_hs);
    s_tready  = busy && (remaining != '0) && (!buf_valid || rec_end);
    take      = s_tvalid && s_tready;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      done       <= 1'b0;
      err        <= 1'b0;
      items_done <= '0;
      remaining  <= '0;
      rec_addr   <= '0;
      next_addr  <= '0;
      beat_q     <= '0;
      buf_valid  <= 1'b0;
      aw_done    <= 1'b0;
      w_done     <= 1'b0;
      buf_q      <= '0;
    end else if (!busy) begin
      if (start) begin
        busy       <= (n_items != '0);
        done       <= (n_items == '0);
        err        <= 1'b0;
        items_done <= '0;
        remaining  <= n_items;
        next_addr  <= dst_addr;
        beat_q     <= '0;
      end
    end else begin
      if (aw_hs) aw_done <= 1'b1;
      if (w_hs) begin
        beat_q <= wlast ? '0 : beat_q + BW'(1);
        if (wlast) w_done <= 1'b1;
      end
      if (rec_end) begin
        buf_valid <= 1'b0;
        aw_done   <= 1'b0;
        w_done    <= 1'b0;
      end
      if (take) begin
        buf_q     <= s_tdata;
        buf_valid <= 1'b1;
        rec_addr  <= next_addr;
        next_addr <= next_addr + ADDR_W'(REC_BYTES);
        remaining <= remaining - LEN_W'(1);
      end
      if (bvalid) begin
        items_done <= items_done + LEN_W'(1);
        if (bresp[1]) err <= 1'b1;
        if (items_done + LEN_W'(1) == n_total) begin
          busy <= 1'b0;
          done <= 1'b1;
        end
      end
    end
  end

  // records in the running transfer
  always_ff @(posedge clk) begin
    if (!rst_n)              n_total <= '0;
    else if (!busy && start) n_total <= n_items;
  end

  // AXI4-Stream rule: a master keeps tvalid high until the transfer happens.
  a_stream_hold: assert property (@(posedge clk) disable iff (!rst_n)
                                  (s_tvalid && !s_tready) |=> s_tvalid)
    else $error("dma_s2mm: s_tvalid dropped before s_tready");
  // AXI rule: this master keeps awvalid/wvalid and their payload until accepted.
  a_aw_hold: assert property (@(posedge clk) disable iff (!rst_n)
                              (awvalid && !awready) |=> awvalid && $stable(awaddr))
    else $error("dma_s2mm: awvalid dropped before awready");
  a_w_hold: assert property (@(posedge clk) disable iff (!rst_n)
                             (wvalid && !wready) |=> wvalid && $stable(wdata) && $stable(wlast))
    else $error("dma_s2mm: wvalid dropped before wready");

endmodule
