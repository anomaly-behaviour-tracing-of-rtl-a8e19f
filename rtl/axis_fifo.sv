// axis_fifo: synchronous first-in first-out buffer with AXI4-Stream style
// valid/ready ports on both sides.
//
// Used twice in the wrapper: as the trace FIFO (2048 records of 1024 bits,
// the default) between the monitoring system and the DMA, and with byte
// width as each of the two console character FIFOs.
//
// Storage is a plain array written on the input handshake and read
// synchronously (block-RAM style) into a one-word output register, which
// makes the output first-word-fall-through: m_tvalid is high whenever the
// output register holds a word.  A word written into an empty FIFO appears
// at the output two clock edges after its input handshake.  One word moves
// in and one out per cycle at most.  s_tready is low when DEPTH words are held
// (including the output register).  count gives the words held.  Reset is
// active-low and synchronous and empties the FIFO; the array is not cleared.
//
// From the document: the trace FIFO's depth of 2048 elements and its
// 1024-bit element.  The handshake and the internal structure are this
// design's choice.
module axis_fifo #(
  parameter int unsigned WIDTH = 1024,
  parameter int unsigned DEPTH = 2048,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] s_tdata,
  input  logic             s_tvalid,
  output logic             s_tready,
  output logic [WIDTH-1:0] m_tdata,
  output logic             m_tvalid,
  input  logic             m_tready,
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [CW-1:0]    mcount;          // words in the array, not in the output register
  logic             push, pop_out, load_out;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_comb begin
    count    = mcount + CW'(m_tvalid);
    s_tready = (count < CW'(DEPTH));
    push     = s_tvalid && s_tready;
    pop_out  = m_tvalid && m_tready;
    load_out = (mcount != '0) && (!m_tvalid || pop_out);
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= s_tdata;
  end

  always_ff @(posedge clk) begin
    if (load_out) m_tdata <= mem[rd_ptr];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      mcount   <= '0;
      m_tvalid <= 1'b0;
    end else begin
      if (push)     wr_ptr <= next_ptr(wr_ptr);
      if (load_out) rd_ptr <= next_ptr(rd_ptr);
      mcount <= mcount + CW'(push) - CW'(load_out);
      if (load_out)     m_tvalid <= 1'b1;
      else if (pop_out) m_tvalid <= 1'b0;
    end
  end

endmodule
