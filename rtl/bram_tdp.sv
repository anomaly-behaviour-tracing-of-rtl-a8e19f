// bram_tdp: true dual-port program and data memory.
//
// Port A belongs to the processor, port B to the PS-side loader that writes
// the program binary before the processor runs (and can read memory back).
// Both ports are identical: en enables the port for the cycle, we holds one
// write enable per byte, addr is a word address.  Reads are synchronous and
// read-first: rdata shows the word as it was before any write in the same
// cycle, one clock after the request, and holds until the next enabled
// access.  If both ports write the same byte in one cycle, port B wins.
// The array is not reset.
//
// From the document: two ports with read and write, port A to the processor,
// port B to the loader.  The word width (64 bits, the processor's XLEN), the
// size (2^ADDR_W words, 128 KiB by default) and the collision rule are this
// design's choice.
module bram_tdp #(
  parameter int unsigned DATA_W = 64,
  parameter int unsigned ADDR_W = 14,
  localparam int unsigned NB    = DATA_W / 8
) (
  input  logic              clk,
  input  logic              a_en,
  input  logic [NB-1:0]     a_we,
  input  logic [ADDR_W-1:0] a_addr,
  input  logic [DATA_W-1:0] a_wdata,
  output logic [DATA_W-1:0] a_rdata,
  input  logic              b_en,
  input  logic [NB-1:0]     b_we,
  input  logic [ADDR_W-1:0] b_addr,
  input  logic [DATA_W-1:0] b_wdata,
  output logic [DATA_W-1:0] b_rdata
);

  logic [DATA_W-1:0] mem [2**ADDR_W];

  always_ff @(posedge clk) begin
    if (a_en) begin
      a_rdata <= mem[a_addr];
      for (int i = 0; i < NB; i++)
        if (a_we[i]) mem[a_addr][i*8 +: 8] <= a_wdata[i*8 +: 8];
    end
    if (b_en) begin
      b_rdata <= mem[b_addr];
      for (int i = 0; i < NB; i++)
        if (b_we[i]) mem[b_addr][i*8 +: 8] <= b_wdata[i*8 +: 8];
    end
  end

endmodule
