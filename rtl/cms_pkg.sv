// cms_pkg: types and constants shared by the continuous monitoring system
// (CMS) and the blocks around it.
//
// A trace record is one 1024-bit word.  Its fields, from bit 0 upward, are:
//   pc        64 bits   program counter of the collected instruction
//   instr     32 bits   the instruction word
//   ticks     64 bits   clock cycles since the previous collected record
//   hpc       39 x 7    per-event counts since the previous record
//   hpc_ovf   39 bits   event counters that wrapped (value is modulo 128)
//   gpr_a     4 x 64    registers a0..a3 (x10..x13), a0 in the low word
//   pad       296 bits  zero
// The field list and widths follow the document; their order inside the word
// and the zero padding are this design's choice.
package cms_pkg;

  localparam int unsigned XLEN       = 64;
  localparam int unsigned ILEN       = 32;
  localparam int unsigned N_EVENTS   = 39;   // 37 observed event types + trap + interrupt
  localparam int unsigned HPC_W      = 7;    // width of each per-item event counter
  localparam int unsigned TICK_W     = 64;
  localparam int unsigned N_ARGREGS  = 4;    // a0..a3
  localparam int unsigned ARG_BASE   = 10;   // x10 is a0
  localparam int unsigned N_GPR      = 32;
  localparam int unsigned ITEM_W     = 1024;

  localparam int unsigned USED_W = XLEN + ILEN + TICK_W + N_EVENTS*HPC_W + N_EVENTS
                                   + N_ARGREGS*XLEN;
  localparam int unsigned PAD_W  = ITEM_W - USED_W;

  typedef logic [XLEN-1:0] xword_t;

  typedef struct packed {
    logic [PAD_W-1:0]                    pad;
    logic [N_ARGREGS-1:0][XLEN-1:0]      gpr_a;
    logic [N_EVENTS-1:0]                 hpc_ovf;
    logic [N_EVENTS-1:0][HPC_W-1:0]      hpc;
    logic [TICK_W-1:0]                   ticks;
    logic [ILEN-1:0]                     instr;
    logic [XLEN-1:0]                     pc;
  } trace_item_t;

  // RV64 major opcodes (instr[6:0]) of control-transfer instructions.
  localparam logic [6:0] OP_BRANCH = 7'b1100011;
  localparam logic [6:0] OP_JALR   = 7'b1100111;
  localparam logic [6:0] OP_JAL    = 7'b1101111;

  // True for a branch, jump or return, in 32-bit or compressed (RVC) form.
  // RVC: c.j, c.beqz, c.bnez (quadrant 1) and c.jr, c.jalr (quadrant 2).
  // c.jal does not exist on RV64 (that encoding is c.addiw).
  function automatic logic is_ctrl_xfer(logic [ILEN-1:0] ins);
    logic r;
    r = 1'b0;
    if (ins[1:0] == 2'b11) begin
      r = (ins[6:0] == OP_BRANCH) || (ins[6:0] == OP_JALR) || (ins[6:0] == OP_JAL);
    end else if (ins[1:0] == 2'b01) begin
      r = (ins[15:13] == 3'b101) || (ins[15:13] == 3'b110) || (ins[15:13] == 3'b111);
    end else if (ins[1:0] == 2'b10) begin
      r = (ins[15:13] == 3'b100) && (ins[11:7] != 5'd0) && (ins[6:2] == 5'd0);
    end
    return r;
  endfunction

endpackage
