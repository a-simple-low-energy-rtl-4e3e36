// iq_pkg: shared sizes and record types of the multi-block instruction queue.
//
// The queue stores, per waiting instruction, a RAM part (opcode, destination
// register tag, busy bit) and a CAM part (two source register tags with their
// ready flags). Tags are physical register numbers: 128 physical registers per
// register file give 7-bit tags. The reorder buffer has 256 entries, so an
// 8-bit ROB index travels with each instruction; it is used only to decide which
// entries a branch misprediction deletes. The opcode width is this design's
// own choice (the queue only carries it to the functional units).
package iq_pkg;

  localparam int unsigned TAG_W    = 7;    // 128 physical registers
  localparam int unsigned NUM_PREGS = 1 << TAG_W;
  localparam int unsigned OPC_W    = 8;    // opcode carried through the RAM part
  localparam int unsigned ROB_W    = 8;    // 256-entry reorder buffer

  typedef logic [TAG_W-1:0] tag_t;
  typedef logic [OPC_W-1:0] opc_t;
  typedef logic [ROB_W-1:0] rob_t;

  // Instruction as presented by rename/dispatch.
  typedef struct packed {
    opc_t       opcode;
    logic       dst_valid;     // instruction writes a register
    tag_t       dst;
    logic [1:0] src_valid;     // 0, 1 or 2 source operands
    tag_t [1:0] src;
    logic [1:0] src_rdy;       // operand already available at dispatch
    rob_t       rob;
  } disp_instr_t;

  // Contents of one queue entry.
  typedef struct packed {
    opc_t       opcode;
    logic       dst_valid;
    tag_t       dst;
    tag_t [1:0] src;
    logic [1:0] rdy;           // Op1Rdy / Op2Rdy
    rob_t       rob;
  } iq_data_t;

  // Instruction handed to the functional units by the select logic.
  typedef struct packed {
    opc_t opcode;
    logic dst_valid;
    tag_t dst;
    rob_t rob;
  } issue_instr_t;

endpackage
