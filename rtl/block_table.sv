// block_table: the block mapping table (BT) of the multi-block instruction queue.
//
// An NREGS x NBLK bit RAM. Row i is the block enable vector (BE) of physical
// register i: bit j is set when some instruction waiting in IQ block j needs
// register i as a not-yet-ready source operand. Three kinds of access happen
// each cycle:
//   * BE allocation  -- for every dispatched instruction with a destination
//     register Ri, row BT[i] is cleared (clr_en/clr_tag, DISP_W ports);
//   * BE entry modification -- for every not-ready source operand i of an
//     instruction placed in block j, bit j of BT[i] is set
//     (set_en/set_tag/set_blk, 2*DISP_W ports);
//   * wakeup read -- each completing instruction reads the BE of its
//     destination tag (rd_tag -> rd_be, WB_W ports), which gates the CAM
//     precharge of the IQ blocks.
// Writes take effect at the clock edge; reads are combinational and return the
// contents before this cycle's writes. When a clear and a set hit the same row
// in one cycle the set wins (a consumer dispatched in the same group as the
// producer of its operand must still be recorded). Entries left behind by
// squashed instructions are not removed: they only cause extra block
// activations until the register is reallocated.
// Organisation, port counts and the access rules follow the published design; the
// same-cycle priority and the reset to all zeros are this design's choices.
module block_table
  import iq_pkg::*;
#(
  parameter int unsigned NBLK   = 8,               // IQ blocks
  parameter int unsigned NREGS  = 128,             // physical registers
  parameter int unsigned DISP_W = 4,               // instructions dispatched per cycle
  parameter int unsigned WB_W   = 4,               // instructions completing per cycle
  localparam int unsigned BW    = (NBLK > 1) ? $clog2(NBLK) : 1
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  tag_t [WB_W-1:0]                       rd_tag,
  output logic [WB_W-1:0][NBLK-1:0]             rd_be,
  input  logic [DISP_W-1:0]                     clr_en,
  input  tag_t [DISP_W-1:0]                     clr_tag,
  input  logic [DISP_W-1:0][1:0]                set_en,
  input  tag_t [DISP_W-1:0][1:0]                set_tag,
  input  logic [DISP_W-1:0][BW-1:0]             set_blk
);

  logic [NBLK-1:0] bt_q [NREGS];

  always_comb begin
    for (int w = 0; w < WB_W; w++) rd_be[w] = bt_q[rd_tag[w]];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) bt_q[r] <= '0;
    end else begin
      for (int r = 0; r < NREGS; r++) begin
        logic [NBLK-1:0] row;
        logic            cl;
        row = bt_q[r];
        cl  = 1'b0;
        for (int d = 0; d < DISP_W; d++)
          if (clr_en[d] && clr_tag[d] == tag_t'(r)) cl = 1'b1;
        if (cl) row = '0;
        for (int d = 0; d < DISP_W; d++)
          for (int k = 0; k < 2; k++)
            if (set_en[d][k] && set_tag[d][k] == tag_t'(r))
              if (NBLK == 1) row[0] = 1'b1;
              else           row[set_blk[d]] = 1'b1;
        bt_q[r] <= row;
      end
    end
  end

endmodule
