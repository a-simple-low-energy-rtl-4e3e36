// multiblock_iq: an instruction queue split into NBLK separately enabled blocks,
// with a block mapping table that says which blocks to wake up.
//
// A conventional queue compares every completing result tag with every source
// tag in the queue. Here the IQS entries are divided into NBLK blocks whose
// CAMs are off unless explicitly enabled, and the block mapping table (BT)
// keeps, per physical register, a block enable vector (BE) listing the blocks
// that hold instructions still waiting for that register. A completing
// instruction reads its BE and only those blocks compare its tag; inside an
// enabled block only busy entries with a not-ready operand compare.
//
// Per cycle:
//   dispatch  up to DISP_W instructions in program order. block_assign picks a
//             block round robin and a free entry; the instruction is written
//             there with its ready flags. At the same time BT[dst] is cleared
//             (BE allocation) and, for every source not ready, bit <block> of
//             BT[src] is set (BE entry modification). A source whose tag is
//             being broadcast in this very cycle is taken as ready and not
//             recorded (dispatch bypass), so no wakeup is missed.
//             disp_accept says which instructions were taken (an in-order
//             prefix); disp_blk/disp_ent say where they went.
//   wakeup    up to WB_W completing tags (wb_valid/wb_tag). Each reads its BE
//             from the BT; the BE bits gate the blocks' comparisons. Matching
//             operands become ready at the clock edge. With BT_PIPE = 0 the BT
//             read and the CAM search share the cycle in which the tag arrives.
//             With BT_PIPE = 1 the tag is sent one cycle early: the BT is read
//             and the BE latched in that cycle, and the CAM searches in the next
//             one (BT bits set by dispatches in the early cycle are merged into
//             the latched BE). Timing seen from outside is then one cycle later
//             than with BT_PIPE = 0.
//   select    up to ISS_W ready instructions, oldest first, leave the queue on
//             iss_valid/iss_instr in the cycle after their last operand was
//             broadcast at the earliest (iss port 0 = oldest).
//   squash    flush_valid deletes every entry younger than the mispredicted
//             branch flush_rob, age measured from the ROB head rob_head. No
//             dispatch and no issue happen in that cycle. The BT is left as it
//             is: stale BE bits only cause unneeded block activations until the
//             register is reallocated.
// cyc_* report this cycle's comparisons, matches, block activations (one per
// broadcast per enabled block) and broadcasts; total_* are running totals.
// The blocks, the BT and its update rules, round-robin assignment,
// active-entry gating and the handling of mispredictions follow the published design.
// So does the option of reading the BT a cycle ahead (BT_PIPE); the forwarding
// of same-cycle BT sets into the latched BE, the dispatch bypass, the squash
// interface and the statistics ports are this design's choices. The dispatch
// bypass compares against the tags being searched in the CAM this cycle.
module multiblock_iq
  import iq_pkg::*;
#(
  parameter int unsigned IQS    = 32,   // queue entries
  parameter int unsigned NBLK   = 8,    // blocks
  parameter int unsigned DISP_W = 4,    // dispatch width
  parameter int unsigned WB_W   = 4,    // completing instructions per cycle
  parameter int unsigned ISS_W  = 4,    // issue width
  parameter bit          BT_PIPE = 1'b0, // 1: tags arrive a cycle ahead, BT read latched
  localparam int unsigned EPB   = IQS / NBLK,
  localparam int unsigned BW    = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned IW    = (IQS > 1) ? $clog2(IQS) : 1,
  localparam int unsigned SW    = (DISP_W > 1) ? $clog2(DISP_W) : 1,
  localparam int unsigned CW    = $clog2(2*WB_W*IQS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // dispatch
  input  logic [DISP_W-1:0]             disp_valid,
  input  disp_instr_t [DISP_W-1:0]      disp_instr,
  output logic [DISP_W-1:0]             disp_accept,
  output logic [DISP_W-1:0][BW-1:0]     disp_blk,
  output logic [DISP_W-1:0][IW-1:0]     disp_ent,
  // result tag broadcast
  input  logic [WB_W-1:0]               wb_valid,
  input  tag_t [WB_W-1:0]               wb_tag,
  // issue
  output logic [ISS_W-1:0]              iss_valid,
  output issue_instr_t [ISS_W-1:0]      iss_instr,
  // branch misprediction
  input  logic                          flush_valid,
  input  rob_t                          flush_rob,
  input  rob_t                          rob_head,
  // statistics
  input  logic                          stats_clr,
  output logic [CW-1:0]                 cyc_cmp,
  output logic [CW-1:0]                 cyc_match,
  output logic [CW-1:0]                 cyc_blk_act,
  output logic [CW-1:0]                 cyc_bcast,
  output logic [$clog2(IQS+1)-1:0]      occupancy,
  output logic [31:0]                   total_cmp,
  output logic [31:0]                   total_match,
  output logic [31:0]                   total_nomatch,
  output logic [31:0]                   total_blk_act,
  output logic [31:0]                   total_bcast
);

  localparam int unsigned BCW = $clog2(2*WB_W*EPB + 1);

  // ---------------------------------------------------------------- state view
  logic     [IQS-1:0] busy, irdy;
  iq_data_t [IQS-1:0] data;

  // Broadcast as seen by the CAM: the tags, and the BE read for each of them.
  logic [WB_W-1:0]           cam_valid;
  tag_t [WB_W-1:0]           cam_tag;
  logic [WB_W-1:0][NBLK-1:0] cam_be;

  // ---------------------------------------------------------------- dispatch
  logic [DISP_W-1:0][1:0] src_rdy_eff;

  always_comb begin
    for (int d = 0; d < DISP_W; d++) begin
      for (int k = 0; k < 2; k++) begin
        src_rdy_eff[d][k] = !disp_instr[d].src_valid[k] || disp_instr[d].src_rdy[k];
        for (int w = 0; w < WB_W; w++)
          if (cam_valid[w] && cam_tag[w] == disp_instr[d].src[k]) src_rdy_eff[d][k] = 1'b1;
      end
    end
  end

  block_assign #(.NBLK(NBLK), .EPB(EPB), .DISP_W(DISP_W)) u_assign (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (!flush_valid),
    .disp_valid (disp_valid),
    .free       (~busy),
    .accept     (disp_accept),
    .blk        (disp_blk),
    .ent        (disp_ent)
  );

  logic     [IQS-1:0]         wr_en;
  iq_data_t [IQS-1:0]         wr_data;
  logic     [IQS-1:0][SW-1:0] wr_slot;

  always_comb begin
    wr_en   = '0;
    wr_data = '0;
    wr_slot = '0;
    for (int d = 0; d < DISP_W; d++) begin
      if (disp_accept[d]) begin
        wr_en[disp_ent[d]]          = 1'b1;
        wr_slot[disp_ent[d]]        = SW'(d);
        wr_data[disp_ent[d]].opcode    = disp_instr[d].opcode;
        wr_data[disp_ent[d]].dst_valid = disp_instr[d].dst_valid;
        wr_data[disp_ent[d]].dst       = disp_instr[d].dst;
        wr_data[disp_ent[d]].src       = disp_instr[d].src;
        wr_data[disp_ent[d]].rdy       = src_rdy_eff[d];
        wr_data[disp_ent[d]].rob       = disp_instr[d].rob;
      end
    end
  end

  // ---------------------------------------------------------------- block mapping table
  logic [DISP_W-1:0]           bt_clr_en;
  tag_t [DISP_W-1:0]           bt_clr_tag;
  logic [DISP_W-1:0][1:0]      bt_set_en;
  tag_t [DISP_W-1:0][1:0]      bt_set_tag;
  logic [WB_W-1:0][NBLK-1:0]   be;

  always_comb begin
    for (int d = 0; d < DISP_W; d++) begin
      bt_clr_en[d]  = disp_accept[d] && disp_instr[d].dst_valid;
      bt_clr_tag[d] = disp_instr[d].dst;
      for (int k = 0; k < 2; k++) begin
        bt_set_en[d][k]  = disp_accept[d] && !src_rdy_eff[d][k];
        bt_set_tag[d][k] = disp_instr[d].src[k];
      end
    end
  end

  block_table #(.NBLK(NBLK), .NREGS(NUM_PREGS), .DISP_W(DISP_W), .WB_W(WB_W)) u_bt (
    .clk     (clk),
    .rst_n   (rst_n),
    .rd_tag  (wb_tag),
    .rd_be   (be),
    .clr_en  (bt_clr_en),
    .clr_tag (bt_clr_tag),
    .set_en  (bt_set_en),
    .set_tag (bt_set_tag),
    .set_blk (disp_blk)
  );

  // ---------------------------------------------------------------- BT-to-CAM timing
  if (BT_PIPE) begin : g_bt_pipe
    // The tags arrive one cycle before the CAM search. The BE read now is
    // latched for the next cycle, with the bits that this cycle's dispatches
    // set for the same registers merged in, since those writes land after the
    // read.
    logic [WB_W-1:0][NBLK-1:0] be_fwd;
    always_comb begin
      be_fwd = be;
      for (int w = 0; w < WB_W; w++)
        for (int d = 0; d < DISP_W; d++)
          for (int k = 0; k < 2; k++)
            if (bt_set_en[d][k] && bt_set_tag[d][k] == wb_tag[w]) begin
              if (NBLK == 1) be_fwd[w][0] = 1'b1;
              else           be_fwd[w][disp_blk[d]] = 1'b1;
            end
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        cam_valid <= '0;
        cam_tag   <= '0;
        cam_be    <= '0;
      end else begin
        cam_valid <= wb_valid;
        cam_tag   <= wb_tag;
        cam_be    <= be_fwd;
      end
    end
  end else begin : g_bt_direct
    assign cam_valid = wb_valid;
    assign cam_tag   = wb_tag;
    assign cam_be    = be;
  end

  // ---------------------------------------------------------------- select and squash
  logic [IQS-1:0]             grant, squash, clr;
  logic [ISS_W-1:0][IW-1:0]   port_idx;

  select_logic #(.IQS(IQS), .ISS_W(ISS_W), .DISP_W(DISP_W)) u_select (
    .clk        (clk),
    .rst_n      (rst_n),
    .en         (!flush_valid),
    .req        (irdy),
    .alloc      (wr_en),
    .alloc_slot (wr_slot),
    .grant      (grant),
    .port_valid (iss_valid),
    .port_idx   (port_idx)
  );

  always_comb begin
    rob_t br_age;
    br_age = flush_rob - rob_head;
    for (int i = 0; i < IQS; i++)
      squash[i] = flush_valid && busy[i] && (rob_t'(data[i].rob - rob_head) > br_age);
    for (int p = 0; p < ISS_W; p++) begin
      iss_instr[p].opcode    = data[port_idx[p]].opcode;
      iss_instr[p].dst_valid = data[port_idx[p]].dst_valid;
      iss_instr[p].dst       = data[port_idx[p]].dst;
      iss_instr[p].rob       = data[port_idx[p]].rob;
    end
  end

  assign clr = grant | squash;

  // ---------------------------------------------------------------- blocks
  logic [NBLK-1:0][BCW-1:0] blk_cmp, blk_match;

  for (genvar b = 0; b < NBLK; b++) begin : g_blk
    logic [WB_W-1:0] blk_en;
    always_comb
      for (int w = 0; w < WB_W; w++) blk_en[w] = cam_be[w][b];

    iq_block #(.EPB(EPB), .WB_W(WB_W)) u_blk (
      .clk       (clk),
      .rst_n     (rst_n),
      .wb_valid  (cam_valid),
      .wb_tag    (cam_tag),
      .blk_en    (blk_en),
      .wr_en     (wr_en[b*EPB +: EPB]),
      .wr_data   (wr_data[b*EPB +: EPB]),
      .clr       (clr[b*EPB +: EPB]),
      .busy      (busy[b*EPB +: EPB]),
      .data      (data[b*EPB +: EPB]),
      .irdy      (irdy[b*EPB +: EPB]),
      .cmp_cnt   (blk_cmp[b]),
      .match_cnt (blk_match[b])
    );
  end

  // ---------------------------------------------------------------- statistics
  always_comb begin
    cyc_cmp     = '0;
    cyc_match   = '0;
    cyc_blk_act = '0;
    cyc_bcast   = '0;
    occupancy   = '0;
    for (int b = 0; b < NBLK; b++) begin
      cyc_cmp   = cyc_cmp   + CW'(blk_cmp[b]);
      cyc_match = cyc_match + CW'(blk_match[b]);
    end
    for (int w = 0; w < WB_W; w++) begin
      if (cam_valid[w]) begin
        cyc_bcast = cyc_bcast + CW'(1);
        for (int b = 0; b < NBLK; b++)
          if (cam_be[w][b]) cyc_blk_act = cyc_blk_act + CW'(1);
      end
    end
    for (int i = 0; i < IQS; i++)
      if (busy[i]) occupancy = occupancy + 1'b1;
  end

  wakeup_stats #(.IN_W(CW), .CNT_W(32)) u_stats (
    .clk           (clk),
    .rst_n         (rst_n),
    .clr           (stats_clr),
    .cmp_cnt       (cyc_cmp),
    .match_cnt     (cyc_match),
    .blk_act_cnt   (cyc_blk_act),
    .bcast_cnt     (cyc_bcast),
    .total_cmp     (total_cmp),
    .total_match   (total_match),
    .total_nomatch (total_nomatch),
    .total_blk_act (total_blk_act),
    .total_bcast   (total_bcast)
  );

  // ---------------------------------------------------------------- checks
  // Dispatch only writes free entries, and an entry is never written and
  // freed in the same cycle.
  a_wr_free: assert property (@(posedge clk) disable iff (!rst_n) (wr_en & busy) == '0);
  a_wr_clr:  assert property (@(posedge clk) disable iff (!rst_n) (wr_en & clr) == '0);
  // Accepted instructions form an in-order prefix of the valid ones.
  a_inorder: assert property (@(posedge clk) disable iff (!rst_n)
                              ((disp_accept + 1'b1) & disp_accept) == '0);

  if (IQS % NBLK != 0) begin : g_bad_cfg
    $error("IQS must be a multiple of NBLK");
  end

endmodule
