// wakeup_top: the integer and floating-point instruction queues of an
// out-of-order core, each built as a multi-block queue with its own block
// mapping table.
//
// Integer and floating-point instructions wait in separate queues, each woken
// by the result tags of its own register file (128 physical registers each).
// Both queues use the same organisation: IQS entries in NBLK blocks (32 entries
// in 8 blocks by default), 4-wide dispatch, 4 result tags per cycle and 4-wide
// issue, and the block mapping table read in the cycle of the CAM search
// (BT_PIPE = 0; see multiblock_iq for BT_PIPE = 1). A branch misprediction
// (flush_valid, flush_rob, rob_head) squashes the younger instructions of both
// queues in the same cycle. All other ports are the
// ports of multiblock_iq, once with the prefix int_ and once with fp_; see that
// module for their timing. The load/store queue and the rest of the core are
// outside this module.
// The split into integer and f.p. queues and the sizes follow the published design; the
// shared squash port is this design's choice.
module wakeup_top
  import iq_pkg::*;
#(
  parameter int unsigned IQS    = 32,
  parameter int unsigned NBLK   = 8,
  parameter int unsigned DISP_W = 4,
  parameter int unsigned WB_W   = 4,
  parameter int unsigned ISS_W  = 4,
  parameter bit          BT_PIPE = 1'b0,
  localparam int unsigned BW    = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned IW    = (IQS > 1) ? $clog2(IQS) : 1,
  localparam int unsigned CW    = $clog2(2*WB_W*IQS + 1)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          flush_valid,
  input  rob_t                          flush_rob,
  input  rob_t                          rob_head,
  input  logic                          stats_clr,
  // integer queue
  input  logic [DISP_W-1:0]             int_disp_valid,
  input  disp_instr_t [DISP_W-1:0]      int_disp_instr,
  output logic [DISP_W-1:0]             int_disp_accept,
  output logic [DISP_W-1:0][BW-1:0]     int_disp_blk,
  output logic [DISP_W-1:0][IW-1:0]     int_disp_ent,
  input  logic [WB_W-1:0]               int_wb_valid,
  input  tag_t [WB_W-1:0]               int_wb_tag,
  output logic [ISS_W-1:0]              int_iss_valid,
  output issue_instr_t [ISS_W-1:0]      int_iss_instr,
  output logic [CW-1:0]                 int_cyc_cmp,
  output logic [CW-1:0]                 int_cyc_match,
  output logic [CW-1:0]                 int_cyc_blk_act,
  output logic [CW-1:0]                 int_cyc_bcast,
  output logic [$clog2(IQS+1)-1:0]      int_occupancy,
  output logic [31:0]                   int_total_cmp,
  output logic [31:0]                   int_total_match,
  output logic [31:0]                   int_total_nomatch,
  output logic [31:0]                   int_total_blk_act,
  output logic [31:0]                   int_total_bcast,
  // floating-point queue
  input  logic [DISP_W-1:0]             fp_disp_valid,
  input  disp_instr_t [DISP_W-1:0]      fp_disp_instr,
  output logic [DISP_W-1:0]             fp_disp_accept,
  output logic [DISP_W-1:0][BW-1:0]     fp_disp_blk,
  output logic [DISP_W-1:0][IW-1:0]     fp_disp_ent,
  input  logic [WB_W-1:0]               fp_wb_valid,
  input  tag_t [WB_W-1:0]               fp_wb_tag,
  output logic [ISS_W-1:0]              fp_iss_valid,
  output issue_instr_t [ISS_W-1:0]      fp_iss_instr,
  output logic [CW-1:0]                 fp_cyc_cmp,
  output logic [CW-1:0]                 fp_cyc_match,
  output logic [CW-1:0]                 fp_cyc_blk_act,
  output logic [CW-1:0]                 fp_cyc_bcast,
  output logic [$clog2(IQS+1)-1:0]      fp_occupancy,
  output logic [31:0]                   fp_total_cmp,
  output logic [31:0]                   fp_total_match,
  output logic [31:0]                   fp_total_nomatch,
  output logic [31:0]                   fp_total_blk_act,
  output logic [31:0]                   fp_total_bcast
);

  // integer queue: woken by integer result tags
  multiblock_iq #(.IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W),
                  .BT_PIPE(BT_PIPE)) u_int_iq (
    .clk           (clk),
    .rst_n         (rst_n),
    .disp_valid    (int_disp_valid),
    .disp_instr    (int_disp_instr),
    .disp_accept   (int_disp_accept),
    .disp_blk      (int_disp_blk),
    .disp_ent      (int_disp_ent),
    .wb_valid      (int_wb_valid),
    .wb_tag        (int_wb_tag),
    .iss_valid     (int_iss_valid),
    .iss_instr     (int_iss_instr),
    .flush_valid   (flush_valid),
    .flush_rob     (flush_rob),
    .rob_head      (rob_head),
    .stats_clr     (stats_clr),
    .cyc_cmp       (int_cyc_cmp),
    .cyc_match     (int_cyc_match),
    .cyc_blk_act   (int_cyc_blk_act),
    .cyc_bcast     (int_cyc_bcast),
    .occupancy     (int_occupancy),
    .total_cmp     (int_total_cmp),
    .total_match   (int_total_match),
    .total_nomatch (int_total_nomatch),
    .total_blk_act (int_total_blk_act),
    .total_bcast   (int_total_bcast)
  );

  // floating-point queue: woken by f.p. result tags
  multiblock_iq #(.IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W),
                  .BT_PIPE(BT_PIPE)) u_fp_iq (
    .clk           (clk),
    .rst_n         (rst_n),
    .disp_valid    (fp_disp_valid),
    .disp_instr    (fp_disp_instr),
    .disp_accept   (fp_disp_accept),
    .disp_blk      (fp_disp_blk),
    .disp_ent      (fp_disp_ent),
    .wb_valid      (fp_wb_valid),
    .wb_tag        (fp_wb_tag),
    .iss_valid     (fp_iss_valid),
    .iss_instr     (fp_iss_instr),
    .flush_valid   (flush_valid),
    .flush_rob     (flush_rob),
    .rob_head      (rob_head),
    .stats_clr     (stats_clr),
    .cyc_cmp       (fp_cyc_cmp),
    .cyc_match     (fp_cyc_match),
    .cyc_blk_act   (fp_cyc_blk_act),
    .cyc_bcast     (fp_cyc_bcast),
    .occupancy     (fp_occupancy),
    .total_cmp     (fp_total_cmp),
    .total_match   (fp_total_match),
    .total_nomatch (fp_total_nomatch),
    .total_blk_act (fp_total_blk_act),
    .total_bcast   (fp_total_bcast)
  );

endmodule
