// tb_multiblock_iq: end-to-end test of one multi-block instruction queue.
//
// Two queues of the default size (32 entries in 8 blocks, 4-wide dispatch,
// wakeup and issue) are tested side by side: one reads the block mapping table
// in the cycle of the CAM search (BT_PIPE = 0), the other receives the result
// tags one cycle early and latches the block enable vector (BT_PIPE = 1). Each
// is driven by its own iq_core_model, which runs a random dependent
// instruction stream with branch mispredictions and checks every cycle the
// comparison and match counts against a reference model of the block mapping
// table, dispatch acceptance, oldest-ready-first issue and wakeup correctness.
// Block activations per cycle are also checked never to exceed
// broadcasts x blocks.
module tb_multiblock_iq;
  import iq_pkg::*;

  localparam int unsigned IQS = 32, NBLK = 8, DISP_W = 4, WB_W = 4, ISS_W = 4;
  localparam int unsigned BW = $clog2(NBLK), IW = $clog2(IQS);
  localparam int unsigned CW = $clog2(2*WB_W*IQS + 1);

  logic clk = 0;
  always #5 clk = ~clk;

  int   checks_v [2], failures_v [2], extra_v [2], extra_fail_v [2];
  logic done_v [2];

  for (genvar v = 0; v < 2; v++) begin : g_var
    logic rst_n;
    logic [DISP_W-1:0]          disp_valid  [1];
    disp_instr_t [DISP_W-1:0]   disp_instr  [1];
    logic [DISP_W-1:0]          disp_accept [1];
    logic [DISP_W-1:0][BW-1:0]  disp_blk    [1];
    logic [DISP_W-1:0][IW-1:0]  disp_ent;
    logic [WB_W-1:0]            wb_valid    [1];
    tag_t [WB_W-1:0]            wb_tag      [1];
    logic [ISS_W-1:0]           iss_valid   [1];
    issue_instr_t [ISS_W-1:0]   iss_instr   [1];
    logic [CW-1:0]              cyc_cmp [1], cyc_match [1], cyc_blk_act, cyc_bcast;
    logic [$clog2(IQS+1)-1:0]   occupancy [1];
    logic [31:0]                total_cmp [1], total_match [1], total_nomatch, total_blk_act, total_bcast;
    logic                       flush_valid, stats_clr;
    rob_t                       flush_rob, rob_head;
    longint                     stat_cmp, stat_model_a, stat_issued;

    multiblock_iq #(.IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W),
                    .BT_PIPE(v == 1)) dut (
      .clk, .rst_n,
      .disp_valid (disp_valid[0]), .disp_instr (disp_instr[0]),
      .disp_accept(disp_accept[0]), .disp_blk (disp_blk[0]), .disp_ent,
      .wb_valid (wb_valid[0]), .wb_tag (wb_tag[0]),
      .iss_valid (iss_valid[0]), .iss_instr (iss_instr[0]),
      .flush_valid, .flush_rob, .rob_head, .stats_clr,
      .cyc_cmp (cyc_cmp[0]), .cyc_match (cyc_match[0]), .cyc_blk_act, .cyc_bcast,
      .occupancy (occupancy[0]),
      .total_cmp (total_cmp[0]), .total_match (total_match[0]), .total_nomatch,
      .total_blk_act, .total_bcast
    );

    iq_core_model #(.NQ(1), .IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W),
                    .NCYC(4000), .FLUSH_PERIOD(150), .SEED(7 + v), .WB_DELAY(v == 1)) core (
      .clk, .rst_n, .disp_valid, .disp_instr, .disp_accept, .disp_blk, .wb_valid, .wb_tag,
      .iss_valid, .iss_instr, .cyc_cmp, .cyc_match, .occupancy, .total_cmp, .total_match,
      .flush_valid, .flush_rob, .rob_head, .stats_clr, .stat_cmp, .stat_model_a, .stat_issued,
      .checks (checks_v[v]), .failures (failures_v[v]), .done (done_v[v])
    );

    initial begin extra_v[v] = 0; extra_fail_v[v] = 0; end
    always @(negedge clk) if (rst_n) begin
      #2;
      extra_v[v]++;
      if (cyc_blk_act > cyc_bcast * NBLK) extra_fail_v[v]++;
    end
  end

  initial begin
    int wd = 0;
    while (!(done_v[0] && done_v[1]) && wd < 200000) begin @(posedge clk); wd++; end
    #20;
    if (!(done_v[0] && done_v[1])) $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d",
             checks_v[0] + checks_v[1] + extra_v[0] + extra_v[1],
             failures_v[0] + failures_v[1] + extra_fail_v[0] + extra_fail_v[1] +
             ((done_v[0] && done_v[1]) ? 0 : 1));
    $finish;
  end

endmodule
