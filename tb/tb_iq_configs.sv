// tb_iq_configs: the queue organisations compared in the evaluation, run on
// the same kind of synthetic dependent instruction stream.
//
// One multiblock_iq per configuration: 32-entry queues with 1, 2, 4, 8, 16 and
// 32 blocks and 64-entry queues with 1, 4, 8 and 64 blocks (block size 1 means
// one entry per block). Each is driven and checked by its own iq_core_model
// (same stream parameters and seed). At the end the comparisons per issued
// instruction are printed next to the all-active-entries baseline, and the
// testbench checks the expected trend: for each queue size, more blocks never
// give more comparisons per instruction (with 5% tolerance for the differing
// schedules), and every multi-block organisation beats the baseline.
module tb_iq_configs;
  import iq_pkg::*;

  localparam int NCFG = 10;
  localparam int CFG_IQS  [NCFG] = '{32, 32, 32, 32, 32, 32, 64, 64, 64, 64};
  localparam int CFG_NBLK [NCFG] = '{ 1,  2,  4,  8, 16, 32,  1,  4,  8, 64};

  logic clk = 0;
  always #5 clk = ~clk;

  int     checks_c [NCFG], failures_c [NCFG];
  logic   done_c   [NCFG];
  longint cmp_c [NCFG], ma_c [NCFG], iss_c [NCFG];

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    localparam int unsigned IQS = CFG_IQS[c], NBLK = CFG_NBLK[c];
    localparam int unsigned DISP_W = 4, WB_W = 4, ISS_W = 4;
    localparam int unsigned BW = (NBLK > 1) ? $clog2(NBLK) : 1, IW = $clog2(IQS);
    localparam int unsigned CW = $clog2(2*WB_W*IQS + 1);

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

    multiblock_iq #(.IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W)) dut (
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
                    .NCYC(3000), .FLUSH_PERIOD(150), .SEED(3)) core (
      .clk, .rst_n, .disp_valid, .disp_instr, .disp_accept, .disp_blk, .wb_valid, .wb_tag,
      .iss_valid, .iss_instr, .cyc_cmp, .cyc_match, .occupancy, .total_cmp, .total_match,
      .flush_valid, .flush_rob, .rob_head, .stats_clr,
      .stat_cmp (cmp_c[c]), .stat_model_a (ma_c[c]), .stat_issued (iss_c[c]),
      .checks (checks_c[c]), .failures (failures_c[c]), .done (done_c[c])
    );
  end

  function automatic real per_instr(longint n, longint d);
    return (d > 0) ? real'(n) / real'(d) : 0.0;
  endfunction

  initial begin
    int checks = 0, failures = 0, wd = 0;
    bit all_done = 0;
    while (!all_done && wd < 300000) begin
      @(posedge clk);
      wd++;
      all_done = 1;
      for (int c = 0; c < NCFG; c++) if (!done_c[c]) all_done = 0;
    end
    #20;
    if (!all_done) begin
      failures++;
      $display("watchdog expired");
    end
    for (int c = 0; c < NCFG; c++) begin
      checks += checks_c[c];
      failures += failures_c[c];
      $display("IQ %0d entries, %0d blocks: %0.2f comparisons/instruction (all-active baseline %0.2f)",
               CFG_IQS[c], CFG_NBLK[c], per_instr(cmp_c[c], iss_c[c]), per_instr(ma_c[c], iss_c[c]));
      checks++;
      if (!(cmp_c[c] < ma_c[c])) begin
        failures++;
        $display("FAIL configuration %0d does not beat the baseline", c);
      end
    end
    for (int c = 1; c < NCFG; c++)
      if (CFG_IQS[c] == CFG_IQS[c-1]) begin
        checks++;
        if (per_instr(cmp_c[c], iss_c[c]) > 1.05 * per_instr(cmp_c[c-1], iss_c[c-1])) begin
          failures++;
          $display("FAIL more blocks gave more comparisons (configuration %0d)", c);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
