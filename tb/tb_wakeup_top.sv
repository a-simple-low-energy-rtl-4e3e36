// tb_wakeup_top: end-to-end test of the integer and floating-point queues.
//
// wakeup_top is instantiated with its default configuration (32-entry queues
// of 8 blocks, 4-wide dispatch, wakeup and issue, 128 physical registers per
// file). iq_core_model drives both queues with independent dependent
// instruction streams that share one ROB numbering, so every misprediction
// squashes younger instructions in both queues in the same cycle. Each cycle it
// checks comparison and match counts against a reference block mapping table,
// dispatch acceptance, oldest-ready-first issue and wakeup correctness, and at
// the end that both queues drained and that every mechanism (dispatch stall,
// dispatch bypass, issue saturation, squash, gated broadcast, unneeded block
// activation, instructions without destination or sources) occurred.
module tb_wakeup_top;
  import iq_pkg::*;

  localparam int unsigned IQS = 32, NBLK = 8, DISP_W = 4, WB_W = 4, ISS_W = 4;
  localparam int unsigned BW = $clog2(NBLK), IW = $clog2(IQS);
  localparam int unsigned CW = $clog2(2*WB_W*IQS + 1);

  logic clk = 0;
  logic rst_n;
  always #5 clk = ~clk;

  logic [DISP_W-1:0]          disp_valid  [2];
  disp_instr_t [DISP_W-1:0]   disp_instr  [2];
  logic [DISP_W-1:0]          disp_accept [2];
  logic [DISP_W-1:0][BW-1:0]  disp_blk    [2];
  logic [DISP_W-1:0][IW-1:0]  disp_ent    [2];
  logic [WB_W-1:0]            wb_valid    [2];
  tag_t [WB_W-1:0]            wb_tag      [2];
  logic [ISS_W-1:0]           iss_valid   [2];
  issue_instr_t [ISS_W-1:0]   iss_instr   [2];
  logic [CW-1:0]              cyc_cmp [2], cyc_match [2], cyc_blk_act [2], cyc_bcast [2];
  logic [$clog2(IQS+1)-1:0]   occupancy [2];
  logic [31:0]                total_cmp [2], total_match [2], total_nomatch [2];
  logic [31:0]                total_blk_act [2], total_bcast [2];
  logic                       flush_valid, stats_clr, done;
  rob_t                       flush_rob, rob_head;
  int                         checks, failures;
  longint                     stat_cmp, stat_model_a, stat_issued;

  wakeup_top dut (
    .clk, .rst_n, .flush_valid, .flush_rob, .rob_head, .stats_clr,
    .int_disp_valid (disp_valid[0]), .int_disp_instr (disp_instr[0]),
    .int_disp_accept(disp_accept[0]), .int_disp_blk (disp_blk[0]), .int_disp_ent (disp_ent[0]),
    .int_wb_valid (wb_valid[0]), .int_wb_tag (wb_tag[0]),
    .int_iss_valid (iss_valid[0]), .int_iss_instr (iss_instr[0]),
    .int_cyc_cmp (cyc_cmp[0]), .int_cyc_match (cyc_match[0]),
    .int_cyc_blk_act (cyc_blk_act[0]), .int_cyc_bcast (cyc_bcast[0]),
    .int_occupancy (occupancy[0]),
    .int_total_cmp (total_cmp[0]), .int_total_match (total_match[0]),
    .int_total_nomatch (total_nomatch[0]), .int_total_blk_act (total_blk_act[0]),
    .int_total_bcast (total_bcast[0]),
    .fp_disp_valid (disp_valid[1]), .fp_disp_instr (disp_instr[1]),
    .fp_disp_accept(disp_accept[1]), .fp_disp_blk (disp_blk[1]), .fp_disp_ent (disp_ent[1]),
    .fp_wb_valid (wb_valid[1]), .fp_wb_tag (wb_tag[1]),
    .fp_iss_valid (iss_valid[1]), .fp_iss_instr (iss_instr[1]),
    .fp_cyc_cmp (cyc_cmp[1]), .fp_cyc_match (cyc_match[1]),
    .fp_cyc_blk_act (cyc_blk_act[1]), .fp_cyc_bcast (cyc_bcast[1]),
    .fp_occupancy (occupancy[1]),
    .fp_total_cmp (total_cmp[1]), .fp_total_match (total_match[1]),
    .fp_total_nomatch (total_nomatch[1]), .fp_total_blk_act (total_blk_act[1]),
    .fp_total_bcast (total_bcast[1])
  );

  iq_core_model #(.NQ(2), .IQS(IQS), .NBLK(NBLK), .DISP_W(DISP_W), .WB_W(WB_W), .ISS_W(ISS_W),
                  .NCYC(3000), .FLUSH_PERIOD(150), .SEED(11)) core (
    .clk, .rst_n, .disp_valid, .disp_instr, .disp_accept, .disp_blk, .wb_valid, .wb_tag,
    .iss_valid, .iss_instr, .cyc_cmp, .cyc_match, .occupancy, .total_cmp, .total_match,
    .flush_valid, .flush_rob, .rob_head, .stats_clr, .stat_cmp, .stat_model_a, .stat_issued,
    .checks, .failures, .done
  );

  // Running totals of the remaining statistics outputs, kept by the testbench
  // from the per-cycle outputs and compared at the end.
  longint s_act [2], s_bc [2], s_nm [2];
  int extra = 0, extra_fail = 0;
  initial for (int q = 0; q < 2; q++) begin s_act[q] = 0; s_bc[q] = 0; s_nm[q] = 0; end
  always @(posedge clk) if (rst_n)
    for (int q = 0; q < 2; q++) begin
      s_act[q] += cyc_blk_act[q];
      s_bc[q]  += cyc_bcast[q];
      s_nm[q]  += cyc_cmp[q] - cyc_match[q];
    end

  initial begin
    int wd = 0;
    while (!done && wd < 200000) begin @(posedge clk); wd++; end
    @(negedge clk);
    for (int q = 0; q < 2; q++) begin
      extra += 3;
      if (longint'(total_blk_act[q]) != s_act[q]) extra_fail++;
      if (longint'(total_bcast[q])   != s_bc[q])  extra_fail++;
      if (longint'(total_nomatch[q]) != s_nm[q])  extra_fail++;
      $display("%0s queue: comparisons %0d (match %0d, no-match %0d), block activations %0d, broadcasts %0d",
               (q == 0) ? "integer" : "fp", total_cmp[q], total_match[q], total_nomatch[q],
               total_blk_act[q], total_bcast[q]);
    end
    if (!done) $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks + extra,
             failures + extra_fail + (done ? 0 : 1));
    $finish;
  end

endmodule
