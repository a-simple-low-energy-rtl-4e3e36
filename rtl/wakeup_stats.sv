// wakeup_stats: running totals of the wakeup activity of one queue.
//
// The energy of the wakeup logic is proportional to the number of tag
// comparisons performed, split into those that match ("Match", necessary) and
// the rest ("No-Match", unnecessary). Each cycle the queue reports how many
// comparisons and matches its CAM performed, how many blocks were precharged
// and how many result tags were broadcast; this block adds them into CNT_W-bit
// counters that saturate instead of wrapping. clr zeroes all counters at the
// clock edge (e.g. after a warm-up period). Divide the totals by the number of
// committed instructions to obtain comparisons per committed instruction.
// The Match / No-Match split is the published design's; counter width, saturation and
// the clear input are this design's choices.
module wakeup_stats #(
  parameter int unsigned IN_W  = 9,
  parameter int unsigned CNT_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic [IN_W-1:0]   cmp_cnt,
  input  logic [IN_W-1:0]   match_cnt,
  input  logic [IN_W-1:0]   blk_act_cnt,
  input  logic [IN_W-1:0]   bcast_cnt,
  output logic [CNT_W-1:0]  total_cmp,
  output logic [CNT_W-1:0]  total_match,
  output logic [CNT_W-1:0]  total_nomatch,
  output logic [CNT_W-1:0]  total_blk_act,
  output logic [CNT_W-1:0]  total_bcast
);

  function automatic logic [CNT_W-1:0] sat_add(logic [CNT_W-1:0] a, logic [IN_W-1:0] b);
    logic [CNT_W:0] s;
    s = {1'b0, a} + (CNT_W+1)'(b);
    return s[CNT_W] ? '1 : s[CNT_W-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      total_cmp     <= '0;
      total_match   <= '0;
      total_nomatch <= '0;
      total_blk_act <= '0;
      total_bcast   <= '0;
    end else if (clr) begin
      total_cmp     <= '0;
      total_match   <= '0;
      total_nomatch <= '0;
      total_blk_act <= '0;
      total_bcast   <= '0;
    end else begin
      total_cmp     <= sat_add(total_cmp,     cmp_cnt);
      total_match   <= sat_add(total_match,   match_cnt);
      total_nomatch <= sat_add(total_nomatch, cmp_cnt - match_cnt);
      total_blk_act <= sat_add(total_blk_act, blk_act_cnt);
      total_bcast   <= sat_add(total_bcast,   bcast_cnt);
    end
  end

endmodule
