// iq_entry: one instruction queue entry, RAM part plus CAM part.
//
// The RAM part holds the opcode, the destination tag, the ROB index and the
// busy bit; the CAM part holds the two source tags and their ready flags
// (Op1Rdy, Op2Rdy). Each cycle up to WB_W completing instructions broadcast
// their destination tag, so the entry has 2*WB_W comparators (8 for a 4-wide
// machine). A comparator is only exercised -- its match line precharged -- when
//   * the block enable of that broadcast selects this entry's block
//     (blk_en[w], read from the block mapping table), and
//   * the entry is busy and that operand is not yet ready ("active" operand).
// A match sets the operand's ready flag at the next clock edge; the entry is
// ready to issue (IRdy) when both flags are set. cmp_cnt and match_cnt report how
// many comparisons were performed this cycle and how many of them matched, the
// quantities the energy estimate is built on.
//
// Timing: wr_en loads the entry at the clock edge (busy=1, ready flags as
// given); clr (issue or squash) frees it at the edge. Wakeup is one cycle:
// a tag broadcast in cycle t makes irdy visible in cycle t+1.
// The gating conditions follow the published design; the counter outputs and the
// priority of wr_en over clr are this design's choices.
module iq_entry
  import iq_pkg::*;
#(
  parameter int unsigned WB_W = 4                  // completing instructions per cycle
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          wr_en,
  input  iq_data_t                      wr_data,
  input  logic                          clr,
  input  logic [WB_W-1:0]               wb_valid,
  input  tag_t [WB_W-1:0]               wb_tag,
  input  logic [WB_W-1:0]               blk_en,    // precharge enable per broadcast
  output logic                          busy,
  output iq_data_t                      data,
  output logic                          irdy,
  output logic [$clog2(2*WB_W+1)-1:0]   cmp_cnt,
  output logic [$clog2(2*WB_W+1)-1:0]   match_cnt
);

  localparam int unsigned CW = $clog2(2*WB_W+1);

  iq_data_t   q;
  logic       busy_q;
  logic [1:0] hit;

  always_comb begin
    hit       = '0;
    cmp_cnt   = '0;
    match_cnt = '0;
    for (int w = 0; w < WB_W; w++) begin
      for (int k = 0; k < 2; k++) begin
        if (wb_valid[w] && blk_en[w] && busy_q && !q.rdy[k]) begin
          cmp_cnt = cmp_cnt + CW'(1);
          if (wb_tag[w] == q.src[k]) begin
            hit[k]    = 1'b1;
            match_cnt = match_cnt + CW'(1);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      q      <= '0;
    end else if (wr_en) begin
      busy_q <= 1'b1;
      q      <= wr_data;
    end else if (clr) begin
      busy_q <= 1'b0;
    end else begin
      q.rdy  <= q.rdy | hit;
    end
  end

  assign busy = busy_q;
  assign data = q;
  assign irdy = busy_q && (&q.rdy);

endmodule
