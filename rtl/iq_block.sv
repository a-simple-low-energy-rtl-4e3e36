// iq_block: one block of the multi-block instruction queue.
//
// A block is a group of EPB entries (IQS/n of the whole queue) whose CAM can be
// enabled for tag comparison separately from every other block. Blocks are off
// by default: for broadcast w the block compares only when blk_en[w] is set,
// i.e. when the block enable vector read from the block mapping table for that
// destination tag has this block's bit on. Inside an enabled block only active
// operands (busy entry, operand not ready) compare, as in iq_entry.
//
// Interface: per-entry write (wr_en/wr_data) and clear (clr) strobes come from
// the queue's dispatch, select and squash logic; busy/data/irdy of every entry
// go to the select logic. cmp_cnt/match_cnt are this cycle's comparison and
// match totals of the block. Timing is that of iq_entry (one-cycle wakeup).
// Structure and gating follow the published design; the per-block counters are this
// design's addition for measuring.
module iq_block
  import iq_pkg::*;
#(
  parameter int unsigned EPB  = 4,                 // entries per block (32 / 8)
  parameter int unsigned WB_W = 4
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic [WB_W-1:0]                 wb_valid,
  input  tag_t [WB_W-1:0]                 wb_tag,
  input  logic [WB_W-1:0]                 blk_en,
  input  logic [EPB-1:0]                  wr_en,
  input  iq_data_t [EPB-1:0]              wr_data,
  input  logic [EPB-1:0]                  clr,
  output logic [EPB-1:0]                  busy,
  output iq_data_t [EPB-1:0]              data,
  output logic [EPB-1:0]                  irdy,
  output logic [$clog2(2*WB_W*EPB+1)-1:0] cmp_cnt,
  output logic [$clog2(2*WB_W*EPB+1)-1:0] match_cnt
);

  localparam int unsigned ECW = $clog2(2*WB_W+1);
  localparam int unsigned BCW = $clog2(2*WB_W*EPB+1);

  logic [EPB-1:0][ECW-1:0] e_cmp, e_match;

  for (genvar e = 0; e < EPB; e++) begin : g_ent
    iq_entry #(.WB_W(WB_W)) u_entry (
      .clk       (clk),
      .rst_n     (rst_n),
      .wr_en     (wr_en[e]),
      .wr_data   (wr_data[e]),
      .clr       (clr[e]),
      .wb_valid  (wb_valid),
      .wb_tag    (wb_tag),
      .blk_en    (blk_en),
      .busy      (busy[e]),
      .data      (data[e]),
      .irdy      (irdy[e]),
      .cmp_cnt   (e_cmp[e]),
      .match_cnt (e_match[e])
    );
  end

  always_comb begin
    cmp_cnt   = '0;
    match_cnt = '0;
    for (int e = 0; e < EPB; e++) begin
      cmp_cnt   = cmp_cnt   + BCW'(e_cmp[e]);
      match_cnt = match_cnt + BCW'(e_match[e]);
    end
  end

endmodule
