// tb_iq_block: self-checking test of one IQ block.
//
// The block's entries are written, cleared and woken by random traffic while a
// reference model of every entry (busy, source tags, ready flags) predicts the
// block's comparison and match totals per cycle and the ready state of each
// entry. Broadcasts whose block-enable bit is off must not cause any comparison
// nor any wakeup in the block; the test counts such gated broadcasts and fails
// if none occurred.
module tb_iq_block;
  import iq_pkg::*;

  localparam int unsigned EPB = 4, WB_W = 4;
  localparam int unsigned BCW = $clog2(2*WB_W*EPB+1);

  logic clk = 0, rst_n = 0;
  logic [WB_W-1:0]    wb_valid, blk_en;
  tag_t [WB_W-1:0]    wb_tag;
  logic [EPB-1:0]     wr_en, clr, busy, irdy;
  iq_data_t [EPB-1:0] wr_data, data;
  logic [BCW-1:0]     cmp_cnt, match_cnt;

  int checks = 0, failures = 0;

  iq_block #(.EPB(EPB), .WB_W(WB_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  bit       m_busy [EPB];
  tag_t     m_src  [EPB][2];
  bit [1:0] m_rdy  [EPB];

  initial begin
    int exp_cmp, exp_match, n_gated = 0, n_wake = 0;
    bit [1:0] hit [EPB];
    wb_valid = '0; blk_en = '0; wb_tag = '0; wr_en = '0; clr = '0; wr_data = '0;
    for (int e = 0; e < EPB; e++) begin m_busy[e] = 0; m_rdy[e] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 20000; cyc++) begin
      wr_en = '0; clr = '0;
      for (int e = 0; e < EPB; e++) begin
        if (!m_busy[e] && $urandom_range(0, 2) == 0) begin
          wr_en[e] = 1;
          wr_data[e].opcode = 8'($urandom); wr_data[e].dst = 7'($urandom);
          wr_data[e].dst_valid = 1; wr_data[e].rob = 8'($urandom);
          wr_data[e].src[0] = 7'($urandom_range(0, 15));
          wr_data[e].src[1] = 7'($urandom_range(0, 15));
          wr_data[e].rdy = 2'($urandom);
        end else if (m_busy[e] && $urandom_range(0, 30) == 0) begin
          clr[e] = 1;
        end
      end
      for (int w = 0; w < WB_W; w++) begin
        wb_valid[w] = ($urandom_range(0, 2) == 0);
        wb_tag[w]   = 7'($urandom_range(0, 15));
        blk_en[w]   = ($urandom_range(0, 2) == 0);
        if (wb_valid[w] && !blk_en[w]) n_gated++;
      end
      #1;
      exp_cmp = 0; exp_match = 0;
      for (int e = 0; e < EPB; e++) begin
        hit[e] = 0;
        for (int w = 0; w < WB_W; w++)
          for (int k = 0; k < 2; k++)
            if (wb_valid[w] && blk_en[w] && m_busy[e] && !m_rdy[e][k]) begin
              exp_cmp++;
              if (wb_tag[w] == m_src[e][k]) begin exp_match++; hit[e][k] = 1; end
            end
      end
      check(cmp_cnt == BCW'(exp_cmp), "block cmp_cnt");
      check(match_cnt == BCW'(exp_match), "block match_cnt");
      @(negedge clk);
      for (int e = 0; e < EPB; e++) begin
        if (wr_en[e]) begin
          m_busy[e] = 1; m_src[e][0] = wr_data[e].src[0]; m_src[e][1] = wr_data[e].src[1];
          m_rdy[e] = wr_data[e].rdy;
        end else if (clr[e]) m_busy[e] = 0;
        else begin
          if ((m_rdy[e] | hit[e]) == 2'b11 && m_rdy[e] != 2'b11 && m_busy[e]) n_wake++;
          m_rdy[e] |= hit[e];
        end
        check(busy[e] == m_busy[e], "entry busy");
        if (m_busy[e]) check(irdy[e] == (m_rdy[e] == 2'b11), "entry irdy");
      end
    end
    check(n_gated > 0, "gated broadcasts occurred");
    check(n_wake > 0, "wakeups occurred");
    $display("gated broadcasts %0d, wakeups %0d", n_gated, n_wake);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
