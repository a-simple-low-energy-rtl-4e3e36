// tb_iq_entry: self-checking test of one queue entry.
//
// Random tag broadcasts, block enables, writes and clears are applied to the
// entry. A reference model kept in the testbench (busy bit, two source tags and
// their ready flags) predicts, every cycle, the number of comparisons (only for
// enabled broadcasts against busy, not-ready operands), the number of matches
// and, one cycle later, the ready flags and IRdy. A directed part first checks
// the one-cycle wakeup latency and that a disabled block compares nothing.
module tb_iq_entry;
  import iq_pkg::*;

  localparam int unsigned WB_W = 4;
  localparam int unsigned CW   = $clog2(2*WB_W+1);

  logic                 clk = 0, rst_n = 0;
  logic                 wr_en, clr;
  iq_data_t             wr_data;
  logic [WB_W-1:0]      wb_valid, blk_en;
  tag_t [WB_W-1:0]      wb_tag;
  logic                 busy, irdy;
  iq_data_t             data;
  logic [CW-1:0]        cmp_cnt, match_cnt;

  int checks = 0, failures = 0;

  iq_entry #(.WB_W(WB_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
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

  // reference state
  bit       m_busy;
  tag_t     m_src [2];
  bit [1:0] m_rdy;

  task automatic drive_idle();
    wr_en = 0; clr = 0; wb_valid = '0; blk_en = '0; wb_tag = '0; wr_data = '0;
  endtask

  initial begin
    int exp_cmp, exp_match;
    bit [1:0] hit;
    drive_idle();
    m_busy = 0; m_rdy = 0; m_src[0] = 0; m_src[1] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // directed: write an entry waiting on tags 5 and 9
    wr_en = 1;
    wr_data = '0;
    wr_data.opcode = 8'h21; wr_data.dst_valid = 1; wr_data.dst = 7'd40;
    wr_data.src[0] = 7'd5; wr_data.src[1] = 7'd9; wr_data.rdy = 2'b00; wr_data.rob = 8'd3;
    @(negedge clk);
    drive_idle();
    check(busy && !irdy, "written entry busy, not ready");
    // broadcast tag 5 with the block disabled: no comparison, no wakeup
    wb_valid = 4'b0001; wb_tag[0] = 7'd5; blk_en = 4'b0000;
    #1 check(cmp_cnt == 0 && match_cnt == 0, "disabled block compares nothing");
    @(negedge clk);
    check(data.rdy == 2'b00, "disabled block does not wake");
    // same broadcast enabled: two comparisons, one match
    blk_en = 4'b0001;
    #1 check(cmp_cnt == 2 && match_cnt == 1, "enabled: 2 cmp 1 match");
    @(negedge clk);
    blk_en = 4'b0000; wb_valid = '0;
    check(data.rdy == 2'b01 && !irdy, "op1 ready after one cycle");
    // tag 9 on port 3: only the not-ready operand is compared
    wb_valid = 4'b1000; wb_tag[3] = 7'd9; blk_en = 4'b1000;
    #1 check(cmp_cnt == 1 && match_cnt == 1, "only active operand compared");
    @(negedge clk);
    drive_idle();
    check(irdy, "IRdy one cycle after the last operand");
    #1 wb_valid = 4'b1111; blk_en = 4'b1111;
    #1 check(cmp_cnt == 0, "ready entry compares nothing");
    @(negedge clk);
    drive_idle();
    clr = 1;
    @(negedge clk);
    clr = 0;
    check(!busy && !irdy, "clear frees the entry");

    // random phase
    m_busy = 0; m_rdy = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      drive_idle();
      if (!m_busy && $urandom_range(0, 3) == 0) begin
        wr_en = 1;
        wr_data.opcode = 8'($urandom); wr_data.dst = 7'($urandom); wr_data.dst_valid = 1'($urandom);
        wr_data.src[0] = 7'($urandom_range(0, 15)); wr_data.src[1] = 7'($urandom_range(0, 15));
        wr_data.rdy = 2'($urandom); wr_data.rob = 8'($urandom);
      end else if (m_busy && $urandom_range(0, 40) == 0) begin
        clr = 1;
      end
      for (int w = 0; w < WB_W; w++) begin
        wb_valid[w] = ($urandom_range(0, 3) == 0);
        wb_tag[w]   = 7'($urandom_range(0, 15));
        blk_en[w]   = 1'($urandom);
      end
      #1;
      exp_cmp = 0; exp_match = 0; hit = 0;
      for (int w = 0; w < WB_W; w++)
        for (int k = 0; k < 2; k++)
          if (wb_valid[w] && blk_en[w] && m_busy && !m_rdy[k]) begin
            exp_cmp++;
            if (wb_tag[w] == m_src[k]) begin exp_match++; hit[k] = 1; end
          end
      check(cmp_cnt == CW'(exp_cmp), "random cmp_cnt");
      check(match_cnt == CW'(exp_match), "random match_cnt");
      @(negedge clk);
      if (wr_en) begin
        m_busy = 1; m_src[0] = wr_data.src[0]; m_src[1] = wr_data.src[1]; m_rdy = wr_data.rdy;
      end else if (clr) begin
        m_busy = 0;
      end else begin
        m_rdy |= hit;
      end
      check(busy == m_busy, "random busy");
      if (m_busy) begin
        check(data.rdy == m_rdy, "random ready flags");
        check(irdy == (m_rdy == 2'b11), "random irdy");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
