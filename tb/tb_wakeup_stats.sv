// tb_wakeup_stats: self-checking test of the wakeup statistics counters.
//
// Random per-cycle counts are accumulated in the testbench and compared with
// the block's totals every cycle, including No-Match = comparisons - matches,
// the synchronous clear, and saturation of a narrow (10-bit) instance.
module tb_wakeup_stats;

  localparam int unsigned IN_W = 9;

  logic clk = 0, rst_n = 0, clr;
  logic [IN_W-1:0] cmp_cnt, match_cnt, blk_act_cnt, bcast_cnt;
  logic [31:0] total_cmp, total_match, total_nomatch, total_blk_act, total_bcast;
  logic [9:0]  s_cmp, s_match, s_nomatch, s_blk, s_bc;

  int checks = 0, failures = 0;

  wakeup_stats #(.IN_W(IN_W), .CNT_W(32)) dut (.*);

  wakeup_stats #(.IN_W(IN_W), .CNT_W(10)) dut_small (
    .clk, .rst_n, .clr, .cmp_cnt, .match_cnt, .blk_act_cnt, .bcast_cnt,
    .total_cmp(s_cmp), .total_match(s_match), .total_nomatch(s_nomatch),
    .total_blk_act(s_blk), .total_bcast(s_bc)
  );

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

  initial begin
    longint c = 0, m = 0, b = 0, t = 0;
    int n_sat = 0;
    clr = 0; cmp_cnt = 0; match_cnt = 0; blk_act_cnt = 0; bcast_cnt = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 10000; cyc++) begin
      cmp_cnt     = 9'($urandom_range(0, 256));
      match_cnt   = 9'($urandom_range(0, int'(cmp_cnt)));
      blk_act_cnt = 9'($urandom_range(0, 32));
      bcast_cnt   = 9'($urandom_range(0, 4));
      clr         = ($urandom_range(0, 999) == 0);
      @(negedge clk);
      if (clr) begin c = 0; m = 0; b = 0; t = 0; end
      else begin c += cmp_cnt; m += match_cnt; b += blk_act_cnt; t += bcast_cnt; end
      check(total_cmp == 32'(c), "total comparisons");
      check(total_match == 32'(m), "total matches");
      check(total_nomatch == 32'(c - m), "total no-match");
      check(total_blk_act == 32'(b), "total block activations");
      check(total_bcast == 32'(t), "total broadcasts");
      check(s_cmp == ((c > 1023) ? 10'h3ff : 10'(c)), "saturating total");
      if (c > 1023) n_sat++;
    end
    check(n_sat > 0, "saturation exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
