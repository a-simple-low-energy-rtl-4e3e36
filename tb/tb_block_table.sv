// tb_block_table: self-checking test of the block mapping table.
//
// A reference copy of the table is kept in the testbench. Each cycle random
// BE allocations (row clears), BE entry modifications (bit sets) and wakeup
// reads are applied; every read must return the reference row as it was before
// this cycle's writes, and a clear and a set of the same row in one cycle must
// leave the set bit on. A directed part reproduces the published design's example: an
// instruction in block 0 and one in block 2 that both read register 4 leave
// BT[4] = blocks {0, 2}.
module tb_block_table;
  import iq_pkg::*;

  localparam int unsigned NBLK = 8, NREGS = 128, DISP_W = 4, WB_W = 4;

  logic clk = 0, rst_n = 0;
  tag_t [WB_W-1:0]             rd_tag;
  logic [WB_W-1:0][NBLK-1:0]   rd_be;
  logic [DISP_W-1:0]           clr_en;
  tag_t [DISP_W-1:0]           clr_tag;
  logic [DISP_W-1:0][1:0]      set_en;
  tag_t [DISP_W-1:0][1:0]      set_tag;
  logic [DISP_W-1:0][2:0]      set_blk;

  int checks = 0, failures = 0;

  block_table #(.NBLK(NBLK), .NREGS(NREGS), .DISP_W(DISP_W), .WB_W(WB_W)) dut (.*);

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

  logic [NBLK-1:0] m [NREGS];

  task automatic idle();
    rd_tag = '0; clr_en = '0; clr_tag = '0; set_en = '0; set_tag = '0; set_blk = '0;
  endtask

  initial begin
    int n_both = 0;
    idle();
    for (int r = 0; r < NREGS; r++) m[r] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // reset leaves every row empty
    for (int r = 0; r < NREGS; r += WB_W) begin
      for (int w = 0; w < WB_W; w++) rd_tag[w] = tag_t'(r + w);
      #1 for (int w = 0; w < WB_W; w++) check(rd_be[w] == '0, "row empty after reset");
    end

    // example: register 4 allocated, then used by instructions in blocks 0 and 2
    idle();
    clr_en[0] = 1; clr_tag[0] = 7'd4;
    @(negedge clk);
    idle();
    set_en[1][0] = 1; set_tag[1][0] = 7'd4; set_blk[1] = 3'd0;
    set_en[3][1] = 1; set_tag[3][1] = 7'd4; set_blk[3] = 3'd2;
    @(negedge clk);
    idle();
    rd_tag[2] = 7'd4;
    #1 check(rd_be[2] == 8'b0000_0101, "BT[4] = blocks 0 and 2");
    // reallocation clears the row
    @(negedge clk);
    clr_en[2] = 1; clr_tag[2] = 7'd4;
    #1 check(rd_be[2] == 8'b0000_0101, "read sees the row before the clear");
    @(negedge clk);
    idle();
    #1 check(rd_be[0] == '0, "row cleared by BE allocation");
    m[4] = '0;

    // random phase
    for (int cyc = 0; cyc < 20000; cyc++) begin
      logic [NBLK-1:0] nxt [NREGS];
      idle();
      for (int d = 0; d < DISP_W; d++) begin
        clr_en[d]  = ($urandom_range(0, 3) == 0);
        clr_tag[d] = 7'($urandom_range(0, 31));
        set_blk[d] = 3'($urandom);
        for (int k = 0; k < 2; k++) begin
          set_en[d][k]  = ($urandom_range(0, 2) == 0);
          set_tag[d][k] = 7'($urandom_range(0, 31));
        end
      end
      for (int w = 0; w < WB_W; w++) rd_tag[w] = 7'($urandom_range(0, 31));
      #1;
      for (int w = 0; w < WB_W; w++) check(rd_be[w] == m[rd_tag[w]], "random read");
      nxt = m;
      for (int d = 0; d < DISP_W; d++) if (clr_en[d]) nxt[clr_tag[d]] = '0;
      for (int d = 0; d < DISP_W; d++)
        for (int k = 0; k < 2; k++)
          if (set_en[d][k]) begin
            nxt[set_tag[d][k]][set_blk[d]] = 1'b1;
            for (int e = 0; e < DISP_W; e++)
              if (clr_en[e] && clr_tag[e] == set_tag[d][k]) n_both++;
          end
      m = nxt;
      @(negedge clk);
    end
    check(n_both > 0, "clear and set of one row in one cycle exercised");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
