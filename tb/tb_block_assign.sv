// tb_block_assign: self-checking test of round-robin block assignment.
//
// Directed part: with an empty queue, successive instructions must land in
// blocks 0,1,2,... wrapping after the last block; a full block must be
// skipped. Random part: a model of the free map and of the rotating pointer
// checks that every accepted instruction gets a free, distinct entry in the
// first block (from the pointer on) that still has room, that accepted
// instructions form an in-order prefix, and that as many are accepted as the
// free entries allow.
module tb_block_assign;

  localparam int unsigned NBLK = 8, EPB = 4, DISP_W = 4, IQS = NBLK * EPB;

  logic clk = 0, rst_n = 0, en;
  logic [DISP_W-1:0] disp_valid, accept;
  logic [IQS-1:0]    free;
  logic [DISP_W-1:0][2:0] blk;
  logic [DISP_W-1:0][4:0] ent;

  int checks = 0, failures = 0;

  block_assign #(.NBLK(NBLK), .EPB(EPB), .DISP_W(DISP_W)) dut (.*);

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

  function automatic int free_in_blk(logic [IQS-1:0] f, int b);
    int n = 0;
    for (int e = 0; e < EPB; e++) n += f[b*EPB + e];
    return n;
  endfunction

  initial begin
    int ptr, n_skip = 0, n_full = 0;
    logic [IQS-1:0] f;
    en = 0; disp_valid = '0; free = '1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // directed: empty queue, three groups of four
    en = 1; free = '1;
    for (int g = 0; g < 3; g++) begin
      disp_valid = '1;
      #1;
      for (int d = 0; d < DISP_W; d++) begin
        check(accept[d], "all accepted when empty");
        check(int'(blk[d]) == (4*g + d) % NBLK, "round-robin block order");
        check(int'(ent[d]) == int'(blk[d]) * EPB, "lowest entry of the block");
      end
      @(negedge clk);
    end
    // pointer is now at block 4; block 4 full -> skipped
    free = '1; free[4*EPB +: EPB] = '0;
    disp_valid = 4'b0001;
    #1 check(accept[0] && blk[0] == 3'd5, "full block skipped");
    @(negedge clk);
    // en low refuses everything
    en = 0; disp_valid = '1;
    #1 check(accept == '0, "disabled dispatch refuses all");
    @(negedge clk);
    en = 1;

    // random phase with a reference pointer
    ptr = 6;
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int exp_n, nfree, nval, a;
      en = ($urandom_range(0, 15) != 0);
      for (int i = 0; i < IQS; i++) free[i] = ($urandom_range(0, 3) == 0);
      if ($urandom_range(0, 9) == 0) free = '0;
      disp_valid = 4'($urandom);
      #1;
      f = free;
      nfree = 0; for (int i = 0; i < IQS; i++) nfree += free[i];
      nval = 0; while (nval < DISP_W && disp_valid[nval]) nval++;
      exp_n = en ? ((nval < nfree) ? nval : nfree) : 0;
      a = 0; while (a < DISP_W && accept[a]) a++;
      check(a == exp_n, "number accepted");
      check((accept >> a) == '0, "accept is a prefix");
      for (int d = 0; d < a; d++) begin
        int b;
        b = ptr;
        while (free_in_blk(f, b) == 0) b = (b + 1) % NBLK;
        if (b != ptr) n_skip++;
        check(int'(blk[d]) == b, "first block with room from the pointer");
        check(int'(ent[d]) / EPB == int'(blk[d]), "entry inside its block");
        check(f[ent[d]], "entry was free");
        f[ent[d]] = 1'b0;
        ptr = (b + 1) % NBLK;
      end
      if (en && nval > nfree) n_full++;
      @(negedge clk);
    end
    check(n_skip > 0 && n_full > 0, "skips and full-queue refusals exercised");
    $display("skips %0d, full refusals %0d", n_skip, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
