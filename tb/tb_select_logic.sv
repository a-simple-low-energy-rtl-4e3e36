// tb_select_logic: self-checking test of oldest-ready-first selection.
//
// The testbench gives every allocated entry a global sequence number (program
// order: cycle, then dispatch slot). Each cycle it allocates random free
// entries, raises random requests among occupied entries and checks that the
// select logic grants exactly the ISS_W oldest requesters, puts the k-th oldest
// on port k, and grants nothing when disabled. Granted entries are freed.
module tb_select_logic;

  localparam int unsigned IQS = 32, ISS_W = 4, DISP_W = 4;

  logic clk = 0, rst_n = 0, en;
  logic [IQS-1:0] req, alloc, grant;
  logic [IQS-1:0][1:0] alloc_slot;
  logic [ISS_W-1:0] port_valid;
  logic [ISS_W-1:0][4:0] port_idx;

  int checks = 0, failures = 0;

  select_logic #(.IQS(IQS), .ISS_W(ISS_W), .DISP_W(DISP_W)) dut (.*);

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

  bit          occ [IQS];
  longint      seq [IQS];

  initial begin
    longint next_seq = 0;
    int n_over = 0;
    en = 1; req = '0; alloc = '0; alloc_slot = '0;
    for (int i = 0; i < IQS; i++) begin occ[i] = 0; seq[i] = 0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int cyc = 0; cyc < 20000; cyc++) begin
      int order [$];
      int nreq;
      order.delete();
      // requests among occupied entries
      req = '0;
      for (int i = 0; i < IQS; i++) if (occ[i] && $urandom_range(0, 2) == 0) req[i] = 1;
      en = ($urandom_range(0, 19) != 0);
      // allocations into free entries (not requesting)
      alloc = '0; alloc_slot = '0;
      begin
        automatic int s = 0;
        automatic int start = $urandom_range(0, IQS-1);
        for (int j = 0; j < IQS && s < DISP_W; j++) begin
          automatic int i = (start + j) % IQS;
          if (!occ[i] && $urandom_range(0, 3) == 0) begin
            alloc[i] = 1; alloc_slot[i] = 2'(s); s++;
          end
        end
      end
      #1;
      // expected: requesters sorted by sequence number
      for (int i = 0; i < IQS; i++) if (req[i]) order.push_back(i);
      order.sort() with (seq[item]);
      nreq = order.size();
      if (nreq > ISS_W) n_over++;
      for (int p = 0; p < ISS_W; p++) begin
        automatic bit exp_v = en && (p < nreq);
        check(port_valid[p] == exp_v, "port valid");
        if (exp_v) check(int'(port_idx[p]) == order[p], "port carries p-th oldest");
      end
      for (int i = 0; i < IQS; i++) begin
        automatic bit exp_g = 0;
        if (en) for (int p = 0; p < ISS_W && p < nreq; p++) if (order[p] == i) exp_g = 1;
        check(grant[i] == exp_g, "grant vector");
      end
      @(negedge clk);
      for (int i = 0; i < IQS; i++) if (grant[i]) occ[i] = 0;
      for (int s = 0; s < DISP_W; s++)
        for (int i = 0; i < IQS; i++)
          if (alloc[i] && alloc_slot[i] == 2'(s)) begin
            occ[i] = 1; seq[i] = next_seq++;
          end
    end
    check(n_over > 0, "more requests than issue slots exercised");
    $display("cycles with more requests than issue slots: %0d", n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
