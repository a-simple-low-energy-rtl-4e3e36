// iq_core_model: behavioural model of the out-of-order core around one or more
// multi-block instruction queues, with a reference model of the wakeup
// mechanism. Used by the queue and top-level testbenches; not synthesizable.
//
// The core side generates an instruction stream per queue (each queue has its
// own 128-register physical file): destinations come from a free list, sources
// are drawn from recently written registers (true dependences) or from
// long-lived initial registers, some instructions have no destination or no
// source. It dispatches up to DISP_W instructions per cycle, executes issued
// instructions with a 1..MAX_LAT cycle latency, broadcasts at most WB_W result
// tags per cycle, and every FLUSH_PERIOD cycles on average mispredicts a branch,
// squashing all younger instructions in every queue. ROB indices are shared by
// all queues.
//
// The reference side keeps an instruction-level copy of every queue (which
// block each instruction went to, its ready flags) and of the block mapping
// table, and checks each cycle:
//   * comparisons and matches performed equal those of the rule "compare only
//     in blocks whose BE bit is set, only not-ready operands of waiting
//     instructions" (cyc_cmp / cyc_match);
//   * accepted dispatches = min(offered, free entries), none during a squash,
//     and no block receives more instructions than it has entries;
//   * the issued instructions are exactly the ISS_W oldest ready ones, carry the
//     right opcode/destination, and none issues before its operands are ready;
//   * at the end every instruction has issued or been squashed, and the
//     running totals equal the reference sums.
// It also counts how often each mechanism occurred (dispatch stall, dispatch
// bypass, issue saturation, squash, gated broadcast, unneeded block activation,
// instruction without destination or sources, and with WB_DELAY a BT set
// merged into a latched block enable); a mechanism that never occurred
// counts as a failure. Model A comparisons (every active operand compared on
// every broadcast) are accumulated for the comparison-reduction report.
module iq_core_model
  import iq_pkg::*;
#(
  parameter int unsigned NQ           = 1,
  parameter int unsigned IQS          = 32,
  parameter int unsigned NBLK         = 8,
  parameter int unsigned DISP_W       = 4,
  parameter int unsigned WB_W         = 4,
  parameter int unsigned ISS_W        = 4,
  parameter int unsigned NCYC         = 5000,
  parameter int unsigned FLUSH_PERIOD = 200,
  parameter int unsigned MAX_LAT      = 3,
  parameter int unsigned SEED         = 1,
  parameter bit          WB_DELAY     = 1'b0,  // queue searches the tags one cycle after they are driven
  localparam int unsigned BW          = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned IW          = (IQS > 1) ? $clog2(IQS) : 1,
  localparam int unsigned CW          = $clog2(2*WB_W*IQS + 1)
) (
  input  logic                          clk,
  output logic                          rst_n,
  output logic [DISP_W-1:0]             disp_valid  [NQ],
  output disp_instr_t [DISP_W-1:0]      disp_instr  [NQ],
  input  logic [DISP_W-1:0]             disp_accept [NQ],
  input  logic [DISP_W-1:0][BW-1:0]     disp_blk    [NQ],
  output logic [WB_W-1:0]               wb_valid    [NQ],
  output tag_t [WB_W-1:0]               wb_tag      [NQ],
  input  logic [ISS_W-1:0]              iss_valid   [NQ],
  input  issue_instr_t [ISS_W-1:0]      iss_instr   [NQ],
  input  logic [CW-1:0]                 cyc_cmp     [NQ],
  input  logic [CW-1:0]                 cyc_match   [NQ],
  input  logic [$clog2(IQS+1)-1:0]      occupancy   [NQ],
  input  logic [31:0]                   total_cmp   [NQ],
  input  logic [31:0]                   total_match [NQ],
  output logic                          flush_valid,
  output rob_t                          flush_rob,
  output rob_t                          rob_head,
  output logic                          stats_clr,
  output longint                        stat_cmp,      // comparisons performed
  output longint                        stat_model_a,  // comparisons with all active entries
  output longint                        stat_issued,   // instructions issued
  output int                            checks,
  output int                            failures,
  output logic                          done
);

  localparam int unsigned EPB     = IQS / NBLK;
  localparam int unsigned NREG    = NUM_PREGS;
  localparam int unsigned NARCH   = 16;     // long-lived initial registers
  localparam int unsigned WINDOW  = 12;     // recent destinations used as sources

  typedef struct {
    longint      seq;
    int          q;
    disp_instr_t ins;
    int          blk;
    bit [1:0]    rdy;
  } rec_t;

  typedef struct {
    longint seq;
    int     q;
    bit     dst_valid;
    tag_t   dst;
    longint due;
  } exe_t;

  rec_t   pend [$];          // generated, not dispatched (all queues)
  rec_t   iq   [$];          // reference copy of the queues
  exe_t   exe  [$];          // executing
  bit     rready [NQ][NREG];
  bit     rfree  [NQ][NREG];
  bit     rdead  [NQ][NREG]; // producer squashed
  int     rref   [NQ][NREG]; // consumers not yet issued
  bit     bt     [NQ][NREG][NBLK];
  tag_t   recent [NQ][$];
  tag_t   flist  [NQ][$];
  logic [WB_W-1:0] eff_valid [NQ], prev_valid [NQ];   // tags searched this cycle
  tag_t [WB_W-1:0] eff_tag   [NQ], prev_tag   [NQ];
  longint next_seq;
  int     next_rob;
  longint cycle;

  // statistics
  longint n_issued, n_disp, n_model_a, n_cmp, n_match;
  longint m_cmp [NQ], m_match [NQ];
  int cov_stall, cov_bypass, cov_iss_sat, cov_squash, cov_gated, cov_unneeded,
      cov_nodst, cov_nosrc, cov_fwd;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (cycle %0d)", what, cycle);
    end
  endtask

  function automatic int cnt_pend(int q);
    int n = 0;
    foreach (pend[i]) if (pend[i].q == q) n++;
    return n;
  endfunction

  function automatic int cnt_iq(int q);
    int n = 0;
    foreach (iq[i]) if (iq[i].q == q) n++;
    return n;
  endfunction

  task automatic gen(int q);
    rec_t r;
    tag_t d;
    r.seq = next_seq++;
    r.q   = q;
    r.blk = 0;
    r.rdy = 0;
    r.ins = '0;
    r.ins.opcode = opc_t'($urandom);
    r.ins.rob    = rob_t'(next_rob);
    next_rob     = (next_rob + 1) % 256;
    r.ins.dst_valid = ($urandom_range(0, 9) != 0) && (flist[q].size() > 0);
    if (r.ins.dst_valid) begin
      d = flist[q].pop_front();
      rfree[q][d]  = 0;
      rready[q][d] = 0;
      rdead[q][d]  = 0;
      r.ins.dst    = d;
    end
    for (int k = 0; k < 2; k++) begin
      r.ins.src_valid[k] = ($urandom_range(0, 5) != 0);
      if (r.ins.src_valid[k]) begin
        if (recent[q].size() > 0 && $urandom_range(0, 3) != 0)
          r.ins.src[k] = recent[q][$urandom_range(0, recent[q].size() - 1)];
        else
          r.ins.src[k] = tag_t'($urandom_range(0, NARCH - 1));
        rref[q][r.ins.src[k]]++;
      end
    end
    if (r.ins.dst_valid) begin
      recent[q].push_back(r.ins.dst);
      if (recent[q].size() > WINDOW) void'(recent[q].pop_front());
    end
    pend.push_back(r);
  endtask

  function automatic bit in_recent(int q, tag_t t);
    foreach (recent[q][i]) if (recent[q][i] == t) return 1;
    return 0;
  endfunction

  task automatic release_regs();
    for (int q = 0; q < NQ; q++)
      for (int r = NARCH; r < NREG; r++)
        if (!rfree[q][r] && (rready[q][r] || rdead[q][r]) && rref[q][r] == 0 &&
            !in_recent(q, tag_t'(r))) begin
          bit busy_dst = 0;
          foreach (exe[i]) if (exe[i].q == q && exe[i].dst_valid && exe[i].dst == tag_t'(r)) busy_dst = 1;
          if (!busy_dst) begin
            rfree[q][r] = 1;
            flist[q].push_back(tag_t'(r));
          end
        end
  endtask

  // Body is an automatic task so that loop-local declarations re-initialise.
  task automatic run();
    int gen_on;
    rst_n = 0; flush_valid = 0; flush_rob = '0; rob_head = '0; stats_clr = 0;
    checks = 0; failures = 0; done = 0;
    stat_cmp = 0; stat_model_a = 0; stat_issued = 0;
    for (int q = 0; q < NQ; q++) begin
      disp_valid[q] = '0; disp_instr[q] = '0; wb_valid[q] = '0; wb_tag[q] = '0;
      m_cmp[q] = 0; m_match[q] = 0;
      prev_valid[q] = '0; prev_tag[q] = '0;
      for (int r = 0; r < NREG; r++) begin
        rready[q][r] = (r < NARCH);
        rfree[q][r]  = (r >= NARCH);
        rdead[q][r]  = 0;
        rref[q][r]   = 0;
        for (int b = 0; b < NBLK; b++) bt[q][r][b] = 0;
        if (r >= NARCH) flist[q].push_back(tag_t'(r));
      end
    end
    void'($urandom(SEED));
    next_seq = 0; next_rob = 0; cycle = 0;
    n_issued = 0; n_disp = 0; n_model_a = 0; n_cmp = 0; n_match = 0;
    cov_stall = 0; cov_bypass = 0; cov_iss_sat = 0; cov_squash = 0; cov_gated = 0;
    cov_unneeded = 0; cov_nodst = 0; cov_nosrc = 0; cov_fwd = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (cycle = 0; cycle < NCYC + 2000; cycle++) begin
      bit        fl;
      longint    br_seq;
      int        br_rob;
      int        nwb [NQ];
      int        dsent [NQ];
      exe_t      wbl [$];
      gen_on = (cycle < NCYC);
      @(negedge clk);

      // ---------------- refill the front end
      if (gen_on)
        for (int q = 0; q < NQ; q++)
          while (cnt_pend(q) < 2 * DISP_W && flist[q].size() > 0) gen(q);

      // ---------------- result broadcasts due this cycle (oldest first)
      exe.sort() with (item.seq);
      wbl.delete();
      for (int q = 0; q < NQ; q++) begin
        nwb[q] = 0;
        wb_valid[q] = '0;
        wb_tag[q]   = '0;
      end
      for (int i = 0; i < exe.size(); i++) begin
        if (exe[i].due <= cycle) begin
          int q = exe[i].q;
          if (!exe[i].dst_valid) begin
            wbl.push_back(exe[i]);
          end else if (nwb[q] < WB_W) begin
            wb_valid[q][nwb[q]] = 1;
            wb_tag[q][nwb[q]]   = exe[i].dst;
            nwb[q]++;
            wbl.push_back(exe[i]);
          end
        end
      end
      // remove the broadcast ones from exe
      foreach (wbl[j]) begin
        for (int i = 0; i < exe.size(); i++)
          if (exe[i].seq == wbl[j].seq) begin exe.delete(i); break; end
      end

      // ---------------- branch misprediction
      fl = 0;
      br_seq = 0; br_rob = 0;
      if (gen_on && FLUSH_PERIOD > 0 && $urandom_range(1, FLUSH_PERIOD) == 1 && iq.size() > 0) begin
        int pick = $urandom_range(0, iq.size() - 1);
        fl     = 1;
        br_seq = iq[pick].seq;
        br_rob = int'(iq[pick].ins.rob);
      end
      // oldest instruction in flight
      begin
        longint oldest = next_seq;
        int     orob   = next_rob;
        foreach (iq[i])  if (iq[i].seq < oldest) begin oldest = iq[i].seq; orob = int'(iq[i].ins.rob); end
        foreach (pend[i]) if (pend[i].seq < oldest) begin oldest = pend[i].seq; orob = int'(pend[i].ins.rob); end
        rob_head = rob_t'(orob);
      end
      flush_valid = fl;
      flush_rob   = rob_t'(br_rob);

      // ---------------- dispatch offer
      for (int q = 0; q < NQ; q++) begin
        int k = 0;
        disp_valid[q] = '0;
        disp_instr[q] = '0;
        dsent[q] = 0;
        foreach (pend[i]) begin
          if (pend[i].q == q && k < DISP_W) begin
            disp_instr[q][k] = pend[i].ins;
            disp_instr[q][k].src_rdy[0] = !pend[i].ins.src_valid[0] || rready[q][pend[i].ins.src[0]];
            disp_instr[q][k].src_rdy[1] = !pend[i].ins.src_valid[1] || rready[q][pend[i].ins.src[1]];
            k++;
          end
        end
        // sometimes offer fewer
        if (k > 0 && $urandom_range(0, 7) == 0) k = $urandom_range(0, k);
        for (int j = 0; j < k; j++) disp_valid[q][j] = 1;
        dsent[q] = k;
      end

      for (int q = 0; q < NQ; q++) begin
        eff_valid[q] = WB_DELAY ? prev_valid[q] : wb_valid[q];
        eff_tag[q]   = WB_DELAY ? prev_tag[q]   : wb_tag[q];
        prev_valid[q] = wb_valid[q];
        prev_tag[q]   = wb_tag[q];
      end

      #1;

      // ---------------- wakeup: reference comparison counts (queue state before this edge)
      for (int q = 0; q < NQ; q++) begin
        int ecmp = 0, ematch = 0, ma = 0;
        bit [1:0] hit [$];
        hit.delete();
        foreach (iq[i]) hit.push_back(2'b00);
        for (int w = 0; w < WB_W; w++) begin
          if (eff_valid[q][w]) begin
            int nen = 0;
            for (int b = 0; b < NBLK; b++) begin
              if (bt[q][eff_tag[q][w]][b]) begin
                int bm = 0;
                nen++;
                foreach (iq[i])
                  if (iq[i].q == q && iq[i].blk == b)
                    for (int s = 0; s < 2; s++)
                      if (!iq[i].rdy[s]) begin
                        ecmp++;
                        if (iq[i].ins.src[s] == eff_tag[q][w]) begin
                          ematch++; bm++; hit[i][s] = 1;
                        end
                      end
                if (bm == 0) cov_unneeded++;
              end
            end
            if (nen < NBLK && cnt_iq(q) > 0) cov_gated++;
            foreach (iq[i])
              if (iq[i].q == q)
                for (int s = 0; s < 2; s++) if (!iq[i].rdy[s]) ma++;
          end
        end
        check(int'(cyc_cmp[q]) == ecmp, "comparisons per cycle");
        check(int'(cyc_match[q]) == ematch, "matches per cycle");
        m_cmp[q] += ecmp; m_match[q] += ematch;
        n_cmp += ecmp; n_match += ematch; n_model_a += ma;
        // every waiting operand whose tag is broadcast must match
        foreach (iq[i])
          if (iq[i].q == q)
            for (int s = 0; s < 2; s++)
              for (int w = 0; w < WB_W; w++)
                if (!iq[i].rdy[s] && eff_valid[q][w] && eff_tag[q][w] == iq[i].ins.src[s])
                  check(hit[i][s], "no wakeup is lost");
        foreach (iq[i]) if (iq[i].q == q) iq[i].rdy |= hit[i];
      end
      // ins.src_rdy still holds the flags before this cycle's wakeups, which is
      // what the select logic sees in this cycle.

      // ---------------- issue check
      for (int q = 0; q < NQ; q++) begin
        longint rdy_seq [$];
        int nexp, niss = 0;
        rdy_seq.delete();
        // ready before this cycle's wakeups: the flags saved at the previous edge
        foreach (iq[i])
          if (iq[i].q == q && iq[i].ins.src_rdy == 2'b11) rdy_seq.push_back(iq[i].seq);
        rdy_seq.sort();
        if (rdy_seq.size() > ISS_W) cov_iss_sat++;
        nexp = fl ? 0 : ((rdy_seq.size() < ISS_W) ? rdy_seq.size() : ISS_W);
        for (int p = 0; p < ISS_W; p++) begin
          if (iss_valid[q][p]) begin
            int idx = -1;
            niss++;
            foreach (iq[i]) if (iq[i].q == q && iq[i].ins.rob == iss_instr[q][p].rob) idx = i;
            check(idx >= 0, "issued instruction is in the queue");
            if (idx >= 0) begin
              exe_t e;
              check(p < rdy_seq.size() && iq[idx].seq == rdy_seq[p], "oldest ready first, in port order");
              check(iss_instr[q][p].opcode == iq[idx].ins.opcode &&
                    iss_instr[q][p].dst_valid == iq[idx].ins.dst_valid &&
                    (!iq[idx].ins.dst_valid || iss_instr[q][p].dst == iq[idx].ins.dst),
                    "issued payload");
              e.seq = iq[idx].seq; e.q = q; e.dst_valid = iq[idx].ins.dst_valid;
              e.dst = iq[idx].ins.dst; e.due = cycle + $urandom_range(1, MAX_LAT);
              if (!e.dst_valid) cov_nodst++;
              exe.push_back(e);
              for (int s = 0; s < 2; s++)
                if (iq[idx].ins.src_valid[s]) rref[q][iq[idx].ins.src[s]]--;
              iq.delete(idx);
              n_issued++;
            end
          end
        end
        check(niss == nexp, "issue count = min(ready, issue width)");
      end

      // ---------------- dispatch check
      for (int q = 0; q < NQ; q++) begin
        int nfree = IQS - cnt_iq(q);
        int nacc = 0;
        int exp_n;
        int perblk [NBLK];
        for (int b = 0; b < NBLK; b++) perblk[b] = 0;
        foreach (iq[i]) if (iq[i].q == q) perblk[iq[i].blk]++;
        // entries issued in this cycle are still busy at dispatch time
        for (int p = 0; p < ISS_W; p++) if (iss_valid[q][p]) nfree--;
        while (nacc < DISP_W && disp_accept[q][nacc]) nacc++;
        exp_n = fl ? 0 : ((dsent[q] < nfree) ? dsent[q] : nfree);
        check(nacc == exp_n, "dispatch count = min(offered, free entries)");
        check((disp_accept[q] >> nacc) == '0, "dispatch in order");
        if (nacc < dsent[q] && !fl) cov_stall++;
        for (int j = 0; j < nacc; j++) begin
          rec_t r;
          int   pi = -1;
          foreach (pend[i]) if (pi < 0 && pend[i].q == q) pi = i;
          r = pend[pi];
          pend.delete(pi);
          r.blk = int'(disp_blk[q][j]);
          r.ins.src_rdy = disp_instr[q][j].src_rdy;
          for (int s = 0; s < 2; s++) begin
            r.rdy[s] = !r.ins.src_valid[s] || r.ins.src_rdy[s];
            for (int w = 0; w < WB_W; w++)
              if (!r.rdy[s] && eff_valid[q][w] && eff_tag[q][w] == r.ins.src[s]) begin
                r.rdy[s] = 1;
                cov_bypass++;
              end
          end
          for (int s = 0; s < 2; s++)
            for (int w = 0; w < WB_W; w++)
              if (WB_DELAY && !r.rdy[s] && wb_valid[q][w] && wb_tag[q][w] == r.ins.src[s]) cov_fwd++;
          if (r.ins.src_valid == 2'b00) cov_nosrc++;
          r.ins.src_rdy = r.rdy;       // ready flags as seen by select next cycle
          perblk[r.blk]++;
          check(perblk[r.blk] <= EPB, "block not over-filled");
          iq.push_back(r);
          n_disp++;
        end
      end
      begin
        // reference block table: BE allocation (clears), then BE entry
        // modification (sets), for the groups just dispatched, which sit at
        // the back of iq
        int from;
        int total;
        total = 0;
        for (int q = 0; q < NQ; q++)
          for (int j = 0; j < DISP_W; j++) if (disp_accept[q][j]) total++;
        from = iq.size() - total;
        for (int i = from; i < iq.size(); i++)
          if (iq[i].ins.dst_valid)
            for (int b = 0; b < NBLK; b++) bt[iq[i].q][iq[i].ins.dst][b] = 0;
        for (int i = from; i < iq.size(); i++)
          for (int s = 0; s < 2; s++)
            if (!iq[i].rdy[s]) bt[iq[i].q][iq[i].ins.src[s]][iq[i].blk] = 1;
      end

      // ready flags for next cycle's select
      foreach (iq[i]) iq[i].ins.src_rdy = iq[i].rdy;

      // ---------------- completions: registers become ready
      for (int q = 0; q < NQ; q++)
        for (int w = 0; w < WB_W; w++)
          if (eff_valid[q][w]) rready[q][eff_tag[q][w]] = 1;

      // ---------------- squash
      if (fl) begin
        int nsq = 0;
        for (int i = iq.size() - 1; i >= 0; i--)
          if (iq[i].seq > br_seq) begin
            int q = iq[i].q;
            for (int s = 0; s < 2; s++)
              if (iq[i].ins.src_valid[s]) rref[q][iq[i].ins.src[s]]--;
            if (iq[i].ins.dst_valid) rdead[q][iq[i].ins.dst] = 1;
            iq.delete(i);
            nsq++;
          end
        for (int i = exe.size() - 1; i >= 0; i--)
          if (exe[i].seq > br_seq) begin
            if (exe[i].dst_valid) rdead[exe[i].q][exe[i].dst] = 1;
            exe.delete(i);
          end
        foreach (pend[i]) begin
          int q = pend[i].q;
          for (int s = 0; s < 2; s++)
            if (pend[i].ins.src_valid[s]) rref[q][pend[i].ins.src[s]]--;
          if (pend[i].ins.dst_valid) rdead[q][pend[i].ins.dst] = 1;
        end
        pend.delete();
        for (int q = 0; q < NQ; q++)
          for (int i = recent[q].size() - 1; i >= 0; i--)
            if (rdead[q][recent[q][i]]) recent[q].delete(i);
        next_rob = (br_rob + 1) % 256;
        if (nsq > 0) cov_squash++;
      end

      release_regs();

      if (!gen_on && iq.size() == 0 && exe.size() == 0 && pend.size() == 0) break;
    end

    // ---------------- end of run
    @(negedge clk);
    flush_valid = 0;
    for (int q = 0; q < NQ; q++) begin
      disp_valid[q] = '0; wb_valid[q] = '0;
    end
    #1;
    check(iq.size() == 0 && exe.size() == 0, "all instructions drained");
    for (int q = 0; q < NQ; q++) begin
      check(occupancy[q] == 0, "queue empty at the end");
      check(longint'(total_cmp[q]) == m_cmp[q], "total comparisons");
      check(longint'(total_match[q]) == m_match[q], "total matches");
    end
    check(cov_stall    > 0, "mechanism: dispatch stall on full queue");
    check(cov_bypass   > 0, "mechanism: dispatch bypass");
    check(cov_iss_sat  > 0, "mechanism: more ready than issue width");
    check(cov_squash   > 0, "mechanism: squash on misprediction");
    check(cov_gated    > 0, "mechanism: broadcast with blocks gated off");
    check(cov_unneeded > 0, "mechanism: block activated without a match");
    check(cov_nodst    > 0, "mechanism: instruction without destination");
    check(cov_nosrc    > 0, "mechanism: instruction without sources");
    if (WB_DELAY) check(cov_fwd > 0, "mechanism: BT set merged into a latched block enable");
    $display("cycles %0d dispatched %0d issued %0d", cycle, n_disp, n_issued);
    $display("mechanisms: stall %0d bypass %0d issue-saturation %0d squash %0d gated %0d unneeded-activation %0d no-dst %0d no-src %0d latched-BE merge %0d",
             cov_stall, cov_bypass, cov_iss_sat, cov_squash, cov_gated, cov_unneeded, cov_nodst, cov_nosrc, cov_fwd);
    if (n_issued > 0)
      $display("comparisons per issued instruction: multi-block %0.2f (match %0.2f), all-active-entries baseline %0.2f, reduction %0.1f%%",
               real'(n_cmp) / real'(n_issued), real'(n_match) / real'(n_issued),
               real'(n_model_a) / real'(n_issued),
               (n_model_a > 0) ? 100.0 * (1.0 - real'(n_cmp) / real'(n_model_a)) : 0.0);
    stat_cmp     = n_cmp;
    stat_model_a = n_model_a;
    stat_issued  = n_issued;
    done = 1;
  endtask

  initial run();

endmodule
