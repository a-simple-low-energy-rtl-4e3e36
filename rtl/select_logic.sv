// select_logic: oldest-ready-first selection of up to ISS_W instructions.
//
// An age matrix records, for every pair of queue entries, which one was
// dispatched first: older_q[i][j] = 1 means entry i is older than entry j.
// When entry j is written by dispatch, column j is set (every entry already
// in the queue is older) and row j is cleared (j is older than nobody); two
// entries written in the same cycle are ordered by their dispatch slot, a lower
// slot being older. Rows of free entries hold stale values that are never
// used, because a free entry never requests and is rewritten on allocation.
//
// Select: the rank of a requesting entry is the number of requesting entries
// older than it. Entries of rank < ISS_W are granted and appear on issue port
// number rank, so port 0 carries the oldest ready instruction. Ranks are unique
// since ages form a total order. Grants are combinational in the same cycle as
// req; en low grants nothing.
// The oldest-ready-first policy is the published design's; the age matrix that
// implements it is this design's choice.
module select_logic #(
  parameter int unsigned IQS    = 32,
  parameter int unsigned ISS_W  = 4,
  parameter int unsigned DISP_W = 4,
  localparam int unsigned IW    = (IQS > 1) ? $clog2(IQS) : 1,
  localparam int unsigned SW    = (DISP_W > 1) ? $clog2(DISP_W) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic [IQS-1:0]            req,
  input  logic [IQS-1:0]            alloc,
  input  logic [IQS-1:0][SW-1:0]    alloc_slot,
  output logic [IQS-1:0]            grant,
  output logic [ISS_W-1:0]          port_valid,
  output logic [ISS_W-1:0][IW-1:0]  port_idx
);

  localparam int unsigned RW = $clog2(IQS + 1);

  logic [IQS-1:0][IQS-1:0] older_q;   // [i][j]: i older than j

  always_comb begin
    logic [RW-1:0] rank;
    grant      = '0;
    port_valid = '0;
    port_idx   = '0;
    for (int i = 0; i < IQS; i++) begin
      rank = '0;
      for (int k = 0; k < IQS; k++)
        if (k != i && req[k] && older_q[k][i]) rank = rank + RW'(1);
      if (en && req[i] && rank < RW'(ISS_W)) begin
        grant[i]       = 1'b1;
        for (int p = 0; p < ISS_W; p++) begin
          if (rank == RW'(p)) begin
            port_valid[p] = 1'b1;
            port_idx[p]   = IW'(i);
          end
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      older_q <= '0;
    end else begin
      for (int i = 0; i < IQS; i++) begin
        for (int j = 0; j < IQS; j++) begin
          if (i != j) begin
            if (alloc[i] && alloc[j])
              older_q[i][j] <= (alloc_slot[i] < alloc_slot[j]);
            else if (alloc[j])
              older_q[i][j] <= 1'b1;
            else if (alloc[i])
              older_q[i][j] <= 1'b0;
          end
        end
      end
    end
  end

endmodule
