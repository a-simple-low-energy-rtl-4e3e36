// block_assign: round-robin choice of IQ block and entry for dispatched
// instructions.
//
// Each cycle up to DISP_W instructions arrive in program order. A rotating
// pointer names the block that receives the next instruction; instruction d
// goes to the first block, starting at the pointer and moving upward
// (modulo NBLK), that still has a free entry once the entries taken by
// instructions 0..d-1 of the same group are removed. Inside the block the
// lowest-numbered free entry is used. After the group the pointer moves to the
// block after the last one used, so consecutive instructions spread over the
// blocks. Dispatch stays in order: once an instruction finds no room (or
// en is low), it and all younger instructions of the group are refused.
//
// Interface: free is the per-entry free map (entry index = block*EPB + slot);
// accept/blk/ent are combinational in the same cycle; the pointer advances at
// the clock edge. Round-robin assignment is the published design's; skipping full blocks,
// lowest-free-slot choice and in-order refusal are this design's choices.
module block_assign #(
  parameter int unsigned NBLK   = 8,
  parameter int unsigned EPB    = 4,
  parameter int unsigned DISP_W = 4,
  localparam int unsigned IQS   = NBLK * EPB,
  localparam int unsigned BW    = (NBLK > 1) ? $clog2(NBLK) : 1,
  localparam int unsigned IW    = (IQS > 1) ? $clog2(IQS) : 1
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        en,
  input  logic [DISP_W-1:0]           disp_valid,
  input  logic [IQS-1:0]              free,
  output logic [DISP_W-1:0]           accept,
  output logic [DISP_W-1:0][BW-1:0]   blk,
  output logic [DISP_W-1:0][IW-1:0]   ent
);

  logic [BW-1:0] ptr_q, ptr_d;

  always_comb begin
    logic [IQS-1:0] avail;
    logic           go;
    logic           found;
    int unsigned    b;
    avail  = free;
    b      = 0;
    go     = en;
    ptr_d  = ptr_q;
    accept = '0;
    blk    = '0;
    ent    = '0;
    for (int d = 0; d < DISP_W; d++) begin
      found = 1'b0;
      if (go && disp_valid[d]) begin
        for (int i = 0; i < NBLK; i++) begin
          b = (int'(ptr_d) + i) % NBLK;
          for (int e = 0; e < EPB; e++) begin
            if (!found && avail[b*EPB + e]) begin
              found                = 1'b1;
              avail[b*EPB + e]     = 1'b0;
              blk[d]               = BW'(b);
              ent[d]               = IW'(b*EPB + e);
            end
          end
        end
      end
      if (found) begin
        accept[d] = 1'b1;
        ptr_d     = BW'((int'(blk[d]) + 1) % NBLK);
      end else begin
        go = 1'b0;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr_q <= '0;
    else        ptr_q <= ptr_d;
  end

endmodule
