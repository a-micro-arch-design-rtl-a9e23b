// l1d_amo_mshr: the special MSHR that records LR, SC and AMO requests the L1
// cache forwards to L2.
//
// Atomics are not performed in L1: each one takes an entry holding the
// LSU's request id, the operation and the word mask, and the entry index is
// the L2 source id. When L2 answers, the cache reads the entry back to build
// the LSU response and frees it. `lr_pending` is set while any LR is in
// flight; the cache keeps a following SC back until it clears, so the SC
// cannot reach L2 before its reservation exists. `empty` is part of the
// "drain MSHR" condition. Allocation takes the lowest free entry.
module l1d_amo_mshr
  import l1d_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned ID_W    = 8,
  parameter int unsigned WORDS   = 32
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        alloc,
  input  l1_op_e                      alloc_op,
  input  logic [ID_W-1:0]             alloc_id,
  input  logic [WORDS-1:0]            alloc_mask,
  output logic [$clog2(ENTRIES)-1:0]  alloc_idx,
  input  logic [$clog2(ENTRIES)-1:0]  rd_idx,
  output l1_op_e                      rd_op,
  output logic [ID_W-1:0]             rd_id,
  output logic [WORDS-1:0]            rd_mask,
  input  logic                        free,
  input  logic [$clog2(ENTRIES)-1:0]  free_idx,
  output logic                        full,
  output logic                        empty,
  output logic                        lr_pending
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] busy;
  l1_op_e             op   [ENTRIES];
  logic [ID_W-1:0]    id   [ENTRIES];
  logic [WORDS-1:0]   mask [ENTRIES];

  always_comb begin
    alloc_idx  = '0;
    lr_pending = 1'b0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!busy[e]) alloc_idx = e[IW-1:0];
      if (busy[e] && op[e] == OP_LR) lr_pending = 1'b1;
    end
  end
  assign full    = &busy;
  assign empty   = ~|busy;
  assign rd_op   = op[rd_idx];
  assign rd_id   = id[rd_idx];
  assign rd_mask = mask[rd_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      for (int e = 0; e < ENTRIES; e++) op[e] <= OP_LOAD;
    end else begin
      if (free) busy[free_idx] <= 1'b0;
      if (alloc) begin
        busy[alloc_idx] <= 1'b1;
        op[alloc_idx]   <= alloc_op;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) begin
      id[alloc_idx]   <= alloc_id;
      mask[alloc_idx] <= alloc_mask;
    end
  end

  a_alloc_not_full: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);
  a_free_busy:      assert property (@(posedge clk) disable iff (!rst_n) free |-> busy[free_idx]);
endmodule
