// l1d_wshr: Write Status Holding Register (WSHR) of the L1 data cache.
//
// Every write the cache sends to L2 (a write-around store miss, or the
// write-back of a dirty line by refill, flush, invalidate or an atomic)
// holds one entry from the cycle it is issued until L2 acknowledges it.
// The entry index travels with the write as its source id and comes back
// with the acknowledgement. Two associative probes tell whether a line
// already has a write in flight: the cache then holds a read miss, a store
// miss or an atomic to that line back, so that a later access cannot
// overtake the write in L2 (same-line write->read and write->write order of
// RVWMO, preserved program order rules 1-2). `empty` is the condition of
// "drain WSHR", which every flush waits for before it completes.
// Allocation takes the lowest free entry; alloc and free may share a cycle.
module l1d_wshr #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned BLK_W   = 25
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        alloc,
  input  logic [BLK_W-1:0]            alloc_blk,
  output logic [$clog2(ENTRIES)-1:0]  alloc_idx,
  input  logic                        free,
  input  logic [$clog2(ENTRIES)-1:0]  free_idx,
  input  logic [BLK_W-1:0]            probe_a_blk,
  output logic                        probe_a_hit,
  input  logic [BLK_W-1:0]            probe_b_blk,
  output logic                        probe_b_hit,
  output logic                        full,
  output logic                        empty
);
  localparam int unsigned IW = $clog2(ENTRIES);

  logic [ENTRIES-1:0] busy;
  logic [BLK_W-1:0]   blk [ENTRIES];

  always_comb begin
    alloc_idx   = '0;
    probe_a_hit = 1'b0;
    probe_b_hit = 1'b0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!busy[e]) alloc_idx = e[IW-1:0];
      if (busy[e] && blk[e] == probe_a_blk) probe_a_hit = 1'b1;
      if (busy[e] && blk[e] == probe_b_blk) probe_b_hit = 1'b1;
    end
  end
  assign full  = &busy;
  assign empty = ~|busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) busy <= '0;
    else begin
      if (free)  busy[free_idx]  <= 1'b0;
      if (alloc) busy[alloc_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) blk[alloc_idx] <= alloc_blk;
  end

  a_alloc_not_full: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);
  a_free_busy:      assert property (@(posedge clk) disable iff (!rst_n) free |-> busy[free_idx]);
endmodule
