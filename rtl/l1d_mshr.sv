// l1d_mshr: vector Miss Status Holding Register of the L1 data cache.
//
// Each entry tracks one cache line whose refill has been requested from L2
// and lists, in arrival order, the LSU accesses waiting for it (subentries).
// The first read miss to a line allocates the entry and causes the L2 read;
// later read misses to the same line, and store misses that hit the
// in-flight read miss, only add a subentry. A store subentry carries its
// data and word mask, which the refill merges into the line, so the cache
// stays non-blocking without breaking data dependences: a read subentry sees
// exactly the stores that precede it.
//
// Entry life: alloc (request path) -> append* -> close (the refill has been
// taken by the response path; no more appends) -> free (refill done).
// Probe only matches open entries. Port A reads an entry's line address and
// whether it holds a store (the refill marks the line dirty then); port B
// reads all of its subentries for the refill's responses. `empty` counts
// closed entries too, so "drain MSHR" waits until every refill is finished.
module l1d_mshr #(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned SUBS    = 4,
  parameter int unsigned BLK_W   = 25,
  parameter int unsigned ID_W    = 8,
  parameter int unsigned WORDS   = 32
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // probe by line address
  input  logic [BLK_W-1:0]              probe_blk,
  output logic                          probe_hit,
  output logic [$clog2(ENTRIES)-1:0]    probe_idx,
  output logic                          probe_sub_full,
  // new entry or new subentry (one per cycle), subentry contents shared
  input  logic                          alloc,
  input  logic [BLK_W-1:0]              alloc_blk,
  output logic [$clog2(ENTRIES)-1:0]    alloc_idx,
  input  logic                          append,
  input  logic [$clog2(ENTRIES)-1:0]    append_idx,
  input  logic                          sub_we,
  input  logic [ID_W-1:0]               sub_id,
  input  logic [WORDS-1:0]              sub_mask,
  input  logic [WORDS*32-1:0]           sub_data,
  // refill bookkeeping
  input  logic                          close,
  input  logic [$clog2(ENTRIES)-1:0]    close_idx,
  input  logic                          free,
  input  logic [$clog2(ENTRIES)-1:0]    free_idx,
  // read port A
  input  logic [$clog2(ENTRIES)-1:0]    ra_idx,
  output logic [BLK_W-1:0]              ra_blk,
  output logic                          ra_has_write,
  // read port B
  input  logic [$clog2(ENTRIES)-1:0]    rb_idx,
  output logic [$clog2(SUBS+1)-1:0]     rb_nsub,
  output logic [SUBS-1:0]               rb_we,
  output logic [SUBS-1:0][ID_W-1:0]     rb_id,
  output logic [SUBS-1:0][WORDS-1:0]    rb_mask,
  output logic [SUBS-1:0][WORDS*32-1:0] rb_data,
  output logic                          full,
  output logic                          empty
);
  localparam int unsigned IW = $clog2(ENTRIES);
  localparam int unsigned NW = $clog2(SUBS + 1);
  localparam int unsigned SLW = (SUBS > 1) ? $clog2(SUBS) : 1;

  logic [ENTRIES-1:0]               busy, open;
  logic [BLK_W-1:0]                 blk  [ENTRIES];
  logic [NW-1:0]                    nsub [ENTRIES];
  logic [SUBS-1:0]                  we   [ENTRIES];
  logic [SUBS-1:0][ID_W-1:0]        id   [ENTRIES];
  logic [SUBS-1:0][WORDS-1:0]       mask [ENTRIES];
  logic [SUBS-1:0][WORDS*32-1:0]    data [ENTRIES];

  always_comb begin
    alloc_idx      = '0;
    probe_hit      = 1'b0;
    probe_idx      = '0;
    for (int e = ENTRIES - 1; e >= 0; e--) begin
      if (!busy[e]) alloc_idx = e[IW-1:0];
      if (open[e] && blk[e] == probe_blk) begin
        probe_hit = 1'b1;
        probe_idx = e[IW-1:0];
      end
    end
    probe_sub_full = (nsub[probe_idx] == NW'(SUBS));
  end

  assign full  = &busy;
  assign empty = ~|busy;

  assign ra_blk       = blk[ra_idx];
  assign ra_has_write = |(we[ra_idx] & ((SUBS'(1) << nsub[ra_idx]) - 1'b1));
  assign rb_nsub      = nsub[rb_idx];
  assign rb_we        = we[rb_idx];
  assign rb_id        = id[rb_idx];
  assign rb_mask      = mask[rb_idx];
  assign rb_data      = data[rb_idx];

  logic [IW-1:0] wr_idx;
  logic [NW-1:0] wr_slot;
  assign wr_idx  = alloc ? alloc_idx : append_idx;
  assign wr_slot = alloc ? '0 : nsub[append_idx];
  logic [SLW-1:0] wr_si;
  assign wr_si = wr_slot[SLW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= '0;
      open <= '0;
      for (int e = 0; e < ENTRIES; e++) begin
        nsub[e] <= '0;
        we[e]   <= '0;
      end
    end else begin
      if (free) begin
        busy[free_idx] <= 1'b0;
        open[free_idx] <= 1'b0;
      end
      if (close) open[close_idx] <= 1'b0;
      if (alloc || append) begin
        if (alloc) begin
          busy[alloc_idx] <= 1'b1;
          open[alloc_idx] <= 1'b1;
        end
        nsub[wr_idx]        <= wr_slot + 1'b1;
        we[wr_idx][wr_si] <= sub_we;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (alloc) blk[alloc_idx] <= alloc_blk;
    if (alloc || append) begin
      id[wr_idx][wr_si]   <= sub_id;
      mask[wr_idx][wr_si] <= sub_mask;
      data[wr_idx][wr_si] <= sub_data;
    end
  end

  a_one_write:  assert property (@(posedge clk) disable iff (!rst_n) !(alloc && append));
  a_alloc_room: assert property (@(posedge clk) disable iff (!rst_n) alloc |-> !full);
  a_append_ok:  assert property (@(posedge clk) disable iff (!rst_n)
                  append |-> (open[append_idx] && nsub[append_idx] < NW'(SUBS)));
endmodule
