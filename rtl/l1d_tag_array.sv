// l1d_tag_array: tags, valid bits and dirty bits of the set-associative L1
// data cache, with the replacement choice and the dirty-line scan used by
// global flush and invalidate.
//
// Two combinational lookup ports: the request port (hit, hit way, dirty) for
// the LSU request in stage 0, and the victim port for a refill, which picks
// the first invalid way of the set or else the set's round-robin way.
// A scan port names the lowest-numbered dirty line of the whole cache (set,
// way and its block address) so a flush can write back one line per cycle;
// with no dirty line, flush costs no extra cycle. State is kept in flip-flops
// and changes at a clock edge by one command per cycle: fill a way, set or
// clear a dirty bit, invalidate a way, or invalidate everything (the global
// invalidate of an acquire). Reset clears every valid and dirty bit.
// Replacement policy and flip-flop storage are this design's choices.
module l1d_tag_array
  import l1d_pkg::*;
#(
  parameter int unsigned SETS  = 128,
  parameter int unsigned WAYS  = 2,
  parameter int unsigned TAG_W = 18
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // request lookup
  input  logic [$clog2(SETS)-1:0]   lk_set,
  input  logic [TAG_W-1:0]          lk_tag,
  output logic                      lk_hit,
  output logic [$clog2(WAYS)-1:0]   lk_way,
  output logic                      lk_dirty,
  // victim choice for a refill
  input  logic [$clog2(SETS)-1:0]   vc_set,
  output logic [$clog2(WAYS)-1:0]   vc_way,
  output logic                      vc_valid,
  output logic                      vc_dirty,
  output logic [TAG_W-1:0]          vc_tag,
  // lowest dirty line
  output logic                      any_dirty,
  output logic [$clog2(SETS)-1:0]   dt_set,
  output logic [$clog2(WAYS)-1:0]   dt_way,
  output logic [TAG_W-1:0]          dt_tag,
  // update command
  input  logic                      cmd_fill,      // write tag, set valid, dirty = cmd_dirty
  input  logic                      cmd_set_dirty,
  input  logic                      cmd_clr_dirty,
  input  logic                      cmd_inval,     // clear valid and dirty of one way
  input  logic                      cmd_inval_all,
  input  logic [$clog2(SETS)-1:0]   cmd_set,
  input  logic [$clog2(WAYS)-1:0]   cmd_way,
  input  logic [TAG_W-1:0]          cmd_tag,
  input  logic                      cmd_dirty
);
  localparam int unsigned SW = $clog2(SETS);
  localparam int unsigned WW = (WAYS > 1) ? $clog2(WAYS) : 1;

  logic [TAG_W-1:0] tags  [SETS][WAYS];
  logic [WAYS-1:0]  valid [SETS];
  logic [WAYS-1:0]  dirty [SETS];
  logic [WW-1:0]    rr    [SETS];

  // request lookup
  always_comb begin
    lk_hit   = 1'b0;
    lk_way   = '0;
    lk_dirty = 1'b0;
    for (int w = 0; w < WAYS; w++) begin
      if (valid[lk_set][w] && tags[lk_set][w] == lk_tag && !lk_hit) begin
        lk_hit   = 1'b1;
        lk_way   = w[WW-1:0];
        lk_dirty = dirty[lk_set][w];
      end
    end
  end

  // victim: first invalid way, else round robin
  always_comb begin
    logic found;
    found  = 1'b0;
    vc_way = rr[vc_set];
    for (int w = 0; w < WAYS; w++) begin
      if (!valid[vc_set][w] && !found) begin
        found  = 1'b1;
        vc_way = w[WW-1:0];
      end
    end
    vc_valid = valid[vc_set][vc_way];
    vc_dirty = dirty[vc_set][vc_way];
    vc_tag   = tags[vc_set][vc_way];
  end

  // lowest dirty line (priority scan)
  always_comb begin
    any_dirty = 1'b0;
    dt_set    = '0;
    dt_way    = '0;
    for (int s = SETS - 1; s >= 0; s--) begin
      for (int w = WAYS - 1; w >= 0; w--) begin
        if (dirty[s][w]) begin
          any_dirty = 1'b1;
          dt_set    = s[SW-1:0];
          dt_way    = w[WW-1:0];
        end
      end
    end
    dt_tag = tags[dt_set][dt_way];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
        rr[s]    <= '0;
      end
    end else if (cmd_inval_all) begin
      for (int s = 0; s < SETS; s++) begin
        valid[s] <= '0;
        dirty[s] <= '0;
      end
    end else if (cmd_fill) begin
      valid[cmd_set][cmd_way] <= 1'b1;
      dirty[cmd_set][cmd_way] <= cmd_dirty;
      if (cmd_way == rr[cmd_set])
        rr[cmd_set] <= (rr[cmd_set] == WW'(WAYS - 1)) ? '0 : rr[cmd_set] + 1'b1;
    end else if (cmd_set_dirty) begin
      dirty[cmd_set][cmd_way] <= 1'b1;
    end else if (cmd_clr_dirty) begin
      dirty[cmd_set][cmd_way] <= 1'b0;
    end else if (cmd_inval) begin
      valid[cmd_set][cmd_way] <= 1'b0;
      dirty[cmd_set][cmd_way] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (cmd_fill) tags[cmd_set][cmd_way] <= cmd_tag;
  end

  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    $onehot0({cmd_fill, cmd_set_dirty, cmd_clr_dirty, cmd_inval, cmd_inval_all}));
endmodule
