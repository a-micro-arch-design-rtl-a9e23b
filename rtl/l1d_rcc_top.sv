// l1d_rcc_top: GPGPU L1 data cache with RVWMO support through
// release-consistency-directed coherence.
//
// The LSU hands memory instructions (vector loads and stores, LR/SC/AMO
// with .aq/.rl, FENCE with its predecessor and successor sets) to
// rvwmo_seq, which turns them into L1 operations: the access itself plus a
// global flush before a release and a global invalidate after an acquire,
// or the drain/flush/invalidate operation a FENCE needs. l1d_cache performs
// them: a non-blocking, write-back/write-around cache with a vector MSHR, a
// WSHR and a special MSHR for atomics, connected to L2 by a request and a
// response channel.
// Interface: LSU instruction in / response out, L2 request out / response in
// (all valid/ready), and a vector of one-cycle event pulses for counters.
// Timing: one instruction is taken at a time by the front end; each L1
// operation then follows the cache's latencies (4 cycles request to
// response when unblocked).
module l1d_rcc_top
  import l1d_pkg::*;
#(
  parameter int unsigned SETS         = 128,
  parameter int unsigned WAYS         = 2,
  parameter int unsigned WORDS        = 32,
  parameter int unsigned ADDR_W       = 32,
  parameter int unsigned MSHR_ENTRIES = 4,
  parameter int unsigned MSHR_SUBS    = 4,
  parameter int unsigned WSHR_ENTRIES = 4,
  parameter int unsigned AMO_ENTRIES  = 4,
  parameter int unsigned ID_W         = 8,
  localparam int unsigned LINE_W = WORDS * 32,
  localparam int unsigned BLK_W  = ADDR_W - $clog2(WORDS * 4),
  localparam int unsigned SRC_W  = $clog2((MSHR_ENTRIES > WSHR_ENTRIES ?
                                   (MSHR_ENTRIES > AMO_ENTRIES ? MSHR_ENTRIES : AMO_ENTRIES) :
                                   (WSHR_ENTRIES > AMO_ENTRIES ? WSHR_ENTRIES : AMO_ENTRIES)))
) (
  input  logic               clk,
  input  logic               rst_n,
  // LSU instruction
  input  logic               lsu_valid,
  output logic               lsu_ready,
  input  l1_op_e             lsu_op,
  input  logic               lsu_fence,
  input  logic               lsu_aq,
  input  logic               lsu_rl,
  input  logic [1:0]         lsu_pred,
  input  logic [1:0]         lsu_succ,
  input  logic [3:0]         lsu_amo_fn,
  input  logic [ID_W-1:0]    lsu_id,
  input  logic [BLK_W-1:0]   lsu_blk,
  input  logic [WORDS-1:0]   lsu_mask,
  input  logic [LINE_W-1:0]  lsu_data,
  // LSU response
  output logic               rsp_valid,
  input  logic               rsp_ready,
  output l1_op_e             rsp_op,
  output logic [ID_W-1:0]    rsp_id,
  output logic [WORDS-1:0]   rsp_mask,
  output logic [LINE_W-1:0]  rsp_data,
  // L2
  output logic               l2_req_valid,
  input  logic               l2_req_ready,
  output l2_op_e             l2_req_op,
  output logic [3:0]         l2_req_amo_fn,
  output logic [SRC_W-1:0]   l2_req_src,
  output logic [BLK_W-1:0]   l2_req_blk,
  output logic [WORDS-1:0]   l2_req_mask,
  output logic [LINE_W-1:0]  l2_req_data,
  input  logic               l2_rsp_valid,
  output logic               l2_rsp_ready,
  input  l2_rsp_e            l2_rsp_op,
  input  logic [SRC_W-1:0]   l2_rsp_src,
  input  logic [LINE_W-1:0]  l2_rsp_data,
  output l1_events_t         events
);
  logic              q_valid, q_ready, r_valid, r_ready;
  l1_op_e            q_op, r_op;
  logic [3:0]        q_amo_fn;
  logic [ID_W:0]     q_id, r_id;
  logic [BLK_W-1:0]  q_blk;
  logic [WORDS-1:0]  q_mask, r_mask;
  logic [LINE_W-1:0] q_data, r_data;

  rvwmo_seq #(.WORDS(WORDS), .BLK_W(BLK_W), .ID_W(ID_W)) u_seq (
    .clk, .rst_n,
    .in_valid(lsu_valid), .in_ready(lsu_ready), .in_op(lsu_op), .in_fence(lsu_fence),
    .in_aq(lsu_aq), .in_rl(lsu_rl), .in_pred(lsu_pred), .in_succ(lsu_succ),
    .in_amo_fn(lsu_amo_fn), .in_id(lsu_id), .in_blk(lsu_blk), .in_mask(lsu_mask),
    .in_data(lsu_data),
    .out_valid(q_valid), .out_ready(q_ready), .out_op(q_op), .out_amo_fn(q_amo_fn),
    .out_id(q_id), .out_blk(q_blk), .out_mask(q_mask), .out_data(q_data),
    .l1_rsp_valid(r_valid), .l1_rsp_ready(r_ready), .l1_rsp_op(r_op), .l1_rsp_id(r_id),
    .l1_rsp_mask(r_mask), .l1_rsp_data(r_data),
    .rsp_valid, .rsp_ready, .rsp_op, .rsp_id, .rsp_mask, .rsp_data);

  l1d_cache #(.SETS(SETS), .WAYS(WAYS), .WORDS(WORDS), .ADDR_W(ADDR_W),
              .MSHR_ENTRIES(MSHR_ENTRIES), .MSHR_SUBS(MSHR_SUBS),
              .WSHR_ENTRIES(WSHR_ENTRIES), .AMO_ENTRIES(AMO_ENTRIES), .ID_W(ID_W + 1)) u_l1d (
    .clk, .rst_n,
    .core_req_valid(q_valid), .core_req_ready(q_ready), .core_req_op(q_op),
    .core_req_amo_fn(q_amo_fn), .core_req_id(q_id), .core_req_blk(q_blk),
    .core_req_mask(q_mask), .core_req_data(q_data),
    .core_rsp_valid(r_valid), .core_rsp_ready(r_ready), .core_rsp_op(r_op),
    .core_rsp_id(r_id), .core_rsp_mask(r_mask), .core_rsp_data(r_data),
    .l2_req_valid, .l2_req_ready, .l2_req_op, .l2_req_amo_fn, .l2_req_src, .l2_req_blk,
    .l2_req_mask, .l2_req_data,
    .l2_rsp_valid, .l2_rsp_ready, .l2_rsp_op, .l2_rsp_src, .l2_rsp_data,
    .events);
endmodule
