// l1d_cache: non-blocking L1 data cache for a GPGPU streaming multiprocessor,
// write-back on hits and write-around on misses, with the hardware needed to
// run the RVWMO memory model under release-consistency-directed coherence.
//
// Requests are vector accesses: one cache line (block address) plus a word
// mask covering the active lanes. Operations (l1d_pkg::l1_op_e):
//   LOAD   hit: data from the data array. Miss: a vector MSHR entry and an L2
//          GET, or a subentry if that line's refill is already in flight.
//   STORE  hit: words written, line marked dirty (write-back). Miss that hits
//          an in-flight refill: merged into the MSHR entry. Other miss: sent
//          to L2 as a masked PUT without allocating (write-around) and
//          tracked in the WSHR until L2 acknowledges.
//   LR/SC/AMO  forwarded to L2 and recorded in the special MSHR. A local copy
//          of the line is written back first if dirty and then invalidated.
//   WAIT_MSHR  "drain MSHR": completes when no refill or atomic is in flight.
//   FLUSH  "global flush": writes every dirty line to L2 (one per cycle), then
//          waits in stage 0 until the WSHR is empty ("drain WSHR").
//   INV    "global invalidate": drains the MSHR, flushes (including the
//          WSHR drain), then clears all valid bits as it leaves stage 0.
// FENCE and .aq/.rl are mapped onto the last three by rvwmo_seq.
//
// Same-line ordering: a load miss, store miss or atomic to a line with a
// write in flight waits for its acknowledgement (WSHR protection), so L2
// never sees them out of order; loads and stores that hit an in-flight refill
// join its MSHR entry in order instead.
//
// Pipeline. Stage 0 holds the LSU request (LSU request pipe register) or the
// L2 response (L2 response pipe register); the L2 response has priority.
// Stage 0 looks up the tags, probes MSHR and WSHR, decides, and updates tags,
// MSHR, WSHR and special MSHR as the operation moves into stage 1, so state
// changes are made in order, one operation per cycle. A request that must
// wait stays in stage 0 without blocking L2 responses. Stage 1 reads the
// data array. Stage 2 writes the data array (first cycle) and pushes the LSU
// response queue and the L2 request queue. A refill stays in stage 2 one
// cycle per read subentry. A stage-1 read of the row stage 2 writes in the
// same cycle gets the written words forwarded.
// Unblocked latencies, counted in clock edges from the accepting handshake:
// request->LSU response 4 (hit, write, fence ops), request->L2 request 4
// (miss, write-around, atomic, write-back), request->data array write 3
// (store hit), L2 response->LSU response 4, L2 response->data write 3,
// L2 response->victim write-back request 4.
// Write acknowledgements from L2 are consumed at the port without using the
// pipeline. L2 is assumed to accept requests independently of whether its
// responses are being accepted.
//
// The operation set, the MSHR/WSHR roles, the consistency operations and the
// latencies follow the design; sizes, encodings, the round-robin
// replacement, the one-cycle priority of L2 responses and the handling of a
// local line by atomics are this implementation's choices.
module l1d_cache
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
  parameter int unsigned RSPQ_DEPTH   = 4,
  parameter int unsigned L2Q_DEPTH    = 4,
  localparam int unsigned LINE_W = WORDS * 32,
  localparam int unsigned BLK_W  = ADDR_W - $clog2(WORDS * 4),
  localparam int unsigned SRC_W  = $clog2((MSHR_ENTRIES > WSHR_ENTRIES ?
                                   (MSHR_ENTRIES > AMO_ENTRIES ? MSHR_ENTRIES : AMO_ENTRIES) :
                                   (WSHR_ENTRIES > AMO_ENTRIES ? WSHR_ENTRIES : AMO_ENTRIES)))
) (
  input  logic               clk,
  input  logic               rst_n,
  // LSU request
  input  logic               core_req_valid,
  output logic               core_req_ready,
  input  l1_op_e             core_req_op,
  input  logic [3:0]         core_req_amo_fn,
  input  logic [ID_W-1:0]    core_req_id,
  input  logic [BLK_W-1:0]   core_req_blk,
  input  logic [WORDS-1:0]   core_req_mask,
  input  logic [LINE_W-1:0]  core_req_data,
  // LSU response
  output logic               core_rsp_valid,
  input  logic               core_rsp_ready,
  output l1_op_e             core_rsp_op,
  output logic [ID_W-1:0]    core_rsp_id,
  output logic [WORDS-1:0]   core_rsp_mask,
  output logic [LINE_W-1:0]  core_rsp_data,
  // L2 request
  output logic               l2_req_valid,
  input  logic               l2_req_ready,
  output l2_op_e             l2_req_op,
  output logic [3:0]         l2_req_amo_fn,
  output logic [SRC_W-1:0]   l2_req_src,
  output logic [BLK_W-1:0]   l2_req_blk,
  output logic [WORDS-1:0]   l2_req_mask,
  output logic [LINE_W-1:0]  l2_req_data,
  // L2 response
  input  logic               l2_rsp_valid,
  output logic               l2_rsp_ready,
  input  l2_rsp_e            l2_rsp_op,
  input  logic [SRC_W-1:0]   l2_rsp_src,
  input  logic [LINE_W-1:0]  l2_rsp_data,
  // event pulses
  output l1_events_t         events
);
  localparam int unsigned SET_W = $clog2(SETS);
  localparam int unsigned WAY_W = $clog2(WAYS);
  localparam int unsigned TAG_W = BLK_W - SET_W;
  localparam int unsigned ROW_W = SET_W + WAY_W;
  localparam int unsigned MI_W  = $clog2(MSHR_ENTRIES);
  localparam int unsigned WI_W  = $clog2(WSHR_ENTRIES);
  localparam int unsigned AI_W  = $clog2(AMO_ENTRIES);
  localparam int unsigned NS_W  = $clog2(MSHR_SUBS + 1);

  typedef enum logic [3:0] {
    K_RD_HIT, K_RD_MISS, K_WR_HIT, K_WR_ACK, K_WR_AROUND, K_WB, K_ATOM,
    K_FENCE, K_FILL, K_ATOM_RSP
  } kind_e;

  typedef struct packed {
    kind_e              kind;
    l1_op_e             op;
    logic [3:0]         amo_fn;
    logic [ID_W-1:0]    id;
    logic [BLK_W-1:0]   blk;
    logic [WORDS-1:0]   mask;
    logic [LINE_W-1:0]  data;
    logic [SET_W-1:0]   set;
    logic [WAY_W-1:0]   way;
    logic [SRC_W-1:0]   src;       // MSHR / WSHR / special MSHR index
    logic [SRC_W-1:0]   wsrc;      // WSHR index of a victim write-back
    logic               victim_wb;
    logic [BLK_W-1:0]   victim_blk;
  } pipe_t;

  typedef struct packed {
    l1_op_e            op;
    logic [ID_W-1:0]   id;
    logic [WORDS-1:0]  mask;
    logic [LINE_W-1:0] data;
  } core_rsp_t;

  typedef struct packed {
    l2_op_e            op;
    logic [3:0]        amo_fn;
    logic [SRC_W-1:0]  src;
    logic [BLK_W-1:0]  blk;
    logic [WORDS-1:0]  mask;
    logic [LINE_W-1:0] data;
  } l2_req_t;

  function automatic logic [LINE_W-1:0] merge(input logic [LINE_W-1:0] base,
                                              input logic [LINE_W-1:0] upd,
                                              input logic [WORDS-1:0]  m);
    logic [LINE_W-1:0] r;
    r = base;
    for (int w = 0; w < WORDS; w++) if (m[w]) r[w*32 +: 32] = upd[w*32 +: 32];
    return r;
  endfunction

  // ---------------------------------------------------------------- state
  logic              req_v;
  l1_op_e            req_op;
  logic [3:0]        req_amo_fn;
  logic [ID_W-1:0]   req_id;
  logic [BLK_W-1:0]  req_blk;
  logic [WORDS-1:0]  req_mask;
  logic [LINE_W-1:0] req_data;

  logic              rsp_v;
  l2_rsp_e           rsp_op;
  logic [SRC_W-1:0]  rsp_src;
  logic [LINE_W-1:0] rsp_data;

  logic  s1_v, s2_v;
  pipe_t s1, s2;
  logic  s2_wr_done, s2_wb_done;
  logic [NS_W-1:0] s2_ptr;

  // ---------------------------------------------------------------- submodules
  logic [SET_W-1:0] req_set;
  logic [TAG_W-1:0] req_tag;
  assign req_set = req_blk[SET_W-1:0];
  assign req_tag = req_blk[BLK_W-1:SET_W];

  logic             lk_hit, lk_dirty;
  logic [WAY_W-1:0] lk_way;
  logic [SET_W-1:0] vc_set;
  logic [WAY_W-1:0] vc_way;
  logic             vc_valid, vc_dirty;
  logic [TAG_W-1:0] vc_tag;
  logic             any_dirty;
  logic [SET_W-1:0] dt_set;
  logic [WAY_W-1:0] dt_way;
  logic [TAG_W-1:0] dt_tag;
  logic             t_fill, t_set_dirty, t_clr_dirty, t_inval, t_inval_all, t_dirty;
  logic [SET_W-1:0] t_set;
  logic [WAY_W-1:0] t_way;
  logic [TAG_W-1:0] t_tag;

  l1d_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) u_tags (
    .clk, .rst_n,
    .lk_set(req_set), .lk_tag(req_tag), .lk_hit, .lk_way, .lk_dirty,
    .vc_set, .vc_way, .vc_valid, .vc_dirty, .vc_tag,
    .any_dirty, .dt_set, .dt_way, .dt_tag,
    .cmd_fill(t_fill), .cmd_set_dirty(t_set_dirty), .cmd_clr_dirty(t_clr_dirty),
    .cmd_inval(t_inval), .cmd_inval_all(t_inval_all),
    .cmd_set(t_set), .cmd_way(t_way), .cmd_tag(t_tag), .cmd_dirty(t_dirty));

  logic              da_re, da_we;
  logic [ROW_W-1:0]  da_raddr, da_waddr;
  logic [LINE_W-1:0] da_rdata, da_wdata;
  logic [WORDS-1:0]  da_wmask;

  l1d_data_array #(.ROWS(SETS * WAYS), .WORDS(WORDS)) u_data (
    .clk, .re(da_re), .raddr(da_raddr), .rdata(da_rdata),
    .we(da_we), .waddr(da_waddr), .wmask(da_wmask), .wdata(da_wdata));

  // vector MSHR
  logic                 m_probe_hit, m_sub_full, m_full, m_empty;
  logic [MI_W-1:0]      m_probe_idx, m_alloc_idx;
  logic                 m_alloc, m_append, m_close, m_free, m_sub_we;
  logic [MI_W-1:0]      m_close_idx, m_free_idx, m_ra_idx, m_rb_idx;
  logic [BLK_W-1:0]     m_ra_blk;
  logic                 m_ra_has_write;
  logic [NS_W-1:0]      m_rb_nsub;
  logic [MSHR_SUBS-1:0] m_rb_we;
  logic [MSHR_SUBS-1:0][ID_W-1:0]   m_rb_id;
  logic [MSHR_SUBS-1:0][WORDS-1:0]  m_rb_mask;
  logic [MSHR_SUBS-1:0][LINE_W-1:0] m_rb_data;

  l1d_mshr #(.ENTRIES(MSHR_ENTRIES), .SUBS(MSHR_SUBS), .BLK_W(BLK_W), .ID_W(ID_W),
             .WORDS(WORDS)) u_mshr (
    .clk, .rst_n,
    .probe_blk(req_blk), .probe_hit(m_probe_hit), .probe_idx(m_probe_idx),
    .probe_sub_full(m_sub_full),
    .alloc(m_alloc), .alloc_blk(req_blk), .alloc_idx(m_alloc_idx),
    .append(m_append), .append_idx(m_probe_idx),
    .sub_we(m_sub_we), .sub_id(req_id), .sub_mask(req_mask), .sub_data(req_data),
    .close(m_close), .close_idx(m_close_idx), .free(m_free), .free_idx(m_free_idx),
    .ra_idx(m_ra_idx), .ra_blk(m_ra_blk), .ra_has_write(m_ra_has_write),
    .rb_idx(m_rb_idx), .rb_nsub(m_rb_nsub), .rb_we(m_rb_we), .rb_id(m_rb_id),
    .rb_mask(m_rb_mask), .rb_data(m_rb_data),
    .full(m_full), .empty(m_empty));

  // WSHR
  logic             w_alloc, w_free, w_hit_a, w_hit_b, w_full, w_empty;
  logic [BLK_W-1:0] w_alloc_blk, w_probe_a;
  logic [WI_W-1:0]  w_alloc_idx;

  l1d_wshr #(.ENTRIES(WSHR_ENTRIES), .BLK_W(BLK_W)) u_wshr (
    .clk, .rst_n,
    .alloc(w_alloc), .alloc_blk(w_alloc_blk), .alloc_idx(w_alloc_idx),
    .free(w_free), .free_idx(l2_rsp_src[WI_W-1:0]),
    .probe_a_blk(w_probe_a), .probe_a_hit(w_hit_a),
    .probe_b_blk({vc_tag, vc_set}), .probe_b_hit(w_hit_b),
    .full(w_full), .empty(w_empty));

  // special MSHR
  logic            a_alloc, a_free, a_full, a_empty, a_lr_pending;
  logic [AI_W-1:0] a_alloc_idx;
  l1_op_e          a_rd_op;
  logic [ID_W-1:0] a_rd_id;
  logic [WORDS-1:0] a_rd_mask;

  l1d_amo_mshr #(.ENTRIES(AMO_ENTRIES), .ID_W(ID_W), .WORDS(WORDS)) u_amo (
    .clk, .rst_n,
    .alloc(a_alloc), .alloc_op(req_op), .alloc_id(req_id), .alloc_mask(req_mask),
    .alloc_idx(a_alloc_idx),
    .rd_idx(s2.src[AI_W-1:0]), .rd_op(a_rd_op), .rd_id(a_rd_id), .rd_mask(a_rd_mask),
    .free(a_free), .free_idx(s2.src[AI_W-1:0]),
    .full(a_full), .empty(a_empty), .lr_pending(a_lr_pending));

  // queues
  logic      rq_push, rq_full, lq_push, lq_full;
  core_rsp_t rq_in, rq_out;
  l2_req_t   lq_in, lq_out;

  l1d_fifo #(.T(core_rsp_t), .DEPTH(RSPQ_DEPTH)) u_rspq (
    .clk, .rst_n, .push(rq_push), .in_data(rq_in), .full(rq_full),
    .out_valid(core_rsp_valid), .pop(core_rsp_ready && core_rsp_valid), .out_data(rq_out),
    .count());

  l1d_fifo #(.T(l2_req_t), .DEPTH(L2Q_DEPTH)) u_l2q (
    .clk, .rst_n, .push(lq_push), .in_data(lq_in), .full(lq_full),
    .out_valid(l2_req_valid), .pop(l2_req_ready && l2_req_valid), .out_data(lq_out),
    .count());

  assign core_rsp_op   = rq_out.op;
  assign core_rsp_id   = rq_out.id;
  assign core_rsp_mask = rq_out.mask;
  assign core_rsp_data = rq_out.data;
  assign l2_req_op     = lq_out.op;
  assign l2_req_amo_fn = lq_out.amo_fn;
  assign l2_req_src    = lq_out.src;
  assign l2_req_blk    = lq_out.blk;
  assign l2_req_mask   = lq_out.mask;
  assign l2_req_data   = lq_out.data;

  // ---------------------------------------------------------------- stage 2
  logic s2_done, s1_fire, s1_free;

  // refill: next read subentry and the line each one sees
  logic             s2_has_next, s2_has_next2;
  logic [NS_W-1:0]  s2_next;
  logic [LINE_W-1:0] s2_line_next, s2_line_all;
  logic [NS_W-1:0]  s2_nreads;
  always_comb begin
    s2_has_next  = 1'b0;
    s2_has_next2 = 1'b0;
    s2_next      = '0;
    s2_nreads    = '0;
    for (int i = 0; i < MSHR_SUBS; i++) begin
      if (NS_W'(i) < m_rb_nsub && !m_rb_we[i]) begin
        s2_nreads = s2_nreads + 1'b1;
        if (NS_W'(i) >= s2_ptr) begin
          if (s2_has_next) s2_has_next2 = 1'b1;
          else begin
            s2_has_next = 1'b1;
            s2_next     = NS_W'(i);
          end
        end
      end
    end
    s2_line_next = s2.data;
    s2_line_all  = s2.data;
    for (int i = 0; i < MSHR_SUBS; i++) begin
      if (NS_W'(i) < m_rb_nsub && m_rb_we[i]) begin
        if (NS_W'(i) < s2_next) s2_line_next = merge(s2_line_next, m_rb_data[i], m_rb_mask[i]);
        s2_line_all = merge(s2_line_all, m_rb_data[i], m_rb_mask[i]);
      end
    end
  end
  assign m_rb_idx = s2.src[MI_W-1:0];

  // data array read result with same-cycle write forwarding
  logic              byp_v;
  logic [WORDS-1:0]  byp_mask;
  logic [LINE_W-1:0] byp_data, s2_rdata;
  assign s2_rdata = byp_v ? merge(da_rdata, byp_data, byp_mask) : da_rdata;

  logic s2_wb_now, s2_rsp_now;
  always_comb begin
    s2_done    = 1'b0;
    rq_push    = 1'b0;
    lq_push    = 1'b0;
    rq_in      = '{op: s2.op, id: s2.id, mask: s2.mask, data: '0};
    lq_in      = '{op: L2_GET, amo_fn: s2.amo_fn, src: s2.src, blk: s2.blk,
                   mask: s2.mask, data: s2.data};
    da_we      = 1'b0;
    da_waddr   = {s2.set, s2.way};
    da_wmask   = s2.mask;
    da_wdata   = s2.data;
    m_free     = 1'b0;
    m_free_idx = s2.src[MI_W-1:0];
    a_free     = 1'b0;
    s2_wb_now  = 1'b0;
    s2_rsp_now = 1'b0;
    if (s2_v) begin
      unique case (s2.kind)
        K_RD_HIT: begin
          rq_in.data = s2_rdata;
          rq_push    = !rq_full;
          s2_done    = !rq_full;
        end
        K_WR_HIT: begin
          da_we   = !s2_wr_done;
          rq_push = !rq_full;
          s2_done = !rq_full;
        end
        K_WR_ACK: begin
          rq_push = !rq_full;
          s2_done = !rq_full;
        end
        K_RD_MISS: begin
          lq_push = !lq_full;
          s2_done = !lq_full;
        end
        K_WR_AROUND: begin
          lq_in.op = L2_PUT;
          rq_push  = !rq_full && !lq_full;
          lq_push  = !rq_full && !lq_full;
          s2_done  = !rq_full && !lq_full;
        end
        K_WB: begin
          lq_in.op   = L2_PUT;
          lq_in.mask = '1;
          lq_in.data = s2_rdata;
          lq_push    = !lq_full;
          s2_done    = !lq_full;
        end
        K_ATOM: begin
          lq_in.op = (s2.op == OP_LR) ? L2_LR : (s2.op == OP_SC) ? L2_SC : L2_AMO;
          lq_push  = !lq_full;
          s2_done  = !lq_full;
        end
        K_FENCE: begin
          rq_push = !rq_full;
          s2_done = !rq_full;
        end
        K_FILL: begin
          da_we      = !s2_wr_done;
          da_wmask   = '1;
          da_wdata   = s2_line_all;
          // victim write-back
          lq_in.op   = L2_PUT;
          lq_in.src  = s2.wsrc;
          lq_in.blk  = s2.victim_blk;
          lq_in.mask = '1;
          lq_in.data = s2_rdata;
          s2_wb_now  = s2.victim_wb && !s2_wb_done && !lq_full;
          lq_push    = s2_wb_now;
          // one read subentry per cycle
          s2_rsp_now = s2_has_next && !rq_full;
          rq_in      = '{op: OP_LOAD, id: m_rb_id[s2_next], mask: m_rb_mask[s2_next],
                         data: s2_line_next};
          rq_push    = s2_rsp_now;
          s2_done    = (!s2_has_next || (s2_rsp_now && !s2_has_next2)) &&
                       (!s2.victim_wb || s2_wb_done || s2_wb_now);
          m_free     = s2_done;
        end
        K_ATOM_RSP: begin
          rq_in   = '{op: a_rd_op, id: a_rd_id, mask: a_rd_mask, data: s2.data};
          rq_push = !rq_full;
          s2_done = !rq_full;
          a_free  = !rq_full;
        end
        default: s2_done = 1'b1;
      endcase
    end
  end

  // ---------------------------------------------------------------- stage 1
  assign s1_fire  = s1_v && (!s2_v || s2_done);
  assign s1_free  = !s1_v || s1_fire;
  assign da_re    = s1_fire && (s1.kind == K_RD_HIT || s1.kind == K_WB ||
                                (s1.kind == K_FILL && s1.victim_wb));
  assign da_raddr = {s1.set, s1.way};

  // ---------------------------------------------------------------- stage 0: L2 response
  logic  rsp_can, rsp_take;
  pipe_t rsp_pipe;
  assign m_ra_idx = rsp_src[MI_W-1:0];
  assign vc_set   = m_ra_blk[SET_W-1:0];

  always_comb begin
    rsp_can  = 1'b1;
    rsp_pipe = '0;
    rsp_pipe.data = rsp_data;
    rsp_pipe.src  = rsp_src;
    if (rsp_op == L2R_DATA) begin
      rsp_pipe.kind       = K_FILL;
      rsp_pipe.op         = OP_LOAD;
      rsp_pipe.blk        = m_ra_blk;
      rsp_pipe.set        = vc_set;
      rsp_pipe.way        = vc_way;
      rsp_pipe.victim_wb  = vc_valid && vc_dirty;
      rsp_pipe.victim_blk = {vc_tag, vc_set};
      rsp_pipe.wsrc       = SRC_W'(w_alloc_idx);
      if (vc_valid && vc_dirty && (w_full || w_hit_b)) rsp_can = 1'b0;
    end else begin
      rsp_pipe.kind = K_ATOM_RSP;
    end
  end
  assign rsp_take     = rsp_v && rsp_can && s1_free;
  assign l2_rsp_ready = (l2_rsp_op == L2R_ACK) || !rsp_v || rsp_take;
  assign w_free       = l2_rsp_valid && l2_rsp_op == L2R_ACK;

  // ---------------------------------------------------------------- stage 0: LSU request
  logic  slot;          // stage 0 may act on the request this cycle
  logic  r_leave, r_enter, r_wb;
  pipe_t r_pipe;
  // stall reasons
  logic  st_prot, st_wfull, st_mfull, st_lrsc, st_mwait, st_wdrain;
  logic  push_dirty_wb; // flush/invalidate push one dirty line
  logic  [BLK_W-1:0] dt_blk;
  assign dt_blk = {dt_tag, dt_set};
  assign slot   = s1_free && !rsp_take;

  always_comb begin
    r_leave  = 1'b0;
    r_enter  = 1'b0;
    r_wb     = 1'b0;
    r_pipe   = '0;
    r_pipe.op     = req_op;
    r_pipe.amo_fn = req_amo_fn;
    r_pipe.id     = req_id;
    r_pipe.blk    = req_blk;
    r_pipe.mask   = req_mask;
    r_pipe.data   = req_data;
    r_pipe.set    = req_set;
    r_pipe.way    = lk_way;
    st_prot  = 1'b0;
    st_wfull = 1'b0;
    st_mfull = 1'b0;
    st_lrsc  = 1'b0;
    st_mwait = 1'b0;
    st_wdrain = 1'b0;
    push_dirty_wb = 1'b0;
    w_probe_a = (req_op == OP_FLUSH || req_op == OP_INV) ? dt_blk : req_blk;
    if (req_v) begin
      unique case (req_op)
        OP_LOAD: begin
          if (lk_hit) begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_RD_HIT;
          end else if (m_probe_hit) begin
            if (m_sub_full) st_mfull = 1'b1;
            else r_leave = 1'b1;                       // joins the refill
          end else if (w_hit_a) st_prot = 1'b1;
          else if (m_full) st_mfull = 1'b1;
          else begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_RD_MISS;
            r_pipe.src = SRC_W'(m_alloc_idx);
          end
        end
        OP_STORE: begin
          if (lk_hit) begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_WR_HIT;
          end else if (m_probe_hit) begin
            if (m_sub_full) st_mfull = 1'b1;
            else begin
              r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_WR_ACK;
            end
          end else if (w_hit_a) st_prot = 1'b1;
          else if (w_full) st_wfull = 1'b1;
          else begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_WR_AROUND;
            r_pipe.src = SRC_W'(w_alloc_idx);
          end
        end
        OP_LR, OP_SC, OP_AMO: begin
          if (lk_hit && lk_dirty) begin
            if (w_hit_a) st_prot = 1'b1;
            else if (w_full) st_wfull = 1'b1;
            else begin
              r_wb = 1'b1; r_enter = 1'b1; r_pipe.kind = K_WB;
              r_pipe.src = SRC_W'(w_alloc_idx);
            end
          end else if (w_hit_a) st_prot = 1'b1;
          else if (m_probe_hit) st_mfull = 1'b1;   // refill of this line still in flight
          else if (req_op == OP_SC && a_lr_pending) st_lrsc = 1'b1;
          else if (a_full) st_mfull = 1'b1;
          else begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_ATOM;
            r_pipe.src = SRC_W'(a_alloc_idx);
          end
        end
        OP_FLUSH, OP_INV: begin
          if (req_op == OP_INV && !(m_empty && a_empty)) st_mwait = 1'b1;
          else if (any_dirty) begin
            if (w_hit_a) st_prot = 1'b1;
            else if (w_full) st_wfull = 1'b1;
            else begin
              r_wb = 1'b1; r_enter = 1'b1; push_dirty_wb = 1'b1;
              r_pipe.kind = K_WB;
              r_pipe.blk  = dt_blk;
              r_pipe.set  = dt_set;
              r_pipe.way  = dt_way;
              r_pipe.src  = SRC_W'(w_alloc_idx);
            end
          end else if (!w_empty) st_wdrain = 1'b1;   // drain WSHR
          else begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_FENCE;
          end
        end
        OP_WAIT_MSHR: begin
          if (!(m_empty && a_empty)) st_mwait = 1'b1;
          else begin
            r_leave = 1'b1; r_enter = 1'b1; r_pipe.kind = K_FENCE;
          end
        end
        default: ;
      endcase
    end
  end

  logic req_act;
  assign req_act        = slot && (r_leave || r_wb);
  assign core_req_ready = !req_v || (req_act && r_leave);

  // state updates (one operation per cycle enters stage 1)
  always_comb begin
    t_fill = 1'b0; t_set_dirty = 1'b0; t_clr_dirty = 1'b0; t_inval = 1'b0;
    t_inval_all = 1'b0; t_dirty = 1'b0;
    t_set = req_set; t_way = lk_way; t_tag = req_tag;
    m_alloc = 1'b0; m_append = 1'b0; m_sub_we = (req_op == OP_STORE);
    m_close = 1'b0; m_close_idx = rsp_src[MI_W-1:0];
    w_alloc = 1'b0; w_alloc_blk = req_blk;
    a_alloc = 1'b0;
    if (rsp_take) begin
      if (rsp_op == L2R_DATA) begin
        t_fill  = 1'b1;
        t_set   = vc_set;
        t_way   = vc_way;
        t_tag   = m_ra_blk[BLK_W-1:SET_W];
        t_dirty = m_ra_has_write;
        m_close = 1'b1;
        if (vc_valid && vc_dirty) begin
          w_alloc     = 1'b1;
          w_alloc_blk = {vc_tag, vc_set};
        end
      end
    end else if (req_act) begin
      unique case (r_pipe.kind)
        K_RD_HIT: ;
        K_RD_MISS: m_alloc = 1'b1;
        K_WR_HIT: t_set_dirty = 1'b1;
        K_WR_ACK: m_append = 1'b1;
        K_WR_AROUND: w_alloc = 1'b1;
        K_WB: begin
          t_clr_dirty = 1'b1;
          w_alloc     = 1'b1;
          w_alloc_blk = r_pipe.blk;
          if (push_dirty_wb) begin
            t_set = dt_set;
            t_way = dt_way;
          end
        end
        K_ATOM: begin
          a_alloc = 1'b1;
          t_inval = lk_hit;
        end
        K_FENCE: t_inval_all = (req_op == OP_INV);
        default: ;
      endcase
      if (req_op == OP_LOAD && !r_enter) m_append = 1'b1;
    end
  end

  // ---------------------------------------------------------------- registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_v      <= 1'b0;
      req_op     <= OP_LOAD;
      rsp_v      <= 1'b0;
      rsp_op     <= L2R_DATA;
      s1_v       <= 1'b0;
      s2_v       <= 1'b0;
      s1         <= '0;
      s2         <= '0;
      s2_wr_done <= 1'b0;
      s2_wb_done <= 1'b0;
      s2_ptr     <= '0;
      byp_v      <= 1'b0;
    end else begin
      // LSU request pipe register
      if (core_req_valid && core_req_ready) begin
        req_v      <= 1'b1;
        req_op     <= core_req_op;
      end else if (req_act && r_leave) begin
        req_v <= 1'b0;
      end
      // L2 response pipe register
      if (l2_rsp_valid && l2_rsp_ready && l2_rsp_op != L2R_ACK) begin
        rsp_v    <= 1'b1;
        rsp_op   <= l2_rsp_op;
      end else if (rsp_take) begin
        rsp_v <= 1'b0;
      end
      // stage 1
      if (rsp_take) begin
        s1_v <= 1'b1;
        s1   <= rsp_pipe;
      end else if (req_act && r_enter) begin
        s1_v <= 1'b1;
        s1   <= r_pipe;
      end else if (s1_fire) begin
        s1_v <= 1'b0;
      end
      // stage 2
      if (s1_fire) begin
        s2_v       <= 1'b1;
        s2         <= s1;
        s2_wr_done <= 1'b0;
        s2_wb_done <= 1'b0;
        s2_ptr     <= '0;
        byp_v      <= da_we && da_waddr == da_raddr && da_re;
      end else begin
        if (s2_done) s2_v <= 1'b0;
        if (da_we) s2_wr_done <= 1'b1;
        if (s2_wb_now) s2_wb_done <= 1'b1;
        if (s2_rsp_now) s2_ptr <= s2_next + 1'b1;
      end
    end
  end

  // payload registers (no reset: always written before use)
  always_ff @(posedge clk) begin
    if (core_req_valid && core_req_ready) begin
      req_amo_fn <= core_req_amo_fn;
      req_id     <= core_req_id;
      req_blk    <= core_req_blk;
      req_mask   <= core_req_mask;
      req_data   <= core_req_data;
    end
    if (l2_rsp_valid && l2_rsp_ready && l2_rsp_op != L2R_ACK) begin
      rsp_src  <= l2_rsp_src;
      rsp_data <= l2_rsp_data;
    end
    if (s1_fire) begin
      byp_mask <= da_wmask;
      byp_data <= da_wdata;
    end
  end

  // ---------------------------------------------------------------- events
  always_comb begin
    events = '0;
    if (req_act && r_leave) begin
      events.read_hit     = r_pipe.kind == K_RD_HIT;
      events.read_miss    = r_pipe.kind == K_RD_MISS;
      events.read_merge   = req_op == OP_LOAD && !r_enter;
      events.write_hit    = r_pipe.kind == K_WR_HIT;
      events.write_around = r_pipe.kind == K_WR_AROUND;
      events.write_merge  = r_pipe.kind == K_WR_ACK;
      events.atomic       = r_pipe.kind == K_ATOM;
    end
    events.dirty_wb     = req_act && r_wb;
    events.wshr_protect = req_v && st_prot;
    events.wshr_full    = req_v && st_wfull;
    events.mshr_full    = req_v && st_mfull;
    events.lr_sc_wait   = req_v && st_lrsc;
    events.mshr_wait    = req_v && st_mwait;
    events.wshr_wait    = req_v && st_wdrain;
    events.replace_wb   = s2_v && s2.kind == K_FILL && s2_wb_now;
    events.multi_sub    = s2_v && s2.kind == K_FILL && s2_done && s2_nreads > 1;
    events.flush_done   = s2_v && s2.kind == K_FENCE && s2_done && s2.op == OP_FLUSH;
    events.inv_done     = s2_v && s2.kind == K_FENCE && s2_done && s2.op == OP_INV;
    events.wait_done    = s2_v && s2.kind == K_FENCE && s2_done && s2.op == OP_WAIT_MSHR;
    events.bypass       = s1_fire && da_re && da_we && da_waddr == da_raddr;
    events.lsu_q_full   = s2_v && rq_full && !s2_done;
    events.l2_q_full    = s2_v && lq_full && !s2_done;
  end

  a_rsp_src_ok: assert property (@(posedge clk) disable iff (!rst_n)
    (l2_rsp_valid && l2_rsp_op == L2R_ACK) |-> !(w_alloc && w_alloc_idx == l2_rsp_src[WI_W-1:0]));
endmodule
