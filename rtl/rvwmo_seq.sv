// rvwmo_seq: maps RVWMO memory instructions onto L1 cache operations, the
// release-consistency-directed coherence (RCC) front end of the L1 cache.
//
// The L1 has no hardware coherence. Ordering and visibility across cores are
// obtained from three cache operations: drain MSHR (wait for in-flight
// reads and atomics), global flush (write dirty lines back: a "release") and
// global invalidate (drain, flush, drop every line: an "acquire" that also
// releases). This block turns each LSU instruction into one to three L1
// requests:
//   LOAD / STORE                  the access itself
//   LR/SC/AMO with .rl            global flush first, then the atomic
//   LR/SC/AMO with .aq            the atomic, then global invalidate
//   FENCE R,R or W,R              global invalidate
//   FENCE R,W                     drain MSHR
//   FENCE W,W                     global flush
// A FENCE that combines several pairs takes the strongest operation needed:
// any pair with a read successor, or R,W together with W,W, maps to global
// invalidate (which covers every pair), W,W alone to flush, R,W alone to
// drain. A FENCE with an empty predecessor or successor set produces nothing.
// The single-pair mapping is the design's; the combination rule is this
// implementation's.
//
// Requests leave in order through a valid/ready port; the cache pipeline
// keeps that order, so an operation placed before or after an atomic takes
// effect there. The L1 id is one bit wider than the LSU id: operations
// added around an atomic carry the top bit set and their responses are
// dropped here; every other response is passed to the LSU. A FENCE is
// answered by the response of its mapped operation. One instruction is
// held at a time; with a ready L1 the first request leaves in the cycle after
// the instruction is accepted, the others on the following cycles.
module rvwmo_seq
  import l1d_pkg::*;
#(
  parameter int unsigned WORDS = 32,
  parameter int unsigned BLK_W = 25,
  parameter int unsigned ID_W  = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // LSU instruction
  input  logic                 in_valid,
  output logic                 in_ready,
  input  l1_op_e               in_op,       // LOAD/STORE/LR/SC/AMO; FENCE is in_fence
  input  logic                 in_fence,
  input  logic                 in_aq,
  input  logic                 in_rl,
  input  logic [1:0]           in_pred,     // {R, W}
  input  logic [1:0]           in_succ,     // {R, W}
  input  logic [3:0]           in_amo_fn,
  input  logic [ID_W-1:0]      in_id,
  input  logic [BLK_W-1:0]     in_blk,
  input  logic [WORDS-1:0]     in_mask,
  input  logic [WORDS*32-1:0]  in_data,
  // L1 request
  output logic                 out_valid,
  input  logic                 out_ready,
  output l1_op_e               out_op,
  output logic [3:0]           out_amo_fn,
  output logic [ID_W:0]        out_id,
  output logic [BLK_W-1:0]     out_blk,
  output logic [WORDS-1:0]     out_mask,
  output logic [WORDS*32-1:0]  out_data,
  // L1 response in, LSU response out
  input  logic                 l1_rsp_valid,
  output logic                 l1_rsp_ready,
  input  l1_op_e               l1_rsp_op,
  input  logic [ID_W:0]        l1_rsp_id,
  input  logic [WORDS-1:0]     l1_rsp_mask,
  input  logic [WORDS*32-1:0]  l1_rsp_data,
  output logic                 rsp_valid,
  input  logic                 rsp_ready,
  output l1_op_e               rsp_op,
  output logic [ID_W-1:0]      rsp_id,
  output logic [WORDS-1:0]     rsp_mask,
  output logic [WORDS*32-1:0]  rsp_data
);
  // FENCE mapping
  function automatic logic fence_map(input logic [1:0] p, input logic [1:0] s,
                                     output l1_op_e op);
    logic rr, rw, wr, ww;
    rr = p[1] & s[1];
    rw = p[1] & s[0];
    wr = p[0] & s[1];
    ww = p[0] & s[0];
    op = OP_WAIT_MSHR;
    if (rr || wr || (rw && ww)) op = OP_INV;
    else if (ww)                op = OP_FLUSH;
    return rr || rw || wr || ww;
  endfunction

  logic                has_pre, has_main, has_post;
  l1_op_e              main_op;
  logic [3:0]          amo_fn;
  logic [ID_W-1:0]     id;
  logic [BLK_W-1:0]    blk;
  logic [WORDS-1:0]    mask;
  logic [WORDS*32-1:0] data;

  assign in_ready = !(has_pre || has_main || has_post);

  always_comb begin
    out_valid  = has_pre || has_main || has_post;
    out_amo_fn = amo_fn;
    out_blk    = blk;
    out_mask   = mask;
    out_data   = data;
    if (has_pre) begin
      out_op = OP_FLUSH;
      out_id = {1'b1, id};
    end else if (has_main) begin
      out_op = main_op;
      out_id = {1'b0, id};
    end else begin
      out_op = OP_INV;
      out_id = {1'b1, id};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      has_pre       <= 1'b0;
      has_main      <= 1'b0;
      has_post      <= 1'b0;
      main_op       <= OP_LOAD;
    end else if (in_valid && in_ready) begin
      if (in_fence) begin
        l1_op_e fop;
        has_pre  <= 1'b0;
        has_post <= 1'b0;
        has_main <= fence_map(in_pred, in_succ, fop);
        main_op  <= fop;
      end else begin
        has_main <= 1'b1;
        main_op  <= in_op;
        has_pre  <= in_rl && (in_op inside {OP_LR, OP_SC, OP_AMO});
        has_post <= in_aq && (in_op inside {OP_LR, OP_SC, OP_AMO});
      end
    end else if (out_valid && out_ready) begin
      if (has_pre)       has_pre  <= 1'b0;
      else if (has_main) has_main <= 1'b0;
      else               has_post <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) begin
      amo_fn <= in_amo_fn;
      id     <= in_id;
      blk    <= in_blk;
      mask   <= in_mask;
      data   <= in_data;
    end
  end

  // responses: drop those of inserted operations
  assign rsp_valid    = l1_rsp_valid && !l1_rsp_id[ID_W];
  assign l1_rsp_ready = l1_rsp_id[ID_W] || rsp_ready;
  assign rsp_op       = l1_rsp_op;
  assign rsp_id       = l1_rsp_id[ID_W-1:0];
  assign rsp_mask     = l1_rsp_mask;
  assign rsp_data     = l1_rsp_data;
endmodule
