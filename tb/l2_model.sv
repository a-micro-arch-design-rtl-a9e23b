// l2_model: behavioural model of the L2 cache seen by one L1 data cache,
// for testbenches only.
//
// It holds LINES cache lines (block addresses 0..LINES-1). A request is
// performed on the memory in the cycle it is accepted, and its response is
// returned in request order after a latency of LAT cycles, or a random
// 1..LAT cycles when RAND is set (RAND also makes req_ready random).
// GET returns the line, PUT writes the masked words and returns an ack,
// Write acks may overtake data responses (the oldest due ack is offered
// first), so an ack is never stuck behind a response the L1 is not accepting.
// LR returns the line and reserves it, SC writes the masked words only if
// the reservation names the same line (per-word result 0 = success,
// 1 = failure) and clears it, AMO returns the old line and applies the
// function to the masked words.
module l2_model
  import l1d_pkg::*;
#(
  parameter int unsigned WORDS = 4,
  parameter int unsigned BLK_W = 28,
  parameter int unsigned SRC_W = 2,
  parameter int unsigned LINES = 16,
  parameter int unsigned LAT   = 4,
  parameter bit          RAND  = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                req_valid,
  output logic                req_ready,
  input  l2_op_e              req_op,
  input  logic [3:0]          req_amo_fn,
  input  logic [SRC_W-1:0]    req_src,
  input  logic [BLK_W-1:0]    req_blk,
  input  logic [WORDS-1:0]    req_mask,
  input  logic [WORDS*32-1:0] req_data,
  output logic                rsp_valid,
  input  logic                rsp_ready,
  output l2_rsp_e             rsp_op,
  output logic [SRC_W-1:0]    rsp_src,
  output logic [WORDS*32-1:0] rsp_data
);
  typedef struct {
    l2_rsp_e             op;
    logic [SRC_W-1:0]    src;
    logic [WORDS*32-1:0] data;
    longint              due;
  } rsp_t;

  logic [WORDS*32-1:0] mem [LINES];
  rsp_t                q [$];
  longint              cyc;
  logic                resv_v;
  logic [BLK_W-1:0]    resv_blk;
  logic                rdy_r;

  function automatic logic [31:0] amo(input logic [3:0] fn, input logic [31:0] a,
                                      input logic [31:0] b);
    case (amo_fn_e'(fn))
      AMO_ADD:  return a + b;
      AMO_SWAP: return b;
      AMO_AND:  return a & b;
      AMO_OR:   return a | b;
      AMO_XOR:  return a ^ b;
      AMO_MIN:  return ($signed(a) < $signed(b)) ? a : b;
      AMO_MAX:  return ($signed(a) > $signed(b)) ? a : b;
      AMO_MINU: return (a < b) ? a : b;
      AMO_MAXU: return (a > b) ? a : b;
      default:  return a;
    endcase
  endfunction

  initial for (int i = 0; i < LINES; i++) mem[i] = '0;

  // The oldest due write ack is offered first, otherwise the oldest response:
  // acks never wait behind a data response the L1 is not taking.
  int sel;
  always_comb begin
    sel = 0;
    for (int i = q.size() - 1; i >= 0; i--)
      if (q[i].op == L2R_ACK && q[i].due <= cyc) sel = i;
  end
  assign req_ready = rdy_r;
  assign rsp_valid = q.size() > 0 && q[sel].due <= cyc;
  assign rsp_op    = (q.size() > 0) ? q[sel].op : L2R_DATA;
  assign rsp_src   = (q.size() > 0) ? q[sel].src : '0;
  assign rsp_data  = (q.size() > 0) ? q[sel].data : '0;

  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc    <= 0;
      resv_v <= 1'b0;
      rdy_r  <= 1'b0;
      q.delete();
    end else begin
      rsp_t r;
      int   lat;
      cyc   <= cyc + 1;
      rdy_r <= RAND ? ($urandom_range(0, 3) != 0) : 1'b1;
      if (rsp_valid && rsp_ready) q.delete(sel);
      if (req_valid && req_ready) begin
        int unsigned b;
        b       = int'(req_blk) % LINES;
        lat     = RAND ? int'($urandom_range(1, LAT)) : int'(LAT);
        r.src   = req_src;
        r.due   = cyc + lat;
        r.data  = '0;
        case (req_op)
          L2_GET: begin
            r.op = L2R_DATA; r.data = mem[b];
          end
          L2_PUT: begin
            r.op = L2R_ACK;
            for (int w = 0; w < WORDS; w++)
              if (req_mask[w]) mem[b][w*32 +: 32] = req_data[w*32 +: 32];
          end
          L2_LR: begin
            r.op = L2R_ATOM; r.data = mem[b]; resv_v <= 1'b1; resv_blk <= req_blk;
          end
          L2_SC: begin
            r.op = L2R_ATOM;
            for (int w = 0; w < WORDS; w++) begin
              r.data[w*32 +: 32] = (resv_v && resv_blk == req_blk) ? 32'd0 : 32'd1;
              if (req_mask[w] && resv_v && resv_blk == req_blk)
                mem[b][w*32 +: 32] = req_data[w*32 +: 32];
            end
            resv_v <= 1'b0;
          end
          default: begin
            r.op = L2R_ATOM; r.data = mem[b];
            for (int w = 0; w < WORDS; w++)
              if (req_mask[w]) mem[b][w*32 +: 32] = amo(req_amo_fn, mem[b][w*32 +: 32],
                                                         req_data[w*32 +: 32]);
          end
        endcase
        q.push_back(r);
      end
    end
  end
endmodule
