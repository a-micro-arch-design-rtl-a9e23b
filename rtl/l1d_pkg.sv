// l1d_pkg: opcodes, response kinds and event flags shared by the GPGPU L1
// data cache and its RVWMO front end.
//
// The cache serves vector requests: one request names one cache line (its
// block address) and a per-word mask, so all active lanes of a coalesced
// warp access are served together. The operation set follows the design:
// regular loads and stores, LR/SC/AMO that are forwarded to L2, and the three
// consistency operations (wait for the MSHR to drain, global flush, global
// invalidate). The encodings themselves are this design's choice.
package l1d_pkg;

  // Operations the LSU can send to the L1 cache.
  typedef enum logic [2:0] {
    OP_LOAD      = 3'd0,
    OP_STORE     = 3'd1,
    OP_LR        = 3'd2,
    OP_SC        = 3'd3,
    OP_AMO       = 3'd4,
    OP_FLUSH     = 3'd5,  // write every dirty line to L2, then wait for all write acks
    OP_INV       = 3'd6,  // drain MSHR, flush, then clear every valid bit
    OP_WAIT_MSHR = 3'd7   // wait until no read miss or atomic is in flight
  } l1_op_e;

  // AMO functions (RISC-V funct5 meaning, compressed to 4 bits).
  typedef enum logic [3:0] {
    AMO_ADD  = 4'd0, AMO_SWAP = 4'd1, AMO_AND  = 4'd2, AMO_OR   = 4'd3,
    AMO_XOR  = 4'd4, AMO_MIN  = 4'd5, AMO_MAX  = 4'd6, AMO_MINU = 4'd7,
    AMO_MAXU = 4'd8
  } amo_fn_e;

  // Requests from L1 to L2.
  typedef enum logic [2:0] {
    L2_GET = 3'd0,  // read a whole line
    L2_PUT = 3'd1,  // write the masked words of a line
    L2_LR  = 3'd2,
    L2_SC  = 3'd3,
    L2_AMO = 3'd4
  } l2_op_e;

  // Responses from L2 to L1.
  typedef enum logic [1:0] {
    L2R_DATA = 2'd0,  // line data for a GET, source = vector MSHR entry
    L2R_ACK  = 2'd1,  // write done for a PUT, source = WSHR entry
    L2R_ATOM = 2'd2   // result of LR/SC/AMO, source = special MSHR entry
  } l2_rsp_e;

  // One pulse per cycle for each mechanism of the cache, for counters.
  typedef struct packed {
    logic read_hit;
    logic read_miss;        // new vector MSHR entry
    logic read_merge;       // read added as subentry to an in-flight miss
    logic write_hit;        // write-back: line updated and marked dirty
    logic write_around;     // write miss sent to L2 without allocation
    logic write_merge;      // write miss merged into an in-flight read miss
    logic atomic;           // LR/SC/AMO forwarded to L2
    logic wshr_protect;     // stall: same line has a write in flight (d)
    logic wshr_full;        // stall: WSHR full (c)
    logic mshr_full;        // stall: MSHR or its subentries full (f)
    logic lr_sc_wait;       // stall: SC waits for in-flight LR (g)
    logic mshr_wait;        // stall: consistency op waits for MSHR drain (e)
    logic wshr_wait;        // stall: flush/invalidate waits for WSHR drain
    logic dirty_wb;         // dirty line written back by flush/invalidate/atomic (h)
    logic replace_wb;       // dirty victim written back on refill (j)
    logic multi_sub;        // refill answered more than one read subentry (i)
    logic flush_done;
    logic inv_done;
    logic wait_done;
    logic bypass;           // data array read got a same-cycle write forwarded
    logic lsu_q_full;       // stall: LSU response queue full (a)
    logic l2_q_full;        // stall: L2 request queue full (b)
  } l1_events_t;

endpackage
