// tb_l1d_rcc_top: end-to-end testbench of the whole design at its default
// parameters (128 sets, 2 ways, 32-word lines), with a behavioural L2.
//
// Random LSU instructions: vector loads and stores, LR/SC/AMO with random
// .aq/.rl, and FENCEs with random predecessor/successor sets, on 16 lines
// that fall into 4 sets so refills must replace dirty lines. Every response
// is checked against a sequential reference memory kept in program order;
// a FENCE must be answered by the operation the mapping table gives. After
// a final FENCE W,W the L2 contents must equal the reference. The
// unblocked load-hit latency through the front end is checked, and each
// cache mechanism, plus the flush and invalidate inserted around atomics,
// must have happened at least once.
`timescale 1ns/1ps
module tb_l1d_rcc_top;
  import l1d_pkg::*;

  localparam int unsigned SETS = 128, WORDS = 32, ADDR_W = 32;
  localparam int unsigned BLK_W = ADDR_W - $clog2(WORDS * 4);
  localparam int unsigned SRC_W = 2, ID_W = 8, LINES = 512, NOPS = 2500;
  localparam int unsigned LW = WORDS * 32;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic             creq_v, creq_r, crsp_v, crsp_r;
  l1_op_e           creq_op, crsp_op;
  logic [3:0]       creq_fn;
  logic [ID_W-1:0]  creq_id, crsp_id;
  logic [BLK_W-1:0] creq_blk;
  logic [WORDS-1:0] creq_mask, crsp_mask;
  logic [LW-1:0]    creq_data, crsp_data;
  logic             l2q_v, l2q_r, l2s_v, l2s_r;
  l2_op_e           l2q_op;
  logic [3:0]       l2q_fn;
  logic [SRC_W-1:0] l2q_src, l2s_src;
  logic [BLK_W-1:0] l2q_blk;
  logic [WORDS-1:0] l2q_mask;
  logic [LW-1:0]    l2q_data, l2s_data;
  l2_rsp_e          l2s_op;
  l1_events_t       ev;
  logic             rand_mode = 1'b0;
  logic             l2q_r_m;

  logic             in_fence, in_aq, in_rl;
  logic [1:0]       in_pred, in_succ;

  l1d_rcc_top dut (
    .clk, .rst_n,
    .lsu_valid(creq_v), .lsu_ready(creq_r), .lsu_op(creq_op), .lsu_fence(in_fence),
    .lsu_aq(in_aq), .lsu_rl(in_rl), .lsu_pred(in_pred), .lsu_succ(in_succ),
    .lsu_amo_fn(creq_fn), .lsu_id(creq_id), .lsu_blk(creq_blk), .lsu_mask(creq_mask),
    .lsu_data(creq_data),
    .rsp_valid(crsp_v), .rsp_ready(crsp_r), .rsp_op(crsp_op), .rsp_id(crsp_id),
    .rsp_mask(crsp_mask), .rsp_data(crsp_data),
    .l2_req_valid(l2q_v), .l2_req_ready(l2q_r), .l2_req_op(l2q_op), .l2_req_amo_fn(l2q_fn),
    .l2_req_src(l2q_src), .l2_req_blk(l2q_blk), .l2_req_mask(l2q_mask), .l2_req_data(l2q_data),
    .l2_rsp_valid(l2s_v), .l2_rsp_ready(l2s_r), .l2_rsp_op(l2s_op), .l2_rsp_src(l2s_src),
    .l2_rsp_data(l2s_data), .events(ev));

  // two L2 models: fixed latency for part 1, random for part 2 (only one is wired at a time)
  logic             f_rdy, f_v, r_rdy, r_v;
  l2_rsp_e          f_op, r_op;
  logic [SRC_W-1:0] f_src, r_src;
  logic [LW-1:0]    f_data, r_data;
  l2_model #(.WORDS(WORDS), .BLK_W(BLK_W), .SRC_W(SRC_W), .LINES(LINES), .LAT(6), .RAND(1'b0))
    u_l2f (.clk, .rst_n, .req_valid(l2q_v && !rand_mode), .req_ready(f_rdy), .req_op(l2q_op),
           .req_amo_fn(l2q_fn), .req_src(l2q_src), .req_blk(l2q_blk), .req_mask(l2q_mask),
           .req_data(l2q_data), .rsp_valid(f_v), .rsp_ready(l2s_r && !rand_mode), .rsp_op(f_op),
           .rsp_src(f_src), .rsp_data(f_data));
  l2_model #(.WORDS(WORDS), .BLK_W(BLK_W), .SRC_W(SRC_W), .LINES(LINES), .LAT(12), .RAND(1'b1))
    u_l2r (.clk, .rst_n, .req_valid(l2q_v && rand_mode && !l2_block), .req_ready(r_rdy), .req_op(l2q_op),
           .req_amo_fn(l2q_fn), .req_src(l2q_src), .req_blk(l2q_blk), .req_mask(l2q_mask),
           .req_data(l2q_data), .rsp_valid(r_v), .rsp_ready(l2s_r && rand_mode), .rsp_op(r_op),
           .rsp_src(r_src), .rsp_data(r_data));
  assign l2q_r_m  = rand_mode ? r_rdy : f_rdy;
  logic l2_block = 1'b0;  // stretches of L2 back-pressure in part 2
  assign l2q_r    = l2q_r_m && !l2_block;
  assign l2s_v    = rand_mode ? r_v : f_v;
  assign l2s_op   = rand_mode ? r_op : f_op;
  assign l2s_src  = rand_mode ? r_src : f_src;
  assign l2s_data = rand_mode ? r_data : f_data;

  int checks = 0, failures = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL @%0d: %s", cyc, what);
    end
  endtask

  // handshake times
  longint t_creq, t_crsp, t_l2q, t_l2s;
  always @(posedge clk) begin
    if (creq_v && creq_r) t_creq <= cyc;
    if (crsp_v && crsp_r) t_crsp <= cyc;
    if (l2q_v && l2q_r)   t_l2q  <= cyc;
    if (l2s_v && l2s_r && l2s_op != L2R_ACK) t_l2s <= cyc;
  end

  // reference model
  logic [LW-1:0]    gold [LINES];
  logic             resv_v = 1'b0;
  logic [BLK_W-1:0] resv_blk;
  logic [LW-1:0]    exp_data [256];
  l1_op_e           exp_op   [256];
  logic [WORDS-1:0] exp_mask [256];
  bit               pend     [256];
  int               outstanding = 0;

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

  // apply an accepted request to the reference in program order
  task automatic model(input l1_op_e op, input logic [3:0] fn, input logic [ID_W-1:0] id,
                       input logic [BLK_W-1:0] blk, input logic [WORDS-1:0] m,
                       input logic [LW-1:0] d);
    int b;
    b = int'(blk);
    exp_op[id]   = op;
    exp_mask[id] = m;
    exp_data[id] = '0;
    pend[id]     = 1'b1;
    case (op)
      OP_LOAD: exp_data[id] = gold[b];
      OP_STORE:
        for (int w = 0; w < WORDS; w++) if (m[w]) gold[b][w*32 +: 32] = d[w*32 +: 32];
      OP_LR: begin
        exp_data[id] = gold[b]; resv_v = 1'b1; resv_blk = blk;
      end
      OP_SC: begin
        for (int w = 0; w < WORDS; w++) begin
          exp_data[id][w*32 +: 32] = (resv_v && resv_blk == blk) ? 32'd0 : 32'd1;
          if (m[w] && resv_v && resv_blk == blk) gold[b][w*32 +: 32] = d[w*32 +: 32];
        end
        resv_v = 1'b0;
      end
      OP_AMO: begin
        exp_data[id] = gold[b];
        for (int w = 0; w < WORDS; w++)
          if (m[w]) gold[b][w*32 +: 32] = amo(fn, gold[b][w*32 +: 32], d[w*32 +: 32]);
      end
      default: ;
    endcase
  endtask

  // optional trace (+trace)
  always @(posedge clk) if (rst_n && $test$plusargs("trace")) begin
    if (creq_v && creq_r) $display("%0d REQ id=%0d op=%s blk=%0d m=%b d=%h", cyc, creq_id, creq_op.name(), creq_blk, creq_mask, creq_data);
    if (crsp_v && crsp_r) $display("%0d RSP id=%0d op=%s d=%h", cyc, crsp_id, crsp_op.name(), crsp_data);
    if (l2q_v && l2q_r) $display("%0d L2Q op=%s src=%0d blk=%0d m=%b d=%h", cyc, l2q_op.name(), l2q_src, l2q_blk, l2q_mask, l2q_data);
    if (l2s_v && l2s_r) $display("%0d L2S op=%s src=%0d d=%h", cyc, l2s_op.name(), l2s_src, l2s_data);
  end

  // response checker
  always @(posedge clk) begin
    if (rst_n && crsp_v && crsp_r) begin
      check(pend[crsp_id], $sformatf("response for id %0d not outstanding", crsp_id));
      check(crsp_op == exp_op[crsp_id], $sformatf("id %0d op %0d exp %0d", crsp_id, crsp_op,
                                                  exp_op[crsp_id]));
      if (exp_op[crsp_id] inside {OP_LOAD, OP_LR, OP_SC, OP_AMO}) begin
        for (int w = 0; w < WORDS; w++)
          if (exp_mask[crsp_id][w])
            check(crsp_data[w*32 +: 32] == exp_data[crsp_id][w*32 +: 32],
                  $sformatf("id %0d word %0d data %h exp %h", crsp_id, w,
                            crsp_data[w*32 +: 32], exp_data[crsp_id][w*32 +: 32]));
      end
      pend[crsp_id] = 1'b0;
      outstanding--;
    end
  end

  // event counters
  int n_inserted = 0;  // flush/invalidate added around atomics
  always @(posedge clk) if (dut.q_valid && dut.q_ready && dut.q_id[ID_W]) n_inserted++;
  int n_ev [22];
  // names of the l1_events_t bits, bit 0 first
  string ev_name [22] = '{"l2_q_full", "lsu_q_full", "bypass", "wait_done", "inv_done", "flush_done", "multi_sub", "replace_wb", "dirty_wb", "wshr_wait", "mshr_wait", "lr_sc_wait", "mshr_full", "wshr_full", "wshr_protect", "atomic", "write_merge", "write_around", "write_hit", "read_merge", "read_miss", "read_hit"};
  always @(posedge clk) if (rst_n) begin
    logic [21:0] e;
    e = ev;
    for (int i = 0; i < 22; i++) if (e[i]) n_ev[i]++;
  end

  int next_id = 0;
  // reference FENCE mapping (pred/succ = {R, W})
  function automatic l1_op_e fmap(input logic [1:0] p, input logic [1:0] q);
    bit rr, rw, wr, ww;
    rr = p[1] && q[1]; rw = p[1] && q[0]; wr = p[0] && q[1]; ww = p[0] && q[0];
    if (rr || wr) return OP_INV;
    if (rw && ww) return OP_INV;
    if (ww)       return OP_FLUSH;
    return OP_WAIT_MSHR;
  endfunction

  // inputs change at the falling edge; ready is sampled there, so a request
  // whose ready is high at the falling edge is accepted at the next rising edge
  task automatic issue_x(input l1_op_e op, input logic [BLK_W-1:0] blk,
                         input logic [WORDS-1:0] m, input logic [LW-1:0] d, input logic [3:0] fn,
                         input bit fence, input bit aq, input bit rl, input logic [1:0] p,
                         input logic [1:0] q);
    @(negedge clk);
    while (pend[next_id[7:0]]) @(negedge clk);
    creq_v    = 1'b1;
    creq_op   = op;
    creq_blk  = blk;
    creq_mask = m;
    creq_data = d;
    creq_fn   = fn;
    creq_id   = next_id[7:0];
    in_fence  = fence;
    in_aq     = aq;
    in_rl     = rl;
    in_pred   = p;
    in_succ   = q;
    #1;
    while (!creq_r) begin
      @(negedge clk);
      #1;
    end
    @(posedge clk);
    model(fence ? fmap(p, q) : op, fn, next_id[7:0], blk, m, d);
    outstanding++;
    next_id = (next_id + 1) % 256;
    @(negedge clk);
    creq_v = 1'b0;
  endtask

  task automatic issue(input l1_op_e op, input logic [BLK_W-1:0] blk, input logic [WORDS-1:0] m,
                       input logic [LW-1:0] d, input logic [3:0] fn);
    issue_x(op, blk, m, d, fn, 1'b0, 1'b0, 1'b0, 2'b00, 2'b00);
  endtask

  task automatic fence(input logic [1:0] p, input logic [1:0] q);
    issue_x(OP_LOAD, 0, '0, '0, 0, 1'b1, 1'b0, 1'b0, p, q);
  endtask

  task automatic wait_idle();
    while (outstanding != 0) @(posedge clk);
    repeat (3) @(posedge clk);
  endtask

  function automatic logic [LW-1:0] rline();
    logic [LW-1:0] r;
    for (int w = 0; w < WORDS; w++) r[w*32 +: 32] = $urandom_range(0, 255);
    return r;
  endfunction

  // watchdog
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [BLK_W-1:0] blk, prev;
    int r;
    for (int i = 0; i < LINES; i++) gold[i] = '0;
    for (int i = 0; i < 256; i++) pend[i] = 1'b0;
    for (int i = 0; i < 22; i++) n_ev[i] = 0;
    creq_v = 1'b0; creq_op = OP_LOAD; creq_blk = '0; creq_mask = '0; creq_data = '0;
    creq_fn = '0; creq_id = '0; crsp_r = 1'b1;
    in_fence = 1'b0; in_aq = 1'b0; in_rl = 1'b0; in_pred = '0; in_succ = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (3) @(posedge clk);

    // ---- part 1: latency through the front end (one cycle) and the cache (four)
    issue(OP_LOAD, 1, '1, '0, 0);                // read miss
    wait_idle();
    check(t_l2q - t_creq == 5, $sformatf("read miss instr->L2 req %0d", t_l2q - t_creq));
    check(t_crsp - t_l2s == 4, $sformatf("refill L2 rsp->LSU rsp %0d", t_crsp - t_l2s));
    issue(OP_LOAD, 1, 32'h0000_ff00, '0, 0);     // read hit
    wait_idle();
    check(t_crsp - t_creq == 5, $sformatf("read hit instr->rsp %0d", t_crsp - t_creq));
    fence(2'b01, 2'b01);                          // FENCE W,W: clean flush
    wait_idle();
    check(t_crsp - t_creq == 5, $sformatf("FENCE W,W instr->rsp %0d", t_crsp - t_creq));
    issue_x(OP_AMO, 1, '1, '1, AMO_ADD, 1'b0, 1'b1, 1'b1, 2'b00, 2'b00);  // amoadd.aqrl
    wait_idle();
    fence(2'b11, 2'b11);
    wait_idle();
    for (int i = 0; i < LINES; i++)
      check(u_l2f.mem[i] == gold[i], $sformatf("part 1 L2 line %0d", i));

    // ---- part 2: random traffic on 16 lines in 4 sets
    for (int i = 0; i < LINES; i++) u_l2r.mem[i] = gold[i];
    rand_mode = 1'b1;
    prev = 0;
    fork
      forever begin
        @(negedge clk);
        crsp_r = ($urandom_range(0, 3) != 0);
        if ($urandom_range(0, 99) == 0) l2_block = 1'b1;
        else if ($urandom_range(0, 19) == 0) l2_block = 1'b0;
      end
    join_none
    for (int n = 0; n < NOPS; n++) begin
      blk = ($urandom_range(0, 1) != 0) ? prev
          : BLK_W'($urandom_range(0, 3) + 128 * $urandom_range(0, 3));
      prev = blk;
      r = $urandom_range(0, 99);
      if (r < 42)      issue(OP_LOAD,  blk, WORDS'($urandom) | 1, '0, 0);
      else if (r < 80) issue(OP_STORE, blk, WORDS'($urandom) | 1, rline(), 0);
      else if (r < 86) issue_x(OP_AMO, blk, WORDS'($urandom) | 1, rline(),
                               4'($urandom_range(0, 8)), 1'b0, 1'($urandom), 1'($urandom),
                               2'b00, 2'b00);
      else if (r < 89) issue_x(OP_LR, blk, '1, '0, 0, 1'b0, 1'($urandom), 1'b0, 2'b00, 2'b00);
      else if (r < 92) issue_x(OP_SC, blk, WORDS'($urandom) | 1, rline(), 0, 1'b0, 1'b0,
                               1'($urandom), 2'b00, 2'b00);
      else if (r < 98) fence(2'($urandom_range(1, 3)), 2'($urandom_range(1, 3)));
      else begin
        for (int k = 0; k < 3; k++) issue(OP_LOAD, blk, WORDS'($urandom) | 1, '0, 0);
      end
    end
    fence(2'b01, 2'b01);
    wait_idle();
    for (int i = 0; i < LINES; i++)
      check(u_l2r.mem[i] == gold[i], $sformatf("final L2 line %0d", i));
    check(n_inserted > 0, "no operation was inserted around an atomic");
    $display("inserted acquire/release operations %0d", n_inserted);
    // every mechanism must have happened
    for (int i = 0; i < 22; i++) begin
      $display("event %-13s %0d", ev_name[i], n_ev[i]);
      check(n_ev[i] > 0, $sformatf("event %s never happened", ev_name[i]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
