// tb_mp_litmus: the message-passing example run on two cores, each with its
// own L1 (l1d_rcc_top at default parameters), sharing one behavioural L2.
//
// Each round writes a new value v (v = round + 1):
// Core 0 (producer): A = v; B = v; then publishes Flag = v.
// Core 1 (consumer): loads A and B first, so the old value v-1 sits in its
// L1; then polls Flag until it reads v, and loads A and B.
// Twelve rounds cycle through three ways of synchronising:
//   mode 0: producer amoswap.rl Flag, consumer polls with amoor.aq Flag, 0.
//           The release (global flush before the AMO) puts A and B in L2
//           before the flag; the acquire (global invalidate after the AMO)
//           drops the stale copies, so the consumer must read A = B = v,
//           the only result sequential consistency allows.
//   mode 1: producer FENCE W,W then a plain store to Flag (write-around);
//           consumer FENCE R,R before each plain flag load (so the flag is
//           read from L2) and once more after seeing it. Same expectation.
//   mode 2: control. The consumer polls with amoor without .aq, so its L1
//           keeps the stale A and B: the loads after the flag must return
//           v-1, and v only after a FENCE R,R. This shows that the fresh
//           values of modes 0 and 1 come from the acquire, not from luck.
// The two L1s' L2 requests are merged by a round-robin arbiter and responses
// are routed back by a client bit added to the source id; the L2 answers
// after a random latency.
// The program and the release/acquire mapping follow the design; the
// arbiter, the L2 latency and the round structure are this bench's own.
`timescale 1ns/1ps
module tb_mp_litmus;
  import l1d_pkg::*;
  localparam int unsigned WORDS = 32, BLK_W = 25, SRC_W = 2, ID_W = 8, LW = WORDS * 32;
  localparam logic [BLK_W-1:0] A_BLK = 25'd5, B_BLK = 25'd133, F_BLK = 25'd70;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // per-core LSU ports
  logic             v [2], r [2], fence [2], aq [2], rl [2], rv [2], rr [2];
  l1_op_e           op [2], rop [2];
  logic [1:0]       pred [2], succ [2];
  logic [3:0]       fn [2];
  logic [ID_W-1:0]  id [2], rid [2];
  logic [BLK_W-1:0] blk [2];
  logic [WORDS-1:0] mask [2], rmask [2];
  logic [LW-1:0]    data [2], rdata [2];
  // per-core L2 ports
  logic             qv [2], qr [2], sv [2], sr [2];
  l2_op_e           qop [2];
  logic [3:0]       qfn [2];
  logic [SRC_W-1:0] qsrc [2];
  logic [BLK_W-1:0] qblk [2];
  logic [WORDS-1:0] qmask [2];
  logic [LW-1:0]    qdata [2];
  l1_events_t       ev [2];

  for (genvar c = 0; c < 2; c++) begin : g_core
    l1d_rcc_top u_sm (
      .clk, .rst_n,
      .lsu_valid(v[c]), .lsu_ready(r[c]), .lsu_op(op[c]), .lsu_fence(fence[c]), .lsu_aq(aq[c]),
      .lsu_rl(rl[c]), .lsu_pred(pred[c]), .lsu_succ(succ[c]), .lsu_amo_fn(fn[c]),
      .lsu_id(id[c]), .lsu_blk(blk[c]), .lsu_mask(mask[c]), .lsu_data(data[c]),
      .rsp_valid(rv[c]), .rsp_ready(rr[c]), .rsp_op(rop[c]), .rsp_id(rid[c]),
      .rsp_mask(rmask[c]), .rsp_data(rdata[c]),
      .l2_req_valid(qv[c]), .l2_req_ready(qr[c]), .l2_req_op(qop[c]), .l2_req_amo_fn(qfn[c]),
      .l2_req_src(qsrc[c]), .l2_req_blk(qblk[c]), .l2_req_mask(qmask[c]),
      .l2_req_data(qdata[c]),
      .l2_rsp_valid(sv[c]), .l2_rsp_ready(sr[c]), .l2_rsp_op(l2s_op), .l2_rsp_src(l2s_src[SRC_W-1:0]),
      .l2_rsp_data(l2s_data), .events(ev[c]));
  end

  // round-robin request arbiter and response router
  logic             last, gnt, m_rdy, m_sv;
  l2_rsp_e          l2s_op;
  logic [SRC_W:0]   l2s_src;
  logic [LW-1:0]    l2s_data;
  always_comb begin
    gnt = last ? !qv[0] : qv[1];
    qr[0] = m_rdy && !gnt;
    qr[1] = m_rdy && gnt;
    sv[0] = m_sv && !l2s_src[SRC_W];
    sv[1] = m_sv && l2s_src[SRC_W];
  end
  always @(posedge clk) if (qv[gnt] && qr[gnt]) last <= gnt;

  l2_model #(.WORDS(WORDS), .BLK_W(BLK_W), .SRC_W(SRC_W + 1), .LINES(256), .LAT(12), .RAND(1'b1))
    u_l2 (.clk, .rst_n, .req_valid(qv[gnt]), .req_ready(m_rdy), .req_op(qop[gnt]),
          .req_amo_fn(qfn[gnt]), .req_src({gnt, qsrc[gnt]}), .req_blk(qblk[gnt]),
          .req_mask(qmask[gnt]), .req_data(qdata[gnt]), .rsp_valid(m_sv),
          .rsp_ready(l2s_src[SRC_W] ? sr[1] : sr[0]), .rsp_op(l2s_op), .rsp_src(l2s_src),
          .rsp_data(l2s_data));

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // one instruction, wait for its response (or none for an empty fence)
  int nid [2] = '{0, 0};
  task automatic exec(input int c, input l1_op_e o, input logic [BLK_W-1:0] b,
                      input logic [31:0] d, input logic [3:0] f, input bit fen,
                      input logic [1:0] p, input logic [1:0] s, input bit a, input bit rls,
                      output logic [31:0] word0);
    @(negedge clk);
    v[c] = 1; op[c] = o; blk[c] = b; data[c] = {WORDS{d}}; fn[c] = f; fence[c] = fen;
    pred[c] = p; succ[c] = s; aq[c] = a; rl[c] = rls; mask[c] = 1; id[c] = 8'(nid[c]);
    #1;
    while (!r[c]) begin @(negedge clk); #1; end
    @(negedge clk);
    v[c] = 0;
    while (!(rv[c] && rid[c] == 8'(nid[c]))) begin @(negedge clk); #1; end
    word0 = rdata[c][31:0];
    nid[c]++;
  endtask

  logic [31:0] w, wa, wb;
  int polls;
  initial begin
    for (int c = 0; c < 2; c++) begin
      v[c] = 0; op[c] = OP_LOAD; fence[c] = 0; aq[c] = 0; rl[c] = 0; pred[c] = 0; succ[c] = 0;
      fn[c] = 0; id[c] = 0; blk[c] = 0; mask[c] = 0; data[c] = 0; rr[c] = 1;
    end
    last = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 12; round++) begin
      logic [31:0] val;
      int mode;
      val = 32'(round + 1);
      mode = round % 3;
      // consumer caches the old values of A and B
      exec(1, OP_LOAD, A_BLK, 0, 0, 0, 0, 0, 0, 0, wa);
      exec(1, OP_LOAD, B_BLK, 0, 0, 0, 0, 0, 0, 0, wb);
      check(wa == val - 1 && wb == val - 1, $sformatf("round %0d: initial A/B %0d/%0d", round, wa, wb));
      fork
        begin // producer
          exec(0, OP_STORE, A_BLK, val, 0, 0, 0, 0, 0, 0, w);
          exec(0, OP_LOAD, A_BLK, 0, 0, 0, 0, 0, 0, 0, w);   // refill: A now dirty in L1
          exec(0, OP_STORE, A_BLK, val, 0, 0, 0, 0, 0, 0, w);
          exec(0, OP_STORE, B_BLK, val, 0, 0, 0, 0, 0, 0, w);
          if (mode != 1)
            exec(0, OP_AMO, F_BLK, val, AMO_SWAP, 0, 0, 0, 0, 1, w);     // amoswap.rl
          else begin
            exec(0, OP_LOAD, 0, 0, 0, 1, 2'b01, 2'b01, 0, 0, w);         // FENCE W,W
            exec(0, OP_STORE, F_BLK, val, 0, 0, 0, 0, 0, 0, w);          // write-around
          end
        end
        begin // consumer
          polls = 0;
          do begin
            if (mode != 1)
              exec(1, OP_AMO, F_BLK, 0, AMO_OR, 0, 0, 0, mode == 0, 0, w); // amoor(.aq)
            else begin
              exec(1, OP_LOAD, 0, 0, 0, 1, 2'b10, 2'b10, 0, 0, wa);      // FENCE R,R
              exec(1, OP_LOAD, F_BLK, 0, 0, 0, 0, 0, 0, 0, w);
              if (w == val) exec(1, OP_LOAD, 0, 0, 0, 1, 2'b10, 2'b10, 0, 0, wa);
            end
            polls++;
          end while (w != val);
          if (mode == 2) begin
            // no acquire yet: the L1 still holds the old copies
            exec(1, OP_LOAD, A_BLK, 0, 0, 0, 0, 0, 0, 0, wa);
            exec(1, OP_LOAD, B_BLK, 0, 0, 0, 0, 0, 0, 0, wb);
            check(wa == val - 1 && wb == val - 1,
                  $sformatf("round %0d: stale copies expected without acquire, A=%0d B=%0d", round, wa, wb));
            exec(1, OP_LOAD, 0, 0, 0, 1, 2'b10, 2'b10, 0, 0, w);          // FENCE R,R
          end
          exec(1, OP_LOAD, A_BLK, 0, 0, 0, 0, 0, 0, 0, wa);
          exec(1, OP_LOAD, B_BLK, 0, 0, 0, 0, 0, 0, 0, wb);
          check(wa == val && wb == val,
                $sformatf("round %0d: consumer saw A=%0d B=%0d after Flag (polls %0d)",
                          round, wa, wb, polls));
          $display("round %0d: flag seen after %0d polls, A=%0d B=%0d", round, polls, wa, wb);
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
