// tb_rvwmo_seq: checks the RVWMO-to-cache-operation mapping. Every
// instruction kind, every .aq/.rl combination of the atomics and all nine
// non-empty FENCE predecessor/successor combinations are sent; the L1
// requests that come out (operation, inserted-flag, order) are compared with
// a table written from the mapping rules, with random L1 back-pressure. The
// first request must leave one edge after the instruction is accepted when
// the L1 is ready. Responses of inserted operations must be dropped and the
// others passed on.
`timescale 1ns/1ps
module tb_rvwmo_seq;
  import l1d_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_fence, in_aq, in_rl, out_valid, out_ready;
  logic l1_rsp_valid, l1_rsp_ready, rsp_valid, rsp_ready;
  l1_op_e in_op, out_op, l1_rsp_op, rsp_op;
  logic [1:0] in_pred, in_succ;
  logic [3:0] in_amo_fn, out_amo_fn, in_mask, out_mask, l1_rsp_mask, rsp_mask;
  logic [7:0] in_id, rsp_id;
  logic [8:0] out_id, l1_rsp_id;
  logic [5:0] in_blk, out_blk;
  logic [127:0] in_data, out_data, l1_rsp_data, rsp_data;

  rvwmo_seq #(.WORDS(4), .BLK_W(6), .ID_W(8)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collected L1 requests
  l1_op_e got_op [$];
  bit     got_ins [$];
  longint cyc = 0, t_acc, t_first;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (in_valid && in_ready) t_acc <= cyc;
    if (rst_n && out_valid && out_ready) begin
      if (got_op.size() == 0) t_first <= cyc;
      got_op.push_back(out_op);
      got_ins.push_back(out_id[8]);
      if (out_id[7:0] != 8'h5a || out_blk != 6'h21) begin
        failures++; checks++; $display("FAIL: payload not carried");
      end
    end
  end

  task automatic run(input l1_op_e op, input bit fence, input bit aq, input bit rl,
                     input logic [1:0] p, input logic [1:0] s, input l1_op_e e_op [$],
                     input bit e_ins [$], input bit always_ready);
    got_op.delete(); got_ins.delete();
    @(negedge clk);
    in_valid = 1; in_op = op; in_fence = fence; in_aq = aq; in_rl = rl; in_pred = p; in_succ = s;
    in_id = 8'h5a; in_blk = 6'h21;
    out_ready = always_ready ? 1'b1 : 1'($urandom);
    #1;
    while (!in_ready) begin @(negedge clk); #1; end
    @(negedge clk);
    in_valid = 0;
    repeat (12) begin
      out_ready = always_ready ? 1'b1 : 1'($urandom);
      @(negedge clk);
    end
    out_ready = 1;
    repeat (4) @(negedge clk);
    check(got_op.size() == e_op.size(), $sformatf("op %s fence %0d p%b s%b aq%0d rl%0d: %0d requests, exp %0d",
          op.name(), fence, p, s, aq, rl, got_op.size(), e_op.size()));
    for (int i = 0; i < e_op.size() && i < got_op.size(); i++)
      check(got_op[i] == e_op[i] && got_ins[i] == e_ins[i],
            $sformatf("request %0d: %s/%0d exp %s/%0d", i, got_op[i].name(), got_ins[i],
                      e_op[i].name(), e_ins[i]));
    if (always_ready && e_op.size() > 0) check(t_first - t_acc == 1, "first request one edge later");
  endtask

  initial begin
    l1_op_e eo [$];
    bit     ei [$];
    in_valid = 0; in_op = OP_LOAD; in_fence = 0; in_aq = 0; in_rl = 0; in_pred = 0; in_succ = 0;
    in_amo_fn = 0; in_id = 0; in_blk = 0; in_mask = 0; in_data = 0; out_ready = 1;
    l1_rsp_valid = 0; l1_rsp_op = OP_LOAD; l1_rsp_id = 0; l1_rsp_mask = 0; l1_rsp_data = 0;
    rsp_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int rdy = 1; rdy >= 0; rdy--) begin
      run(OP_LOAD,  0, 0, 0, 0, 0, '{OP_LOAD},  '{0}, rdy);
      run(OP_STORE, 0, 0, 0, 0, 0, '{OP_STORE}, '{0}, rdy);
      for (int a = 0; a < 3; a++) begin
        l1_op_e aop;
        aop = (a == 0) ? OP_LR : (a == 1) ? OP_SC : OP_AMO;
        for (int q = 0; q < 4; q++) begin
          eo.delete(); ei.delete();
          if (q[0]) begin eo.push_back(OP_FLUSH); ei.push_back(1); end     // .rl
          eo.push_back(aop); ei.push_back(0);
          if (q[1]) begin eo.push_back(OP_INV); ei.push_back(1); end       // .aq
          run(aop, 0, q[1], q[0], 0, 0, eo, ei, rdy);
        end
      end
      // FENCE pred/succ = {R, W}
      for (int p = 0; p < 4; p++)
        for (int s = 0; s < 4; s++) begin
          bit rr, rw, wr, ww;
          rr = p[1] && s[1]; rw = p[1] && s[0]; wr = p[0] && s[1]; ww = p[0] && s[0];
          eo.delete(); ei.delete();
          if (rr || wr || (rw && ww)) begin eo.push_back(OP_INV); ei.push_back(0); end
          else if (ww) begin eo.push_back(OP_FLUSH); ei.push_back(0); end
          else if (rw) begin eo.push_back(OP_WAIT_MSHR); ei.push_back(0); end
          run(OP_LOAD, 1, 0, 0, 2'(p), 2'(s), eo, ei, rdy);
        end
    end
    // response filtering
    @(negedge clk);
    l1_rsp_valid = 1; l1_rsp_id = 9'h1_33; rsp_ready = 0;
    #1;
    check(!rsp_valid && l1_rsp_ready, "inserted response dropped");
    l1_rsp_id = 9'h0_33; l1_rsp_data = 128'h1234; l1_rsp_op = OP_AMO;
    #1;
    check(rsp_valid && !l1_rsp_ready && rsp_id == 8'h33 && rsp_data == 128'h1234 &&
          rsp_op == OP_AMO, "response passed on with back-pressure");
    rsp_ready = 1;
    #1;
    check(l1_rsp_ready, "ready follows LSU ready");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
