// tb_l1d_tag_array: random update commands against a reference model of
// tags, valid and dirty bits and round-robin pointers; checks request
// lookups, the victim choice (first invalid way, else round robin), the
// lowest-dirty-line scan and the one-cycle global invalidate.
`timescale 1ns/1ps
module tb_l1d_tag_array;
  localparam int SETS = 4, WAYS = 2, TAG_W = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] lk_set, vc_set, dt_set, cmd_set;
  logic [TAG_W-1:0] lk_tag, vc_tag, dt_tag, cmd_tag;
  logic lk_hit, lk_dirty, vc_valid, vc_dirty, any_dirty;
  logic [0:0] lk_way, vc_way, dt_way, cmd_way;
  logic cmd_fill, cmd_set_dirty, cmd_clr_dirty, cmd_inval, cmd_inval_all, cmd_dirty;

  l1d_tag_array #(.SETS(SETS), .WAYS(WAYS), .TAG_W(TAG_W)) dut (.*);

  logic [TAG_W-1:0] t [SETS][WAYS];
  bit v [SETS][WAYS], d [SETS][WAYS];
  int rr [SETS];
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

  initial begin
    {cmd_fill, cmd_set_dirty, cmd_clr_dirty, cmd_inval, cmd_inval_all, cmd_dirty} = '0;
    cmd_set = 0; cmd_way = 0; cmd_tag = 0; lk_set = 0; lk_tag = 0; vc_set = 0;
    for (int s = 0; s < SETS; s++) begin
      rr[s] = 0;
      for (int w = 0; w < WAYS; w++) begin v[s][w] = 0; d[s][w] = 0; t[s][w] = 0; end
    end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      int ew, c;
      bit eh, found;
      @(negedge clk);
      // lookups against the reference
      lk_set = 2'($urandom); lk_tag = TAG_W'($urandom_range(0, 3)); vc_set = 2'($urandom);
      #1;
      eh = 0;
      for (int w = 0; w < WAYS; w++) if (v[lk_set][w] && t[lk_set][w] == lk_tag && !eh) begin
        eh = 1; ew = w;
      end
      check(lk_hit == eh, "lookup hit");
      if (eh) check(lk_way == 1'(ew) && lk_dirty == d[lk_set][ew], "lookup way/dirty");
      found = 0; ew = rr[vc_set];
      for (int w = 0; w < WAYS; w++) if (!v[vc_set][w] && !found) begin found = 1; ew = w; end
      check(vc_way == 1'(ew), $sformatf("victim way %0d exp %0d", vc_way, ew));
      check(vc_valid == v[vc_set][ew] && vc_dirty == d[vc_set][ew], "victim flags");
      if (v[vc_set][ew]) check(vc_tag == t[vc_set][ew], "victim tag");
      found = 0;
      for (int s = 0; s < SETS && !found; s++)
        for (int w = 0; w < WAYS && !found; w++)
          if (d[s][w]) begin
            found = 1;
            // a dirty bit set on an invalid way (only this bench does that) has no defined tag
            check(dt_set == 2'(s) && dt_way == 1'(w) && (!v[s][w] || dt_tag == t[s][w]), "lowest dirty line");
          end
      check(any_dirty == found, "any dirty");
      // one random command
      {cmd_fill, cmd_set_dirty, cmd_clr_dirty, cmd_inval, cmd_inval_all} = '0;
      c = $urandom_range(0, 19);
      cmd_set = 2'($urandom); cmd_way = 1'($urandom); cmd_tag = TAG_W'($urandom_range(0, 3));
      cmd_dirty = 1'($urandom);
      if (c < 8) begin
        cmd_fill = 1; cmd_way = vc_way; cmd_set = vc_set;
      end else if (c < 12) cmd_set_dirty = 1;
      else if (c < 15) cmd_clr_dirty = 1;
      else if (c < 19) cmd_inval = 1;
      else cmd_inval_all = 1;
      @(posedge clk);
      if (cmd_inval_all) begin
        for (int s = 0; s < SETS; s++) for (int w = 0; w < WAYS; w++) begin v[s][w] = 0; d[s][w] = 0; end
      end else if (cmd_fill) begin
        v[cmd_set][cmd_way] = 1; d[cmd_set][cmd_way] = cmd_dirty; t[cmd_set][cmd_way] = cmd_tag;
        if (int'(cmd_way) == rr[cmd_set]) rr[cmd_set] = (rr[cmd_set] + 1) % WAYS;
      end else if (cmd_set_dirty) d[cmd_set][cmd_way] = 1;
      else if (cmd_clr_dirty) d[cmd_set][cmd_way] = 0;
      else if (cmd_inval) begin v[cmd_set][cmd_way] = 0; d[cmd_set][cmd_way] = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
