// tb_l1d_mshr: random allocate / append / close / free traffic against a
// reference of entries and ordered subentries; checks the probe (open
// entries only), subentry-full, lowest-free allocation, full/empty, the
// line address and has-store flag of port A and every subentry of port B.
`timescale 1ns/1ps
module tb_l1d_mshr;
  localparam int E = 2, S = 3, BW = 6, IW = 8, WD = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic [BW-1:0] probe_blk, alloc_blk, ra_blk;
  logic probe_hit, probe_sub_full, alloc, append, sub_we, close, free, ra_has_write, full, empty;
  logic [0:0] probe_idx, alloc_idx, append_idx, close_idx, free_idx, ra_idx, rb_idx;
  logic [IW-1:0] sub_id;
  logic [WD-1:0] sub_mask;
  logic [WD*32-1:0] sub_data;
  logic [1:0] rb_nsub;
  logic [S-1:0] rb_we;
  logic [S-1:0][IW-1:0] rb_id;
  logic [S-1:0][WD-1:0] rb_mask;
  logic [S-1:0][WD*32-1:0] rb_data;
  l1d_mshr #(.ENTRIES(E), .SUBS(S), .BLK_W(BW), .ID_W(IW), .WORDS(WD)) dut (.*);

  bit busy [E], opn [E];
  logic [BW-1:0] blk [E];
  int ns [E];
  bit we [E][S];
  logic [IW-1:0] id [E][S];
  logic [WD-1:0] mk [E][S];
  logic [WD*32-1:0] dt [E][S];
  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    int n_app = 0, n_full = 0;
    {alloc, append, close, free, sub_we} = '0;
    probe_blk = 0; alloc_blk = 0; append_idx = 0; close_idx = 0; free_idx = 0; ra_idx = 0; rb_idx = 0;
    sub_id = 0; sub_mask = 0; sub_data = 0;
    for (int e = 0; e < E; e++) begin busy[e] = 0; opn[e] = 0; ns[e] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      int lf, ph, nb, c, hw;
      @(negedge clk);
      {alloc, append, close, free} = '0;
      probe_blk = BW'($urandom_range(0, 3));
      alloc_blk = probe_blk;
      ra_idx = 1'($urandom); rb_idx = 1'($urandom);
      #1;
      lf = -1; ph = -1; nb = 0;
      for (int e = E - 1; e >= 0; e--) begin
        if (!busy[e]) lf = e; else nb++;
        if (opn[e] && blk[e] == probe_blk) ph = e;
      end
      check(probe_hit == (ph >= 0), "probe hit");
      if (ph >= 0) begin
        check(probe_idx == 1'(ph), "probe idx");
        check(probe_sub_full == (ns[ph] == S), "subentry full");
        if (ns[ph] == S) n_full++;
      end
      check(full == (nb == E) && empty == (nb == 0), "full/empty");
      if (lf >= 0) check(alloc_idx == 1'(lf), "lowest free");
      if (busy[ra_idx]) begin
        hw = 0;
        for (int i = 0; i < ns[ra_idx]; i++) if (we[ra_idx][i]) hw = 1;
        check(ra_blk == blk[ra_idx] && ra_has_write == 1'(hw), "port A");
      end
      if (busy[rb_idx]) begin
        check(rb_nsub == 2'(ns[rb_idx]), "port B count");
        for (int i = 0; i < ns[rb_idx]; i++)
          check(rb_we[i] == we[rb_idx][i] && rb_id[i] == id[rb_idx][i] &&
                rb_mask[i] == mk[rb_idx][i] && rb_data[i] == dt[rb_idx][i], "port B subentry");
      end
      sub_we = 1'($urandom); sub_id = 8'($urandom); sub_mask = 2'($urandom);
      sub_data = {$urandom, $urandom};
      c = $urandom_range(0, 3);
      if (c == 0 && ph < 0 && lf >= 0) alloc = 1;
      else if (c == 1 && ph >= 0 && ns[ph] < S) begin append = 1; append_idx = 1'(ph); n_app++; end
      else if (c == 2) begin
        close_idx = 1'($urandom);
        close = opn[close_idx];
      end
      free_idx = 1'($urandom);
      free = busy[free_idx] && !opn[free_idx] && !(close && close_idx == free_idx) &&
             $urandom_range(0, 1);
      @(posedge clk);
      if (free) begin busy[free_idx] = 0; opn[free_idx] = 0; end
      if (close) opn[close_idx] = 0;
      if (alloc) begin
        busy[lf] = 1; opn[lf] = 1; blk[lf] = alloc_blk; ns[lf] = 1;
        we[lf][0] = sub_we; id[lf][0] = sub_id; mk[lf][0] = sub_mask; dt[lf][0] = sub_data;
      end
      if (append) begin
        we[ph][ns[ph]] = sub_we; id[ph][ns[ph]] = sub_id; mk[ph][ns[ph]] = sub_mask;
        dt[ph][ns[ph]] = sub_data; ns[ph]++;
      end
    end
    check(n_app > 0 && n_full > 0, "appends and full subentry lists happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
