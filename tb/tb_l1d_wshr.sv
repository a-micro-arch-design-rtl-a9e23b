// tb_l1d_wshr: random allocate/acknowledge traffic against a reference;
// checks lowest-free allocation, both same-line probes, full and empty.
`timescale 1ns/1ps
module tb_l1d_wshr;
  localparam int E = 4, BW = 6;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc, free, probe_a_hit, probe_b_hit, full, empty;
  logic [BW-1:0] alloc_blk, probe_a_blk, probe_b_blk;
  logic [1:0] alloc_idx, free_idx;
  l1d_wshr #(.ENTRIES(E), .BLK_W(BW)) dut (.*);
  bit busy [E];
  logic [BW-1:0] blk [E];
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
    alloc = 0; free = 0; alloc_blk = 0; free_idx = 0; probe_a_blk = 0; probe_b_blk = 0;
    for (int e = 0; e < E; e++) busy[e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int nb, lf;
      bit ha, hb;
      @(negedge clk);
      probe_a_blk = BW'($urandom_range(0, 7)); probe_b_blk = BW'($urandom_range(0, 7));
      #1;
      nb = 0; lf = -1; ha = 0; hb = 0;
      for (int e = E - 1; e >= 0; e--) begin
        if (busy[e]) begin
          nb++;
          if (blk[e] == probe_a_blk) ha = 1;
          if (blk[e] == probe_b_blk) hb = 1;
        end else lf = e;
      end
      check(full == (nb == E) && empty == (nb == 0), "full/empty");
      check(probe_a_hit == ha && probe_b_hit == hb, "probes");
      if (lf >= 0) check(alloc_idx == 2'(lf), "lowest free entry");
      alloc = !full && $urandom_range(0, 1); alloc_blk = BW'($urandom_range(0, 7));
      free_idx = 2'($urandom); free = busy[free_idx] && $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (free) busy[free_idx] = 0;
      if (alloc) begin busy[lf] = 1; blk[lf] = alloc_blk; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
