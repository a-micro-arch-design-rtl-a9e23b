// tb_l1d_amo_mshr: random LR/SC/AMO allocate and free against a reference;
// checks the stored id/op/mask read back, lowest-free allocation, full,
// empty and the in-flight-LR flag.
`timescale 1ns/1ps
module tb_l1d_amo_mshr;
  import l1d_pkg::*;
  localparam int E = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic alloc, free, full, empty, lr_pending;
  l1_op_e alloc_op, rd_op;
  logic [7:0] alloc_id, rd_id;
  logic [3:0] alloc_mask, rd_mask;
  logic [1:0] alloc_idx, rd_idx, free_idx;
  l1d_amo_mshr #(.ENTRIES(E), .ID_W(8), .WORDS(4)) dut (.*);
  bit busy [E];
  l1_op_e op [E];
  logic [7:0] id [E];
  logic [3:0] mk [E];
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
    alloc = 0; free = 0; alloc_op = OP_AMO; alloc_id = 0; alloc_mask = 0; rd_idx = 0; free_idx = 0;
    for (int e = 0; e < E; e++) busy[e] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      int nb, lf;
      bit lr;
      @(negedge clk);
      rd_idx = 2'($urandom);
      #1;
      nb = 0; lf = -1; lr = 0;
      for (int e = E - 1; e >= 0; e--) begin
        if (busy[e]) begin nb++; if (op[e] == OP_LR) lr = 1; end
        else lf = e;
      end
      check(full == (nb == E) && empty == (nb == 0), "full/empty");
      check(lr_pending == lr, "lr_pending");
      if (lf >= 0) check(alloc_idx == 2'(lf), "lowest free entry");
      if (busy[rd_idx])
        check(rd_op == op[rd_idx] && rd_id == id[rd_idx] && rd_mask == mk[rd_idx], "read back");
      alloc = !full && $urandom_range(0, 1);
      alloc_op = l1_op_e'($urandom_range(2, 4)); alloc_id = 8'($urandom); alloc_mask = 4'($urandom);
      free_idx = 2'($urandom); free = busy[free_idx] && $urandom_range(0, 2) == 0;
      @(posedge clk);
      if (free) busy[free_idx] = 0;
      if (alloc) begin busy[lf] = 1; op[lf] = alloc_op; id[lf] = alloc_id; mk[lf] = alloc_mask; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
