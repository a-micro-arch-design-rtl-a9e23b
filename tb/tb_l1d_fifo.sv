// tb_l1d_fifo: random push/pop against a queue reference; checks order,
// count, full/empty flags and the one-cycle push-to-head latency.
`timescale 1ns/1ps
module tb_l1d_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic       push, pop, full, ov;
  logic [7:0] din, dout;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [7:0] ref_q [$];

  l1d_fifo #(.T(logic [7:0]), .DEPTH(4)) dut (.clk, .rst_n, .push, .in_data(din), .full,
    .out_valid(ov), .pop, .out_data(dout), .count);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; din = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // latency: pushed at an edge, visible right after it
    @(negedge clk); push = 1; din = 8'hA5;
    @(negedge clk); push = 0;
    check(ov && dout == 8'hA5 && count == 1, "head visible one cycle after push");
    pop = 1; @(negedge clk); pop = 0;
    check(!ov && count == 0, "empty after pop");
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      check(ov == (ref_q.size() > 0), "out_valid");
      check(full == (ref_q.size() == 4), "full");
      check(count == 3'(ref_q.size()), "count");
      if (ov) check(dout == ref_q[0], $sformatf("data %h exp %h", dout, ref_q[0]));
      push = ($urandom_range(0, 1) == 1) && !full;
      pop  = ($urandom_range(0, 2) != 0) && ov;
      din  = 8'($urandom);
      @(posedge clk);
      if (pop) void'(ref_q.pop_front());
      if (push) ref_q.push_back(din);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
