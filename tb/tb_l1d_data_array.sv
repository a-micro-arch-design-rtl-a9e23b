// tb_l1d_data_array: word-masked writes and synchronous reads against a
// reference array; checks the one-cycle read latency, that the output holds
// when no read is issued, and read-old-data on a same-row read and write.
`timescale 1ns/1ps
module tb_l1d_data_array;
  localparam int ROWS = 8, WORDS = 4;
  logic clk = 1'b0;
  always #5 clk = ~clk;
  logic re, we;
  logic [2:0] raddr, waddr;
  logic [WORDS-1:0] wmask;
  logic [WORDS*32-1:0] wdata, rdata;
  logic [WORDS*32-1:0] ref_m [ROWS];
  int checks = 0, failures = 0;

  l1d_data_array #(.ROWS(ROWS), .WORDS(WORDS)) dut (.clk, .re, .raddr, .rdata, .we, .waddr,
    .wmask, .wdata);

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
    logic [WORDS*32-1:0] exp;
    re = 0; we = 0; raddr = 0; waddr = 0; wmask = 0; wdata = 0;
    // initialise every row
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); we = 1; waddr = 3'(r); wmask = '1; wdata = {4{32'(r * 17)}};
      ref_m[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      re = $urandom_range(0, 1); raddr = 3'($urandom);
      we = $urandom_range(0, 1); waddr = 3'($urandom); wmask = 4'($urandom);
      wdata = {$urandom, $urandom, $urandom, $urandom};
      exp = rdata;
      if (re) exp = ref_m[raddr];      // old contents, even if written at the same edge
      @(posedge clk);
      if (we) for (int w = 0; w < WORDS; w++) if (wmask[w]) ref_m[waddr][w*32 +: 32] = wdata[w*32 +: 32];
      #1;
      check(rdata == exp, $sformatf("read row %0d: %h exp %h", raddr, rdata, exp));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
