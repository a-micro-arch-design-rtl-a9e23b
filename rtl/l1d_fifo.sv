// l1d_fifo: synchronous FIFO used for the L1 cache's LSU response queue and
// L2 request queue.
//
// An entry pushed at a clock edge is visible at the head (out_valid) right
// after that edge, so it can leave at the next edge: push-to-pop is one
// cycle, which keeps the cache's four-cycle request-to-response latency.
// Push when full and pop when empty are ignored (the owner checks full and
// empty first; assertions flag misuse). DEPTH need not be a power of two.
module l1d_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic push,
  input  T     in_data,
  output logic full,
  output logic out_valid,
  input  logic pop,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned PW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);

  T                mem [DEPTH];
  logic [PW-1:0]   wp, rp;

  assign full      = (count == DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (count != '0);
  assign out_data  = mem[rp];

  function automatic logic [PW-1:0] inc(input logic [PW-1:0] p);
    return (p == PW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (push && !full) begin
        mem[wp] <= in_data;
        wp      <= inc(wp);
      end
      if (pop && out_valid) rp <= inc(rp);
      count <= count + CW'(push && !full) - CW'(pop && out_valid);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) push |-> !full);
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid);
endmodule
