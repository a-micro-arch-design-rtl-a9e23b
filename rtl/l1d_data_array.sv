// l1d_data_array: the L1 data SRAM, one row per (set, way) holding a whole
// cache line of WORDS 32-bit words.
//
// Synchronous single-read/single-write array: a read issued at a clock edge
// (re) presents its row on rdata after that edge and holds it until the next
// read; a write (we) updates the words selected by wmask at the edge. A read
// and a write of the same row at the same edge return the old row; the cache
// pipeline forwards the written words itself. The array is written as a
// memory so synthesis maps it to an SRAM macro.
module l1d_data_array #(
  parameter int unsigned ROWS  = 256,  // SETS * WAYS
  parameter int unsigned WORDS = 32
) (
  input  logic                        clk,
  input  logic                        re,
  input  logic [$clog2(ROWS)-1:0]     raddr,
  output logic [WORDS*32-1:0]         rdata,
  input  logic                        we,
  input  logic [$clog2(ROWS)-1:0]     waddr,
  input  logic [WORDS-1:0]            wmask,
  input  logic [WORDS*32-1:0]         wdata
);
  logic [WORDS*32-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

  for (genvar w = 0; w < WORDS; w++) begin : g_word
    always_ff @(posedge clk) begin
      if (we && wmask[w]) mem[waddr][w*32 +: 32] <= wdata[w*32 +: 32];
    end
  end
endmodule
