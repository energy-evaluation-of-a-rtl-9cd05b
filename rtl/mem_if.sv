// mem_if: register interface between main memory and the instruction cache.
//
// Two registers decouple the cache from the slower main memory: a data
// register loaded with each word the memory returns, and a valid register
// that the memory sets in the same cycle it writes the data. The cache reads
// both one cycle later. The data register only loads on a valid word, so it
// keeps the last word between transfers. Valid clears on reset.
//
// Follows the described interface (two registers, data and valid); the
// widths and the reset behaviour are this design's choices.
module mem_if #(
  parameter int unsigned DATA_W = 32
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [DATA_W-1:0] mm_rdata,
  input  logic              mm_rvalid,
  output logic [DATA_W-1:0] data_q,
  output logic              valid_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      data_q  <= '0;
      valid_q <= 1'b0;
    end else begin
      valid_q <= mm_rvalid;
      if (mm_rvalid) data_q <= mm_rdata;
    end
  end

endmodule
