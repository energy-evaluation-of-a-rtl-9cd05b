// icache_ctrl: state machine of the two-cycle instruction cache.
//
// Three states. FLUSH is entered on reset (active-low rst_n) and walks a
// counter over every set, clearing all directory blocks and the pseudo-LRU
// table of that set at once; it takes 2^IDX_W cycles and ends in TAGCMP.
// TAGCMP is normal operation: the datapath compares tags and the controller
// waits for a miss. On a miss it enters MEMREAD, which brings the whole line
// from main memory: a transfer counter steps through the words of the line
// and drives the word offset of the main-memory address, one word per cycle
// that memory is not busy; a second counter follows the words as they come
// back (through the mem_if registers) and gives the offset at which each is
// written into the data block. When the last word of the line has arrived the
// controller returns to TAGCMP.
//
// Outputs: `state`, the flush address and write strobe, the main-memory
// request with its word offset, and the write strobe, offset and last-word
// flag for each returning word.
//
// Follows the described controller (its three states, flushing the whole
// directory and the replacement table at reset in 2^index cycles, and the
// transfer counter that forms the memory address). The figure's exit
// condition from the memory read compares the counter with the associativity,
// the text with the number of words in a line; this design counts words, as
// the text says (both are 4 by default). The separate receive counter, which
// lets memory answer with any fixed latency, is this design's own.
module icache_ctrl
  import icache_pkg::*;
#(
  parameter int unsigned IDX_W = 5,
  parameter int unsigned OFF_W = 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             miss,
  input  logic             mm_busy,
  input  logic             mm_valid,
  output ic_state_e        state,
  output logic [IDX_W-1:0] flush_idx,
  output logic             flush_we,
  output logic             mm_req,
  output logic [OFF_W-1:0] mm_off,
  output logic             fill_we,
  output logic [OFF_W-1:0] fill_off,
  output logic             fill_last
);

  localparam int unsigned WPL = 1 << OFF_W;

  logic [IDX_W-1:0] fcnt_q;
  logic [OFF_W:0]   icnt_q;
  logic [OFF_W-1:0] rcnt_q;

  assign flush_idx = fcnt_q;
  assign flush_we  = (state == ST_FLUSH);
  assign mm_req    = (state == ST_MEMREAD) && (icnt_q < (OFF_W + 1)'(WPL));
  assign mm_off    = icnt_q[OFF_W-1:0];
  assign fill_we   = (state == ST_MEMREAD) && mm_valid;
  assign fill_off  = rcnt_q;
  assign fill_last = fill_we && (rcnt_q == OFF_W'(WPL - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= ST_FLUSH;
      fcnt_q <= '0;
      icnt_q <= '0;
      rcnt_q <= '0;
    end else begin
      unique case (state)
        ST_FLUSH: begin
          fcnt_q <= fcnt_q + 1'b1;
          if (fcnt_q == '1) state <= ST_TAGCMP;
        end
        ST_TAGCMP: begin
          icnt_q <= '0;
          rcnt_q <= '0;
          if (miss) state <= ST_MEMREAD;
        end
        ST_MEMREAD: begin
          if (mm_req && !mm_busy) icnt_q <= icnt_q + 1'b1;
          if (fill_we)            rcnt_q <= rcnt_q + 1'b1;
          if (fill_last)          state  <= ST_TAGCMP;
        end
        default: state <= ST_FLUSH;
      endcase
    end
  end

endmodule
