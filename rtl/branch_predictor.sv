// branch_predictor: branch target buffer with a two-bit direction counter per entry.
//
// Sits beside the fetch stages. Each cycle it looks up the PC of IF1 and, when
// the PC hits a valid entry whose counter says "taken", returns the stored
// target as the next fetch address; otherwise the fetch continues at PC+4.
// A branch is thus predicted taken only when it is a known control transfer,
// the direction predictor says taken, and the target is in the buffer.
//
// Organisation: BTB_ENTRIES direct-mapped entries, indexed by PC bits above the
// byte offset; each holds a valid bit, the remaining PC bits as tag, the
// target word address and a saturating two-bit counter. Lookup is
// combinational (flip-flop storage). Updates come one cycle after a control
// transfer resolves in EX, from the EX/MEM1 register: a taken transfer writes
// tag and target and counts up (a new entry starts at weakly taken, 2'b10), a
// not-taken one counts a hitting entry down, and a not-taken miss changes
// nothing. Valid bits clear on reset.
//
// The entry counts 32 and 128 are the sizes evaluated for the pipeline, with
// 32 the most energy-efficient; direct mapping, the two-bit counters and the
// allocation policy are this design's choices.
//
// BTB_BYPASS = 1 gives the document's "seven-stage pipeline without BTB": the
// buffer's memory is bypassed, so no target is ever found and every transfer
// is predicted not taken (the counters still train but are never consulted).
module branch_predictor #(
  parameter int unsigned BTB_ENTRIES = 32,
  parameter bit          BTB_BYPASS  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup, IF1
  input  logic [31:0] lookup_pc,
  output logic        pred_taken,
  output logic [31:0] pred_target,
  output logic        btb_hit,
  // update, from the EX/MEM1 register
  input  logic        upd_en,
  input  logic [31:0] upd_pc,
  input  logic        upd_taken,
  input  logic [31:0] upd_target
);

  localparam int unsigned IW = $clog2(BTB_ENTRIES);
  localparam int unsigned TW = 30 - IW;

  logic [BTB_ENTRIES-1:0] valid_q;
  logic [TW-1:0]          tag_q    [BTB_ENTRIES];
  logic [29:0]            target_q [BTB_ENTRIES];
  logic [1:0]             ctr_q    [BTB_ENTRIES];

  logic [IW-1:0] l_idx, u_idx;
  logic [TW-1:0] l_tag, u_tag;
  logic          u_hit;

  assign l_idx = lookup_pc[IW+1:2];
  assign l_tag = lookup_pc[31:IW+2];
  assign u_idx = upd_pc[IW+1:2];
  assign u_tag = upd_pc[31:IW+2];

  assign btb_hit     = !BTB_BYPASS && valid_q[l_idx] && (tag_q[l_idx] == l_tag);
  assign pred_taken  = btb_hit && ctr_q[l_idx][1];
  assign pred_target = {target_q[l_idx], 2'b00};
  assign u_hit       = valid_q[u_idx] && (tag_q[u_idx] == u_tag);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= '0;
    end else if (upd_en && upd_taken) begin
      valid_q[u_idx] <= 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (upd_en) begin
      if (upd_taken) begin
        tag_q[u_idx]    <= u_tag;
        target_q[u_idx] <= upd_target[31:2];
        if (!u_hit)                     ctr_q[u_idx] <= 2'b10;
        else if (ctr_q[u_idx] != 2'b11) ctr_q[u_idx] <= ctr_q[u_idx] + 2'd1;
      end else if (u_hit && (ctr_q[u_idx] != 2'b00)) begin
        ctr_q[u_idx] <= ctr_q[u_idx] - 2'd1;
      end
    end
  end

endmodule
