// tb_branch_predictor: self-checking test of the branch target buffer.
//
// Random update streams (taken and not-taken outcomes of control transfers at
// a handful of PCs, some of which alias to the same entry) are applied while
// random PCs are looked up. A reference model (a valid flag, full PC, target
// and two-bit counter per entry) predicts hit, direction and target. Checked:
// empty buffer after reset, a first taken outcome makes the next lookup of
// that PC predict taken at once (new entries start weakly taken), two
// not-taken outcomes turn it to not taken, and a conflicting PC replaces the
// entry. The update takes effect at the next edge, one cycle latency.
// A second instance with BTB_BYPASS set sees the same stream and must never
// hit or predict taken (the "without BTB" configuration).
module tb_branch_predictor;
  localparam int unsigned BTB_ENTRIES = 32;
  localparam int unsigned MAX_CYC = 100000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] lookup_pc, pred_target, upd_pc, upd_target;
  logic        pred_taken, btb_hit, upd_en, upd_taken;
  logic        byp_taken, byp_hit;
  logic [31:0] byp_target;
  int checks = 0, failures = 0;
  int n_pred_taken = 0, n_hit_nt = 0, n_replace = 0;

  logic        m_valid  [BTB_ENTRIES];
  logic [31:0] m_pc     [BTB_ENTRIES];
  logic [31:0] m_target [BTB_ENTRIES];
  int          m_ctr    [BTB_ENTRIES];

  branch_predictor dut (
    .clk, .rst_n, .lookup_pc, .pred_taken, .pred_target, .btb_hit,
    .upd_en, .upd_pc, .upd_taken, .upd_target);

  branch_predictor #(.BTB_BYPASS(1'b1)) dut_byp (
    .clk, .rst_n, .lookup_pc, .pred_taken(byp_taken), .pred_target(byp_target),
    .btb_hit(byp_hit), .upd_en, .upd_pc, .upd_taken, .upd_target);

  always #5 clk = ~clk;

  function automatic int idx(logic [31:0] pc);
    return int'((pc >> 2) % BTB_ENTRIES);
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic look(logic [31:0] pc);
    int e;
    logic hit;
    lookup_pc = pc;
    #1;
    e   = idx(pc);
    hit = m_valid[e] && m_pc[e] == pc;
    check("hit", 32'(btb_hit), 32'(hit));
    check("taken", 32'(pred_taken), 32'(hit && m_ctr[e] >= 2));
    check("bypassed hit", 32'(byp_hit), 32'h0);
    check("bypassed taken", 32'(byp_taken), 32'h0);
    if (hit && m_ctr[e] >= 2) begin
      check("target", pred_target, m_target[e]);
      n_pred_taken++;
    end
    if (hit && m_ctr[e] < 2) n_hit_nt++;
  endtask

  task automatic update(logic [31:0] pc, logic tk, logic [31:0] tgt);
    int e;
    @(negedge clk);
    upd_en = 1; upd_pc = pc; upd_taken = tk; upd_target = tgt;
    @(posedge clk);
    e = idx(pc);
    if (tk) begin
      if (m_valid[e] && m_pc[e] == pc) begin
        if (m_ctr[e] < 3) m_ctr[e]++;
      end else begin
        if (m_valid[e]) n_replace++;
        m_ctr[e] = 2;
      end
      m_valid[e] = 1; m_pc[e] = pc; m_target[e] = tgt;
    end else if (m_valid[e] && m_pc[e] == pc && m_ctr[e] > 0) begin
      m_ctr[e]--;
    end
    @(negedge clk);
    upd_en = 0;
  endtask

  logic [31:0] pcs [8];

  initial begin
    upd_en = 0; upd_pc = 0; upd_taken = 0; upd_target = 0; lookup_pc = 0;
    foreach (m_valid[i]) begin m_valid[i] = 0; m_pc[i] = 0; m_target[i] = 0; m_ctr[i] = 0; end
    #1;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 8; i++) pcs[i] = ($urandom % 64) << 2;
    pcs[7] = pcs[0] + 32'(BTB_ENTRIES * 4);     // aliases with pcs[0]
    // directed: weakly taken start, then two not-taken turn it off
    look(pcs[0]);
    update(pcs[0], 1, 32'h0000_4000);
    look(pcs[0]);
    check("first taken predicts taken", 32'(pred_taken), 32'd1);
    update(pcs[0], 0, 32'h0);
    look(pcs[0]);
    check("one not-taken keeps weakly not taken", 32'(pred_taken), 32'd0);
    update(pcs[7], 1, 32'h0000_8000);
    look(pcs[7]);
    look(pcs[0]);
    check("alias replaced", 32'(btb_hit), 32'd0);
    // random
    for (int i = 0; i < 3000; i++) begin
      update(pcs[$urandom % 8], ($urandom % 3) != 0, ($urandom % 4096) << 2);
      look(pcs[$urandom % 8]);
      look(($urandom % 256) << 2);
    end
    checks += 3;
    if (n_pred_taken == 0) begin failures++; $display("FAIL never predicted taken"); end
    if (n_hit_nt == 0)     begin failures++; $display("FAIL never hit with not-taken counter"); end
    if (n_replace == 0)    begin failures++; $display("FAIL never replaced an entry"); end
    // reset empties the buffer
    rst_n = 0; #1; rst_n = 1;
    foreach (m_valid[i]) m_valid[i] = 0;
    for (int i = 0; i < 8; i++) look(pcs[i]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAX_CYC) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
