// tb_icache_plru: self-checking test of the pseudo-LRU replacement table.
//
// A reference keeps, per set, the three tree bits of a 4-way pseudo-LRU
// written out by hand: the root bit says which pair (ways 0-1 or 2-3) is
// older, and one bit per pair says which way of the pair is older. Random
// touches and flushes on random sets are applied and the victim of a random
// set is compared each cycle. Checked as well: a flushed set chooses way 0,
// the victim is never the way touched last, and touching ways 0, 1, 2, 3 in
// order makes way 0 the victim again.
module tb_icache_plru;
  localparam int unsigned SETS = 32;
  localparam int unsigned MAX_CYC = 100000;

  logic       clk = 1'b0;
  logic       flush_we, touch_en;
  logic [4:0] flush_idx, rd_idx, touch_idx;
  logic [3:0] victim, touch_way;
  logic       root [SETS], left [SETS], right [SETS];
  int checks = 0, failures = 0;

  icache_plru dut (
    .clk, .flush_we, .flush_idx, .rd_idx, .victim, .touch_en, .touch_idx, .touch_way);

  always #5 clk = ~clk;

  // root = 0: ways 0-1 are older; left = 0: way 0 older than way 1; right = 0: way 2 older
  function automatic logic [3:0] ref_victim(int s);
    if (!root[s]) return left[s] ? 4'b0010 : 4'b0001;
    else          return right[s] ? 4'b1000 : 4'b0100;
  endfunction

  task automatic ref_touch(int s, int w);
    root[s] = (w < 2);
    if (w < 2) left[s]  = (w == 0);
    else       right[s] = (w == 2);
  endtask

  task automatic check(string what, logic [3:0] got, logic [3:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  task automatic step(logic f, int fi, logic t, int ti, int tw);
    @(negedge clk);
    flush_we = f; flush_idx = 5'(fi); touch_en = t; touch_idx = 5'(ti); touch_way = 4'(1 << tw);
    @(posedge clk);
    if (f) begin root[fi] = 0; left[fi] = 0; right[fi] = 0; end
    else if (t) ref_touch(ti, tw);
    @(negedge clk);
    flush_we = 0; touch_en = 0;
  endtask

  initial begin
    flush_we = 0; touch_en = 0; flush_idx = 0; touch_idx = 0; touch_way = 1; rd_idx = 0;
    // flush every set, as after reset
    for (int s = 0; s < int'(SETS); s++) step(1, s, 0, 0, 0);
    for (int s = 0; s < int'(SETS); s++) begin
      rd_idx = 5'(s); #1; check("victim after flush", victim, 4'b0001);
    end
    // touching 0,1,2,3 makes 0 the victim again
    for (int w = 0; w < 4; w++) step(0, 0, 1, 3, w);
    rd_idx = 3; #1; check("round robin order", victim, 4'b0001);
    for (int i = 0; i < 5000; i++) begin
      int s, w;
      logic f;
      s = $urandom % 4;
      w = $urandom % 4;
      f = ($urandom % 50) == 0;
      step(f, s, 1, s, w);
      rd_idx = 5'(s); #1;
      check("victim", victim, ref_victim(s));
      if (!f) begin
        checks++;
        if (victim[w]) begin
          failures++;
          $display("FAIL victim is the way just touched");
        end
      end
      rd_idx = 5'($urandom % SETS); #1;
      check("victim other set", victim, ref_victim(int'(rd_idx)));
    end
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
