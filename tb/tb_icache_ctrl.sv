// tb_icache_ctrl: self-checking test of the instruction-cache controller.
//
// After reset the controller must sweep the flush address over all 32 sets,
// one per cycle (32 cycles, 2^index), then wait in TAGCMP. Each miss must
// start a refill: the controller requests the four words of the line in
// order (offsets 0..3), advancing only when memory is not busy and never
// requesting more than four; it writes each returning word at the next
// offset, flags the fourth as the last and then goes back to TAGCMP. Memory
// answers each accepted request after a random delay (in order). With memory
// never busy and answering in the next cycle a refill takes 5 cycles, which
// is checked too.
module tb_icache_ctrl;
  import icache_pkg::*;
  localparam int unsigned MAX_CYC = 100000;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       miss, mm_busy, mm_valid;
  ic_state_e  state;
  logic [4:0] flush_idx;
  logic       flush_we, mm_req, fill_we, fill_last;
  logic [1:0] mm_off, fill_off;
  int checks = 0, failures = 0;
  int due[$];
  int cyc = 0;
  logic busy_on = 1'b1;
  int max_delay = 3;

  icache_ctrl dut (
    .clk, .rst_n, .miss, .mm_busy, .mm_valid, .state, .flush_idx, .flush_we,
    .mm_req, .mm_off, .fill_we, .fill_off, .fill_last);

  always #5 clk = ~clk;

  // memory: each accepted request answers after 1..max_delay cycles, in order
  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mm_req && !mm_busy) begin
      int d;
      d = cyc + 1 + int'($urandom % max_delay);
      if (due.size() > 0 && d <= due[$]) d = due[$] + 1;
      due.push_back(d);
    end
    if (mm_valid) void'(due.pop_front());
  end
  assign mm_valid = (due.size() > 0) && (due[0] == cyc);

  always_ff @(negedge clk) mm_busy <= busy_on && (($urandom % 3) == 0);

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic refill(output int cycles);
    int n_req, n_fill;
    n_req = 0; n_fill = 0; cycles = 0;
    @(negedge clk) miss = 1'b1;
    @(negedge clk) miss = 1'b0;
    #1;
    check("state after miss", int'(state), int'(ST_MEMREAD));
    while (state == ST_MEMREAD) begin
      cycles++;
      if (mm_req && !mm_busy) begin
        check("request offset", int'(mm_off), n_req);
        n_req++;
      end
      if (fill_we) begin
        check("fill offset", int'(fill_off), n_fill);
        n_fill++;
        check("last flag", int'(fill_last), int'(n_fill == 4));
      end
      if (cycles > 200) break;
      @(negedge clk);
      #1;
    end
    check("requests per line", n_req, 4);
    check("words per line", n_fill, 4);
  endtask

  initial begin
    int n_flush, c;
    miss = 0;
    #1;
    @(negedge clk) rst_n = 1'b1;
    n_flush = 0;
    while (state == ST_FLUSH && n_flush < 100) begin
      check("flush address", int'(flush_idx), n_flush);
      check("flush strobe", int'(flush_we), 1);
      n_flush++;
      @(negedge clk);
    end
    check("flush cycles", n_flush, 32);
    check("state after flush", int'(state), int'(ST_TAGCMP));
    repeat (3) @(negedge clk);
    check("stays in TAGCMP", int'(state), int'(ST_TAGCMP));
    for (int i = 0; i < 200; i++) begin
      refill(c);
      repeat ($urandom % 3) @(negedge clk);
    end
    // rate: no busy, answer in the next cycle
    busy_on = 1'b0; max_delay = 1;
    repeat (2) @(negedge clk);
    refill(c);
    check("refill cycles, no wait", c, 5);
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
