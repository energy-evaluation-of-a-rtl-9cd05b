// tb_icache: self-checking test of the two-cycle instruction cache at its
// default size (2 kB, 4 ways, 4-word lines, 32 sets).
//
// A fetch stream that mostly runs sequentially and sometimes jumps, over an
// 8 kB region (four times the cache, so lines are evicted), is driven the way
// the pipeline drives it: a new address only in a cycle without `stall`. Every
// returned instruction is compared with main memory, whose word at byte
// address A is a fixed hash of A. Main memory answers each word request after
// a random 0..3 extra cycles and is randomly busy.
//
// Timing checks: the flush after reset keeps `stall` high for 32 cycles; a
// hit returns its word in the next cycle; with memory never busy and
// answering each word in the cycle after its request, a miss stalls for 7
// cycles: the miss cycle, the cycle of the first request, the cycle memory
// answers it, and the four cycles in which the words leave the mem_if
// registers and are written.
// Counted and required: hits, misses, and misses on lines that had been in the
// cache before (evictions).
module tb_icache;
  localparam int unsigned MAX_CYC = 200000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        req, stall, mm_req, mm_busy, mm_rvalid;
  logic [31:0] addr, instr, mm_addr, mm_rdata;
  int checks = 0, failures = 0;
  int n_hit = 0, n_miss = 0, n_evict = 0;
  int cyc = 0;
  logic busy_on = 1'b1;
  int   max_wait = 4;

  logic [31:0] q_addr[$];
  int          q_due[$];
  bit          seen [int];

  icache dut (.clk, .rst_n, .req, .addr, .instr, .stall,
              .mm_req, .mm_addr, .mm_busy, .mm_rdata, .mm_rvalid);

  always #5 clk = ~clk;

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  always_ff @(posedge clk) begin
    cyc <= cyc + 1;
    if (mm_req && !mm_busy) begin
      int d;
      d = cyc + int'($urandom % max_wait);
      if (q_due.size() > 0 && d < q_due[$]) d = q_due[$];
      q_addr.push_back(mm_addr);
      q_due.push_back(d);
    end
    if (mm_rvalid) begin
      void'(q_addr.pop_front());
      void'(q_due.pop_front());
    end
  end

  always_comb begin
    mm_rvalid = (q_due.size() > 0) && (q_due[0] <= cyc);
    mm_rdata  = mm_rvalid ? mem_word(q_addr[0]) : 32'h0;
  end

  always_ff @(negedge clk) mm_busy <= busy_on && (($urandom % 4) == 0);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // one fetch: present a at a cycle without stall, return the stall cycles seen
  task automatic fetch(logic [31:0] a, output int stalls);
    int line;
    line = int'(a >> 4);
    req  = 1'b1;
    addr = a;
    @(negedge clk);
    #1;
    req = 1'b0;
    stalls = 0;
    while (stall && stalls < 1000) begin
      stalls++;
      @(negedge clk);
      #1;
    end
    check($sformatf("instr @%h", a), instr, mem_word(a));
    if (stalls == 0) n_hit++;
    else begin
      n_miss++;
      if (seen.exists(line)) n_evict++;
    end
    seen[line] = 1'b1;
  endtask

  initial begin
    int n, s;
    logic [31:0] pc;
    req = 0; addr = 0;
    #1;
    @(negedge clk) rst_n = 1'b1;
    #1;
    n = 0;
    while (stall && n < 1000) begin n++; @(negedge clk); #1; end
    check("flush cycles", 32'(n), 32'd32);
    // directed timing: miss without wait, then a hit on the same line
    busy_on = 1'b0; max_wait = 1;
    repeat (2) @(negedge clk);
    #1;
    fetch(32'h0000_0100, s);
    check("miss stall cycles", 32'(s), 32'd7);
    fetch(32'h0000_0104, s);
    check("hit stall cycles", 32'(s), 32'd0);
    // random stream
    busy_on = 1'b1; max_wait = 4;
    pc = 0;
    for (int i = 0; i < 20000; i++) begin
      if (($urandom % 8) == 0) pc = ($urandom % 2048) << 2;
      else                     pc = (pc + 4) % 8192;
      fetch(pc, s);
    end
    checks += 3;
    if (n_hit == 0)   begin failures++; $display("FAIL no hit"); end
    if (n_miss == 0)  begin failures++; $display("FAIL no miss"); end
    if (n_evict == 0) begin failures++; $display("FAIL no eviction"); end
    $display("hits=%0d misses=%0d evictions=%0d", n_hit, n_miss, n_evict);
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
