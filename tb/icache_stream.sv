// icache_stream: testbench harness that drives one instruction cache of a
// given associativity with a random fetch stream and checks every word.
//
// The stream runs mostly sequentially with random jumps over an 8 kB region,
// four times the 2 kB cache, and presents a new address only in a cycle
// without `stall`, as the pipeline does. Main memory returns the word at byte
// address A as a fixed hash of A, in order, 0..3 cycles after each request,
// and is busy one cycle in four. After N_FETCH fetches `finished` rises with
// the counts of checks, failures, hits, misses and evictions (misses on lines
// that had been cached before).
module icache_stream #(
  parameter int unsigned WAYS    = 4,
  parameter int unsigned N_FETCH = 10000
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   misses,
  output int   evictions
);

  logic        req, stall, mm_req, mm_busy, mm_rvalid;
  logic [31:0] addr, instr, mm_addr, mm_rdata;
  int          cyc;
  logic [31:0] q_addr[$];
  int          q_due[$];
  bit          seen [int];

  icache #(.WAYS(WAYS)) u_ic (
    .clk, .rst_n, .req, .addr, .instr, .stall,
    .mm_req, .mm_addr, .mm_busy, .mm_rdata, .mm_rvalid);

  function automatic logic [31:0] mem_word(logic [31:0] a);
    return (a * 32'h9E37_79B1) ^ 32'h5A5A_0F0F;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cyc <= 0;
    end else begin
      cyc <= cyc + 1;
      if (mm_req && !mm_busy) begin
        int d;
        d = cyc + int'($urandom % 4);
        if (q_due.size() > 0 && d < q_due[$]) d = q_due[$];
        q_addr.push_back(mm_addr);
        q_due.push_back(d);
      end
      if (mm_rvalid) begin
        void'(q_addr.pop_front());
        void'(q_due.pop_front());
      end
    end
  end

  always_comb begin
    mm_rvalid = (q_due.size() > 0) && (q_due[0] <= cyc);
    mm_rdata  = mm_rvalid ? mem_word(q_addr[0]) : 32'h0;
  end

  always_ff @(negedge clk) mm_busy <= rst_n && (($urandom % 4) == 0);

  initial begin
    logic [31:0] pc;
    int          s, line;
    finished = 1'b0;
    checks = 0; failures = 0; hits = 0; misses = 0; evictions = 0;
    req = 1'b0; addr = 32'h0; pc = 32'h0;
    @(posedge rst_n);
    @(negedge clk);
    #1;
    while (stall) begin @(negedge clk); #1; end
    for (int i = 0; i < int'(N_FETCH); i++) begin
      if (($urandom % 8) == 0) pc = ($urandom % 2048) << 2;
      else                     pc = (pc + 4) % 8192;
      line = int'(pc >> 4);
      req  = 1'b1;
      addr = pc;
      @(negedge clk);
      #1;
      req = 1'b0;
      s = 0;
      while (stall && s < 1000) begin s++; @(negedge clk); #1; end
      checks++;
      if (instr !== mem_word(pc)) begin
        failures++;
        if (failures < 5) $display("FAIL %0d-way: instr @%h = %h expected %h", WAYS, pc, instr, mem_word(pc));
      end
      if (s == 0) hits++;
      else begin
        misses++;
        if (seen.exists(line)) evictions++;
      end
      seen[line] = 1'b1;
    end
    finished = 1'b1;
  end
endmodule
