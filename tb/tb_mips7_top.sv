// tb_mips7_top: end-to-end test of the pipeline with its instruction cache,
// at the default parameters (32-entry predictor, 2 kB 4-way cache with 4-word
// lines).
//
// Main memory sits behind the cache and answers each word request after
// MM_WAIT extra cycles, in order, and sometimes holds requests off with
// mm_busy. Data memory is ideal and sometimes stalls the pipeline. The test
// program (mips_asm_pkg) runs to its done store; then every expected data
// word is compared. Checked as well: the flush after reset lasts 2^5 = 32
// cycles, every word fetched from main memory lies in a line that missed, and
// each mechanism happens at least once: cache flush, miss with line refill,
// hit, early hand-over of the missed word, main-memory hold-off, data-memory
// stall, forwarding, hazard stall, misprediction and correct taken
// prediction.
module tb_mips7_top;
  import mips_asm_pkg::*;
  import icache_pkg::*;

  localparam int unsigned N_SAMPLES = 32;
  localparam int unsigned LAGS      = 8;
  localparam int unsigned MM_WAIT   = 2;
  localparam int unsigned MAX_CYC   = 400000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        mm_req, mm_busy, mm_rvalid;
  logic [31:0] mm_addr, mm_rdata;
  logic        dmem_req, dmem_we, dmem_stall;
  logic [3:0]  dmem_be;
  logic [31:0] dmem_addr, dmem_wdata, dmem_rdata;
  logic [31:0] perf_cycles, perf_retired, perf_hazard_stalls, perf_mem_stalls, perf_mispredicts;

  int checks = 0, failures = 0;

  mips7_top dut (
    .clk, .rst_n,
    .mm_req, .mm_addr, .mm_busy, .mm_rdata, .mm_rvalid,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata, .dmem_stall,
    .perf_cycles, .perf_retired, .perf_hazard_stalls, .perf_mem_stalls, .perf_mispredicts
  );

  always #5 clk = ~clk;

  logic [31:0] imem [4096];
  logic [31:0] dmem [16384];
  logic        done = 1'b0;

  // main memory: in-order answers after MM_WAIT cycles
  logic [31:0] q_addr[$];
  int          q_due[$];
  int          n_cyc = 0;
  int          n_busy = 0, n_words = 0;

  always_ff @(posedge clk) begin
    n_cyc <= n_cyc + 1;
    mm_busy <= rst_n && (($urandom % 6) == 0);
    if (mm_req && !mm_busy) begin
      q_addr.push_back(mm_addr);
      q_due.push_back(n_cyc + int'(MM_WAIT));
    end
    if (mm_req && mm_busy) n_busy <= n_busy + 1;
    if (mm_rvalid) begin
      void'(q_addr.pop_front());
      void'(q_due.pop_front());
      n_words <= n_words + 1;
    end
  end

  always_comb begin
    mm_rvalid = (q_due.size() > 0) && (q_due[0] <= n_cyc);
    mm_rdata  = mm_rvalid ? imem[q_addr[0][13:2]] : 32'h0;
  end

  // data memory
  always_ff @(posedge clk) begin
    dmem_stall <= rst_n && (($urandom % 10) == 0);
    if (!rst_n) dmem_rdata <= 32'h0;
    else if (dmem_req) begin
      if (dmem_we) begin
        if (dmem_addr == DONE_ADDR) done <= 1'b1;
        else
          for (int i = 0; i < 4; i++)
            if (dmem_be[i]) dmem[dmem_addr[15:2]][8*i +: 8] <= dmem_wdata[8*i +: 8];
      end
      dmem_rdata <= dmem[dmem_addr[15:2]];
    end
  end

  // mechanism counters
  int n_flush = 0, n_miss = 0, n_hit = 0, n_handover = 0, n_dstall = 0;
  int n_fwd = 0, n_taken_ok = 0, n_bad_fill = 0;
  logic [31:0] miss_line;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      if (dut.u_ic.state == ST_FLUSH) n_flush <= n_flush + 1;
      if (dut.u_ic.miss) begin
        n_miss    <= n_miss + 1;
        miss_line <= {dut.u_ic.rq_addr_q[31:4], 4'h0};
      end
      if (dut.u_ic.touch) n_hit <= n_hit + 1;
      if (dut.u_ic.state == ST_MEMREAD && dut.u_ic.fill_we && dut.u_ic.fill_off == dut.u_ic.r_off)
        n_handover <= n_handover + 1;
      if (mm_req && !mm_busy && dut.u_ic.state == ST_MEMREAD &&
          {mm_addr[31:4], 4'h0} != {dut.u_ic.rq_addr_q[31:4], 4'h0})
        n_bad_fill <= n_bad_fill + 1;
      if (dmem_stall) n_dstall <= n_dstall + 1;
      if (dut.u_core.ex_valid && !dut.u_core.freeze &&
          (dut.u_core.ex_fwd_a != mips_pkg::FWD_NONE || dut.u_core.ex_fwd_b != mips_pkg::FWD_NONE))
        n_fwd <= n_fwd + 1;
      if (dut.u_core.ex_valid && !dut.u_core.freeze && dut.u_core.ex_taken && !dut.u_core.mispredict)
        n_taken_ok <= n_taken_ok + 1;
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic happened(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("FAIL mechanism never happened: %s", what);
    end
  endtask

  initial begin
    build(N_SAMPLES, LAGS);
    foreach (imem[i]) imem[i] = 32'h0;
    foreach (dmem[i]) dmem[i] = 32'h0;
    foreach (prog[i]) imem[i] = prog[i];
    for (int i = 0; i < int'(N_SAMPLES); i++) dmem[(X_BASE >> 2) + i] = x_init(i);
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done);
    repeat (10) @(posedge clk);
    foreach (exp_addr[i])
      check($sformatf("mem[%h]", exp_addr[i]), dmem[exp_addr[i][15:2]], exp_val[i]);
    check("flush cycles", 32'(n_flush), 32'd32);
    check("fills outside the missed line", 32'(n_bad_fill), 32'd0);
    check("words fetched = 4 per miss", 32'(n_words), 32'(4 * n_miss));
    happened("cache miss and refill", n_miss);
    happened("cache hit", n_hit);
    happened("missed word handed to IF2 during refill", n_handover);
    happened("main memory busy hold-off", n_busy);
    happened("data memory stall", n_dstall);
    happened("forwarding", n_fwd);
    happened("hazard stall", perf_hazard_stalls);
    happened("misprediction", perf_mispredicts);
    happened("correct taken prediction", n_taken_ok);
    $display("cycles=%0d retired=%0d hazard=%0d memstall=%0d mispred=%0d misses=%0d hits=%0d",
             perf_cycles, perf_retired, perf_hazard_stalls, perf_mem_stalls, perf_mispredicts,
             n_miss, n_hit);
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
