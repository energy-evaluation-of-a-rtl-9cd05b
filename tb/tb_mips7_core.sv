// tb_mips7_core: runs the self-checking program on the seven-stage pipeline
// with ideal one-cycle instruction and data memories.
//
// The program (mips_asm_pkg) covers every implemented instruction and ends
// with an autocorrelation loop nest. After the done store the testbench
// compares every expected data-memory word. It also checks timing: the first
// instruction retires in the seventh cycle and straight-line code then
// retires one instruction per cycle. After that window, random memory stalls
// freeze the pipeline, which must not change any result. Forwarding, load-use
// and HI/LO stalls, mispredictions and correctly predicted taken transfers
// must each happen at least once.
module tb_mips7_core;
  import mips_asm_pkg::*;

  localparam int unsigned N_SAMPLES = 16;
  localparam int unsigned LAGS      = 4;
  localparam int unsigned MAX_CYC   = 200000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        imem_req, dmem_req, dmem_we, mem_stall;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata;
  logic [3:0]  dmem_be;
  logic [31:0] perf_cycles, perf_retired, perf_hazard_stalls, perf_mem_stalls, perf_mispredicts;

  int checks = 0, failures = 0;

  mips7_core dut (
    .clk, .rst_n,
    .imem_req, .imem_addr, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .mem_stall,
    .perf_cycles, .perf_retired, .perf_hazard_stalls, .perf_mem_stalls, .perf_mispredicts
  );

  always #5 clk = ~clk;

  // ideal memories: read data registered on a request
  logic [31:0] imem [4096];
  logic [31:0] dmem [16384];
  logic        done = 1'b0;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      imem_rdata <= 32'h0;
      dmem_rdata <= 32'h0;
    end else begin
    if (imem_req) imem_rdata <= imem[imem_addr[13:2]];
    if (dmem_req) begin
      if (dmem_we) begin
        if (dmem_addr == DONE_ADDR) done <= 1'b1;
        else
          for (int i = 0; i < 4; i++)
            if (dmem_be[i]) dmem[dmem_addr[15:2]][8*i +: 8] <= dmem_wdata[8*i +: 8];
      end
      dmem_rdata <= dmem[dmem_addr[15:2]];
    end
    end
  end

  // mechanism counters
  int n_fwd = 0, n_pred_taken_ok = 0, n_cyc = 0, first_retire = 0;
  logic stall_phase = 1'b0;

  always_ff @(posedge clk) begin
    if (rst_n) begin
      n_cyc <= n_cyc + 1;
      if (dut.ex_valid && !mem_stall && (dut.ex_fwd_a != mips_pkg::FWD_NONE || dut.ex_fwd_b != mips_pkg::FWD_NONE))
        n_fwd <= n_fwd + 1;
      if (dut.ex_valid && !mem_stall && dut.ex_taken && !dut.mispredict)
        n_pred_taken_ok <= n_pred_taken_ok + 1;
      if (dut.wb_valid && first_retire == 0) first_retire <= n_cyc + 1;
    end
  end

  always_ff @(posedge clk) mem_stall <= rst_n && stall_phase && (($urandom % 8) == 0);

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
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
    // timing window: cycles 7..26 retire one instruction per cycle
    repeat (26) @(posedge clk);
    #1;
    check("first retirement cycle", 32'(first_retire), 32'd7);
    check("retired after 26 cycles", perf_retired, 32'd20);
    stall_phase = 1'b1;
    wait (done);
    repeat (10) @(posedge clk);
    foreach (exp_addr[i])
      check($sformatf("mem[%h]", exp_addr[i]), dmem[exp_addr[i][15:2]], exp_val[i]);
    checks++; if (n_fwd == 0)              begin failures++; $display("FAIL no forwarding"); end
    checks++; if (perf_hazard_stalls == 0) begin failures++; $display("FAIL no hazard stall"); end
    checks++; if (perf_mispredicts == 0)   begin failures++; $display("FAIL no misprediction"); end
    checks++; if (n_pred_taken_ok == 0)    begin failures++; $display("FAIL no correct taken prediction"); end
    checks++; if (perf_mem_stalls == 0)    begin failures++; $display("FAIL no memory stall"); end
    $display("cycles=%0d retired=%0d hazard_stalls=%0d mem_stalls=%0d mispredicts=%0d fwd=%0d taken_ok=%0d",
             perf_cycles, perf_retired, perf_hazard_stalls, perf_mem_stalls, perf_mispredicts,
             n_fwd, n_pred_taken_ok);
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
