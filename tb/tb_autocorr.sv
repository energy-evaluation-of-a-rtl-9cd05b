// tb_autocorr: autocorrelation workload on the evaluated BTB configurations.
//
// Runs the same program, whose main part is an autocorrelation kernel
// r[lag] = sum_i x[i]*x[i+lag] over N_SAMPLES samples and LAGS lags, on three
// pipelines side by side on ideal one-cycle memories: one with a 32-entry
// and one with a 128-entry branch target buffer, and one with the buffer
// bypassed (the "seven-stage pipeline without BTB"). All must leave every
// expected word in data memory (results computed in the testbench). The
// kernel's loop branches fit in either buffer without conflicts, so the two
// sizes must take the same number of cycles and mispredict equally often;
// each must keep more than one instruction in two cycles on average, despite
// the load-use and HI/LO stalls of the inner loop. Without the buffer every
// taken loop branch is a misprediction, so that pipeline must need more
// cycles, as the document reports for its benchmarks (it gives 10-25% over
// the five-stage baseline, which is not built here, so only the direction is
// checked). Cycle counts, retired instructions, hazard stalls and
// mispredictions are printed.
module tb_autocorr;
  import mips_asm_pkg::*;

  localparam int unsigned N_SAMPLES = 128;
  localparam int unsigned LAGS      = 32;
  localparam int unsigned MAX_CYC   = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic        done32, done128, done0;
  logic [31:0] cyc32, ret32, hz32, mp32, cyc128, ret128, hz128, mp128;
  logic [31:0] cyc0, ret0, hz0, mp0;
  logic [31:0] c32, c128, c0, r32, r128, r0;
  int checks = 0, failures = 0;

  core_on_ideal_mem #(.BTB_ENTRIES(32)) u32 (
    .clk, .rst_n, .done(done32), .cycles(cyc32), .retired(ret32),
    .hazard_stalls(hz32), .mispredicts(mp32));
  core_on_ideal_mem #(.BTB_ENTRIES(128)) u128 (
    .clk, .rst_n, .done(done128), .cycles(cyc128), .retired(ret128),
    .hazard_stalls(hz128), .mispredicts(mp128));
  core_on_ideal_mem #(.BTB_ENTRIES(32), .BTB_BYPASS(1'b1)) u0 (
    .clk, .rst_n, .done(done0), .cycles(cyc0), .retired(ret0),
    .hazard_stalls(hz0), .mispredicts(mp0));

  always #5 clk = ~clk;

  // cycle (and retirement) count at the moment each one finished
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      c32  <= 32'h0;
      c128 <= 32'h0;
      c0   <= 32'h0;
      r32  <= 32'h0;
      r128 <= 32'h0;
      r0   <= 32'h0;
    end else begin
      if (done0 && c0 == 0)     begin c0 <= cyc0; r0 <= ret0; end
      if (done32 && c32 == 0)   r32  <= ret32;
      if (done128 && c128 == 0) r128 <= ret128;
      if (done32 && c32 == 0)   c32  <= cyc32;
      if (done128 && c128 == 0) c128 <= cyc128;
    end
  end

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    build(N_SAMPLES, LAGS);
    foreach (u32.imem[i]) begin u32.imem[i] = 32'h0; u128.imem[i] = 32'h0; u0.imem[i] = 32'h0; end
    foreach (u32.dmem[i]) begin u32.dmem[i] = 32'h0; u128.dmem[i] = 32'h0; u0.dmem[i] = 32'h0; end
    foreach (prog[i]) begin u32.imem[i] = prog[i]; u128.imem[i] = prog[i]; u0.imem[i] = prog[i]; end
    for (int i = 0; i < int'(N_SAMPLES); i++) begin
      u32.dmem[(X_BASE >> 2) + i]  = x_init(i);
      u128.dmem[(X_BASE >> 2) + i] = x_init(i);
      u0.dmem[(X_BASE >> 2) + i]   = x_init(i);
    end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (done32 && done128 && done0);
    repeat (10) @(posedge clk);
    foreach (exp_addr[i]) begin
      check($sformatf("32-entry mem[%h]", exp_addr[i]), u32.dmem[exp_addr[i][15:2]], exp_val[i]);
      check($sformatf("128-entry mem[%h]", exp_addr[i]), u128.dmem[exp_addr[i][15:2]], exp_val[i]);
      check($sformatf("no-BTB mem[%h]", exp_addr[i]), u0.dmem[exp_addr[i][15:2]], exp_val[i]);
    end
    check("same cycle count", c128, c32);
    check("same mispredictions", mp128, mp32);
    checks++;
    if (2 * r32 <= c32) begin failures++; $display("FAIL retired %0d in %0d cycles", r32, c32); end
    checks++;
    if (mp32 == 0 || hz32 == 0) begin failures++; $display("FAIL no misprediction or hazard stall"); end
    check("same instructions retired without BTB", r0, r32);
    checks++;
    if (c0 <= c32 || mp0 <= mp32) begin
      failures++;
      $display("FAIL no-BTB pipeline not slower: %0d vs %0d cycles", c0, c32);
    end
    $display("program: %0d words", prog.size());
    $display("32-entry:  cycles=%0d retired=%0d hazard_stalls=%0d mispredicts=%0d", c32, r32, hz32, mp32);
    $display("128-entry: cycles=%0d retired=%0d hazard_stalls=%0d mispredicts=%0d", c128, r128, hz128, mp128);
    $display("no BTB:    cycles=%0d retired=%0d hazard_stalls=%0d mispredicts=%0d", c0, r0, hz0, mp0);
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
