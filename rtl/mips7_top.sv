// mips7_top: seven-stage MIPS I pipeline with its two-cycle instruction cache.
//
// Joins mips7_core to icache. The core's IF1 address goes to the cache, which
// answers in IF2; a cache miss (and the flush after reset) stalls the whole
// pipeline through the core's memory stall input, the same input that an
// external data memory can use through `dmem_stall`. Main memory, behind the
// cache, and data memory are outside: their ports are brought out.
//
// Main memory: `mm_req`/`mm_addr` ask for one word, held off while `mm_busy`
// is high; words return in order on `mm_rdata` with `mm_rvalid`, any number
// of cycles later. Data memory: a request (`dmem_req`, `dmem_we`,
// `dmem_be`, `dmem_addr`, `dmem_wdata`) is issued in MEM1 in a cycle the
// pipeline advances; `dmem_rdata` must hold the read word from the next cycle
// until the next request (one-cycle ideal memory, as the pipeline assumes).
//
// Parameters: BTB_ENTRIES (32 or 128 in the evaluated configurations; 32 is
// the default, being the most energy-efficient), BTB_BYPASS (1 disables the
// buffer, the evaluated "without BTB" pipeline; 0 by default), cache size
// in kB, ways and words per line (2 kB, 4-way, 4 words by default), and the reset PC.
module mips7_top #(
  parameter int unsigned BTB_ENTRIES = 32,
  parameter bit          BTB_BYPASS  = 1'b0,
  parameter int unsigned IC_KB       = 2,
  parameter int unsigned IC_WAYS     = 4,
  parameter int unsigned IC_WORDS    = 4,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // main memory behind the instruction cache
  output logic        mm_req,
  output logic [31:0] mm_addr,
  input  logic        mm_busy,
  input  logic [31:0] mm_rdata,
  input  logic        mm_rvalid,
  // data memory
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  input  logic        dmem_stall,
  // performance counters
  output logic [31:0] perf_cycles,
  output logic [31:0] perf_retired,
  output logic [31:0] perf_hazard_stalls,
  output logic [31:0] perf_mem_stalls,
  output logic [31:0] perf_mispredicts
);

  logic        imem_req, ic_stall;
  logic [31:0] imem_addr, imem_rdata;

  mips7_core #(.BTB_ENTRIES(BTB_ENTRIES), .BTB_BYPASS(BTB_BYPASS), .RESET_PC(RESET_PC)) u_core (
    .clk, .rst_n,
    .imem_req, .imem_addr, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .mem_stall(ic_stall || dmem_stall),
    .perf_cycles, .perf_retired, .perf_hazard_stalls, .perf_mem_stalls, .perf_mispredicts
  );

  icache #(
    .CACHE_KB(IC_KB), .WAYS(IC_WAYS), .ADDR_W(32), .WORDS(IC_WORDS), .DATA_W(32)
  ) u_ic (
    .clk, .rst_n,
    .req      (imem_req),
    .addr     (imem_addr),
    .instr    (imem_rdata),
    .stall    (ic_stall),
    .mm_req, .mm_addr, .mm_busy, .mm_rdata, .mm_rvalid
  );

endmodule
