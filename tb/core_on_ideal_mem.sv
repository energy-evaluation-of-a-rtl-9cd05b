// core_on_ideal_mem: testbench harness that runs one mips7_core on ideal
// one-cycle instruction and data memories.
//
// The memories are plain arrays that the enclosing testbench fills through
// hierarchical references (imem, dmem) before releasing reset. Reads return
// the addressed word in the cycle after a request, as the core expects. A
// store to DONE_ADDR raises `done` instead of writing memory. The BTB size
// is a parameter so that one testbench can run several configurations side
// by side.
module core_on_ideal_mem #(
  parameter int unsigned BTB_ENTRIES = 32,
  parameter bit          BTB_BYPASS  = 1'b0
) (
  input  logic        clk,
  input  logic        rst_n,
  output logic        done,
  output logic [31:0] cycles,
  output logic [31:0] retired,
  output logic [31:0] hazard_stalls,
  output logic [31:0] mispredicts
);
  import mips_asm_pkg::*;

  logic        imem_req, dmem_req, dmem_we;
  logic [31:0] imem_addr, imem_rdata, dmem_addr, dmem_wdata, dmem_rdata, mem_stalls;
  logic [3:0]  dmem_be;

  logic [31:0] imem [4096];
  logic [31:0] dmem [16384];

  mips7_core #(.BTB_ENTRIES(BTB_ENTRIES), .BTB_BYPASS(BTB_BYPASS)) u_core (
    .clk, .rst_n,
    .imem_req, .imem_addr, .imem_rdata,
    .dmem_req, .dmem_we, .dmem_be, .dmem_addr, .dmem_wdata, .dmem_rdata,
    .mem_stall(1'b0),
    .perf_cycles(cycles), .perf_retired(retired), .perf_hazard_stalls(hazard_stalls),
    .perf_mem_stalls(mem_stalls), .perf_mispredicts(mispredicts)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      imem_rdata <= 32'h0;
      dmem_rdata <= 32'h0;
      done       <= 1'b0;
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
endmodule
