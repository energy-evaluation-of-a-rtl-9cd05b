// mips7_core: seven-stage, in-order, single-issue MIPS I integer pipeline.
//
// Stages: IF1 IF2 ID EX MEM1 MEM2 WB. Instruction fetch and memory access each
// take two stages so that both memories get two-cycle access: IF1 and MEM1
// present an address, IF2 and MEM2 receive the data one cycle later. With no
// stalls one instruction retires per cycle from the seventh cycle on.
//
//   IF1   PC register; drives imem_addr; looks the PC up in the branch
//         predictor and picks the next PC (predicted target or PC+4).
//   IF2   takes the instruction word from imem_rdata.
//   ID    decoder, register file read, HI/LO read, hazard detection and the
//         forwarding selects (hazard_unit).
//   EX    operand forwarding muxes, ALU, address generation, control-transfer
//         resolution, multiplier stage 1.
//   MEM1  drives the data memory request; multiplier stage 2.
//   MEM2  receives load data, aligns and extends it; multiplier stage 3.
//   WB    writes the register file and HI/LO.
//
// Control flow: every fetch carries the PC the predictor chose after it. EX
// computes the real next PC of each instruction; a mismatch flushes IF2, ID
// and the slot entering EX (3 lost cycles) and restarts IF1 at the right PC.
// The predictor is trained one cycle later from the EX/MEM1 register. There
// is no branch delay slot.
//
// Stalls: `mem_stall` (from the memories) freezes every stage, the
// multiplier and the predictor update. A data hazard found in ID (load-use,
// or MFHI/MFLO behind an unfinished HI/LO writer) holds IF1..ID and sends a
// bubble into EX.
//
// Memory ports: both are requests with one-cycle-latency read data.
// imem_req/dmem_req pulse only in cycles where the pipeline advances, and a
// memory must update its read-data register only on a request, so the data a
// stalled IF2 or MEM2 waits for stays put. Data memory is byte addressed,
// little-endian, with byte enables.
//
// Performance counters count cycles, retired instructions, hazard stall
// cycles, memory stall cycles and mispredictions.
//
// Parameters: BTB_ENTRIES (32 by default), BTB_BYPASS (1 turns the buffer
// off, so every transfer is predicted not taken) and the reset PC.
//
// Follows the described pipeline: the seven stages, the three-stage
// multiplier spanning EX/MEM1/MEM2, hazard detection and forwarding decided
// in decode, no branch delay slot, branch prediction trained from the EX/MEM1
// register, and ideal one-cycle memories. This design's own choices: the
// predictor is looked up with the IF1 PC (the block diagram attaches it to
// IF2), control transfers resolve in EX, the forwarding network and hazard
// rules, the data address leaves from MEM1, little-endian byte order, and
// the counters.
module mips7_core
  import mips_pkg::*;
#(
  parameter int unsigned BTB_ENTRIES = 32,
  parameter bit          BTB_BYPASS  = 1'b0,
  parameter logic [31:0] RESET_PC    = 32'h0000_0000
) (
  input  logic        clk,
  input  logic        rst_n,
  // instruction memory
  output logic        imem_req,
  output logic [31:0] imem_addr,
  input  logic [31:0] imem_rdata,
  // data memory
  output logic        dmem_req,
  output logic        dmem_we,
  output logic [3:0]  dmem_be,
  output logic [31:0] dmem_addr,
  output logic [31:0] dmem_wdata,
  input  logic [31:0] dmem_rdata,
  // stall from the memories: freezes the whole pipeline
  input  logic        mem_stall,
  // performance counters
  output logic [31:0] perf_cycles,
  output logic [31:0] perf_retired,
  output logic [31:0] perf_hazard_stalls,
  output logic [31:0] perf_mem_stalls,
  output logic [31:0] perf_mispredicts
);

  logic freeze, hazard_stall, hz_stall_raw, mispredict;

  assign freeze = mem_stall;

  // ---------------------------------------------------------------- IF1
  logic [31:0] pc_q, if1_next;
  logic        bp_taken;
  logic [31:0] bp_target;
  logic        upd_en;
  logic [31:0] ex_actual_next;

  // ---------------------------------------------------------------- pipeline registers
  logic        if2_valid;
  logic [31:0] if2_pc, if2_pred;

  logic        id_valid;
  logic [31:0] id_pc, id_pred, id_instr;

  logic        ex_valid;
  ctrl_t       ex_ctrl;
  logic [31:0] ex_pc, ex_pred, ex_rs_val, ex_rt_val, ex_imm, ex_target, ex_hilo;
  logic [4:0]  ex_shamt;
  fwd_e        ex_fwd_a, ex_fwd_b;

  logic        m1_valid;
  ctrl_t       m1_ctrl;
  logic [31:0] m1_pc, m1_result, m1_store, m1_target;
  logic        m1_taken;

  logic        m2_valid;
  ctrl_t       m2_ctrl;
  logic [31:0] m2_result;

  logic        wb_valid;
  ctrl_t       wb_ctrl;
  logic [31:0] wb_result;

  // ---------------------------------------------------------------- IF1
  branch_predictor #(.BTB_ENTRIES(BTB_ENTRIES), .BTB_BYPASS(BTB_BYPASS)) u_bp (
    .clk, .rst_n,
    .lookup_pc  (pc_q),
    .pred_taken (bp_taken),
    .pred_target(bp_target),
    .btb_hit    (),
    .upd_en     (upd_en),
    .upd_pc     (m1_pc),
    .upd_taken  (m1_taken),
    .upd_target (m1_target)
  );

  assign if1_next  = bp_taken ? bp_target : pc_q + 32'd4;
  assign imem_addr = pc_q;
  assign imem_req  = !freeze && !hazard_stall;
  assign upd_en    = m1_valid && (m1_ctrl.br != BR_NONE) && !freeze;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q      <= RESET_PC;
      if2_valid <= 1'b0;
      if2_pc    <= '0;
      if2_pred  <= '0;
    end else if (!freeze) begin
      if (mispredict) begin
        pc_q      <= ex_actual_next;
        if2_valid <= 1'b0;
      end else if (!hazard_stall) begin
        pc_q      <= if1_next;
        if2_valid <= 1'b1;
        if2_pc    <= pc_q;
        if2_pred  <= if1_next;
      end
    end
  end

  // ---------------------------------------------------------------- IF2 -> ID
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      id_valid <= 1'b0;
      id_pc    <= '0;
      id_pred  <= '0;
      id_instr <= '0;
    end else if (!freeze) begin
      if (mispredict) begin
        id_valid <= 1'b0;
      end else if (!hazard_stall) begin
        id_valid <= if2_valid;
        id_pc    <= if2_pc;
        id_pred  <= if2_pred;
        id_instr <= imem_rdata;
      end
    end
  end

  // ---------------------------------------------------------------- ID
  ctrl_t       id_ctrl;
  logic [31:0] id_imm, id_target, rf_rd1, rf_rd2, id_hilo;
  logic [31:0] hi_q, lo_q, hi_now, lo_now;
  fwd_e        id_fwd_a, id_fwd_b;
  logic [63:0] mul_p;
  hz_src_t     hz_ex, hz_m1, hz_m2;

  decoder u_dec (
    .instr (id_instr),
    .pc    (id_pc),
    .ctrl  (id_ctrl),
    .imm   (id_imm),
    .target(id_target)
  );

  regfile #(.WIDTH(32), .NREGS(32)) u_rf (
    .clk, .rst_n,
    .ra1(id_instr[25:21]), .ra2(id_instr[20:16]),
    .rd1(rf_rd1),          .rd2(rf_rd2),
    .we (wb_valid && wb_ctrl.reg_write),
    .wa (wb_ctrl.dest),
    .wd (wb_result)
  );

  // HI/LO as they will be after this cycle's write-back
  always_comb begin
    hi_now = hi_q;
    lo_now = lo_q;
    if (wb_valid && wb_ctrl.mult) begin
      hi_now = mul_p[63:32];
      lo_now = mul_p[31:0];
    end
    if (wb_valid && wb_ctrl.mthi) hi_now = wb_result;
    if (wb_valid && wb_ctrl.mtlo) lo_now = wb_result;
  end
  assign id_hilo = (id_ctrl.res_sel == RES_HI) ? hi_now : lo_now;

  function automatic hz_src_t hz_of(logic v, ctrl_t c);
    hz_src_t s;
    s.valid       = v;
    s.reg_write   = c.reg_write;
    s.dest        = c.dest;
    s.load        = c.mem_read;
    s.writes_hilo = c.mult | c.mthi | c.mtlo;
    return s;
  endfunction

  assign hz_ex = hz_of(ex_valid, ex_ctrl);
  assign hz_m1 = hz_of(m1_valid, m1_ctrl);
  assign hz_m2 = hz_of(m2_valid, m2_ctrl);

  hazard_unit u_hz (
    .id_valid     (id_valid),
    .id_rs        (id_instr[25:21]),
    .id_rt        (id_instr[20:16]),
    .id_uses_rs   (id_ctrl.uses_rs),
    .id_uses_rt   (id_ctrl.uses_rt),
    .id_reads_hilo((id_ctrl.res_sel == RES_HI) || (id_ctrl.res_sel == RES_LO)),
    .ex           (hz_ex),
    .mem1         (hz_m1),
    .mem2         (hz_m2),
    .stall        (hz_stall_raw),
    .fwd_a        (id_fwd_a),
    .fwd_b        (id_fwd_b)
  );

  // a flushed decode slot cannot stall
  assign hazard_stall = hz_stall_raw && !mispredict;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ex_valid  <= 1'b0;
      ex_ctrl   <= CTRL_NOP;
      ex_pc     <= '0;
      ex_pred   <= '0;
      ex_rs_val <= '0;
      ex_rt_val <= '0;
      ex_imm    <= '0;
      ex_target <= '0;
      ex_hilo   <= '0;
      ex_shamt  <= '0;
      ex_fwd_a  <= FWD_NONE;
      ex_fwd_b  <= FWD_NONE;
    end else if (!freeze) begin
      ex_valid  <= id_valid && !mispredict && !hazard_stall;
      ex_ctrl   <= id_ctrl;
      ex_pc     <= id_pc;
      ex_pred   <= id_pred;
      ex_rs_val <= rf_rd1;
      ex_rt_val <= rf_rd2;
      ex_imm    <= id_imm;
      ex_target <= id_target;
      ex_hilo   <= id_hilo;
      ex_shamt  <= id_instr[10:6];
      ex_fwd_a  <= id_fwd_a;
      ex_fwd_b  <= id_fwd_b;
    end
  end

  // ---------------------------------------------------------------- EX
  logic [31:0] ex_a, ex_b, alu_a, alu_b, alu_y, ex_result, ex_pc4, ex_tgt;
  logic        ex_taken;

  function automatic logic [31:0] fwd_mux(fwd_e sel, logic [31:0] reg_val,
                                          logic [31:0] v_m1, logic [31:0] v_m2,
                                          logic [31:0] v_wb);
    unique case (sel)
      FWD_MEM1: return v_m1;
      FWD_MEM2: return v_m2;
      FWD_WB:   return v_wb;
      default:  return reg_val;
    endcase
  endfunction

  assign ex_a  = fwd_mux(ex_fwd_a, ex_rs_val, m1_result, m2_result, wb_result);
  assign ex_b  = fwd_mux(ex_fwd_b, ex_rt_val, m1_result, m2_result, wb_result);
  assign alu_a = (ex_ctrl.a_sel == ASEL_SHAMT) ? {27'd0, ex_shamt} : ex_a;
  assign alu_b = (ex_ctrl.b_sel == BSEL_IMM) ? ex_imm : ex_b;

  alu u_alu (.op(ex_ctrl.alu_op), .a(alu_a), .b(alu_b), .y(alu_y));

  assign ex_pc4 = ex_pc + 32'd4;

  always_comb begin
    unique case (ex_ctrl.br)
      BR_EQ:   ex_taken = (ex_a == ex_b);
      BR_NE:   ex_taken = (ex_a != ex_b);
      BR_LEZ:  ex_taken = ex_a[31] || (ex_a == 32'd0);
      BR_GTZ:  ex_taken = !ex_a[31] && (ex_a != 32'd0);
      BR_LTZ:  ex_taken = ex_a[31];
      BR_GEZ:  ex_taken = !ex_a[31];
      BR_J,
      BR_JR:   ex_taken = 1'b1;
      default: ex_taken = 1'b0;
    endcase
    ex_tgt         = (ex_ctrl.br == BR_JR) ? ex_a : ex_target;
    ex_actual_next = ex_taken ? ex_tgt : ex_pc4;
    unique case (ex_ctrl.res_sel)
      RES_LINK:       ex_result = ex_pc4;
      RES_HI, RES_LO: ex_result = ex_hilo;
      default:        ex_result = alu_y;
    endcase
  end

  assign mispredict = ex_valid && (ex_actual_next != ex_pred);

  mult_pipe3 u_mul (
    .clk, .rst_n,
    .en       (!freeze),
    .is_signed(ex_ctrl.mult_signed),
    .a        (ex_a),
    .b        (ex_b),
    .p        (mul_p)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m1_valid  <= 1'b0;
      m1_ctrl   <= CTRL_NOP;
      m1_pc     <= '0;
      m1_result <= '0;
      m1_store  <= '0;
      m1_target <= '0;
      m1_taken  <= 1'b0;
    end else if (!freeze) begin
      m1_valid  <= ex_valid;
      m1_ctrl   <= ex_ctrl;
      m1_pc     <= ex_pc;
      m1_result <= ex_result;
      m1_store  <= ex_b;
      m1_target <= ex_tgt;
      m1_taken  <= ex_taken;
    end
  end

  // ---------------------------------------------------------------- MEM1
  always_comb begin
    dmem_req   = m1_valid && (m1_ctrl.mem_read || m1_ctrl.mem_write) && !freeze;
    dmem_we    = m1_ctrl.mem_write;
    dmem_addr  = m1_result;
    unique case (m1_ctrl.mem_size)
      MSZ_BYTE: begin
        dmem_be    = 4'b0001 << m1_result[1:0];
        dmem_wdata = {4{m1_store[7:0]}};
      end
      MSZ_HALF: begin
        dmem_be    = m1_result[1] ? 4'b1100 : 4'b0011;
        dmem_wdata = {2{m1_store[15:0]}};
      end
      default: begin
        dmem_be    = 4'b1111;
        dmem_wdata = m1_store;
      end
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      m2_valid  <= 1'b0;
      m2_ctrl   <= CTRL_NOP;
      m2_result <= '0;
    end else if (!freeze) begin
      m2_valid  <= m1_valid;
      m2_ctrl   <= m1_ctrl;
      m2_result <= m1_result;
    end
  end

  // ---------------------------------------------------------------- MEM2
  logic [31:0] m2_load, m2_final;
  logic [7:0]  ld_byte;
  logic [15:0] ld_half;

  always_comb begin
    ld_byte = dmem_rdata[8*m2_result[1:0] +: 8];
    ld_half = m2_result[1] ? dmem_rdata[31:16] : dmem_rdata[15:0];
    unique case (m2_ctrl.mem_size)
      MSZ_BYTE: m2_load = m2_ctrl.mem_unsigned ? {24'd0, ld_byte} : {{24{ld_byte[7]}}, ld_byte};
      MSZ_HALF: m2_load = m2_ctrl.mem_unsigned ? {16'd0, ld_half} : {{16{ld_half[15]}}, ld_half};
      default:  m2_load = dmem_rdata;
    endcase
    m2_final = m2_ctrl.mem_read ? m2_load : m2_result;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wb_valid  <= 1'b0;
      wb_ctrl   <= CTRL_NOP;
      wb_result <= '0;
    end else if (!freeze) begin
      wb_valid  <= m2_valid;
      wb_ctrl   <= m2_ctrl;
      wb_result <= m2_final;
    end
  end

  // ---------------------------------------------------------------- WB
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hi_q <= '0;
      lo_q <= '0;
    end else begin
      hi_q <= hi_now;
      lo_q <= lo_now;
    end
  end

  // ---------------------------------------------------------------- counters
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf_cycles        <= '0;
      perf_retired       <= '0;
      perf_hazard_stalls <= '0;
      perf_mem_stalls    <= '0;
      perf_mispredicts   <= '0;
    end else begin
      perf_cycles <= perf_cycles + 32'd1;
      if (freeze) perf_mem_stalls <= perf_mem_stalls + 32'd1;
      else begin
        if (wb_valid)     perf_retired       <= perf_retired + 32'd1;
        if (hazard_stall) perf_hazard_stalls <= perf_hazard_stalls + 32'd1;
        if (mispredict)   perf_mispredicts   <= perf_mispredicts + 32'd1;
      end
    end
  end

endmodule
