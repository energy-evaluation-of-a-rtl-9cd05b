// decoder: instruction decoder of the ID stage.
//
// Turns one 32-bit MIPS I instruction into the control struct (mips_pkg::ctrl_t)
// that the later stages consume, the extended immediate, and the static
// target of branches and J/JAL. Purely combinational.
//
// The integer subset follows the MIPS I ISA: ALU register and immediate
// operations, shifts, MULT/MULTU with MFHI/MFLO/MTHI/MTLO, byte/half/word
// loads and stores, BEQ/BNE/BLEZ/BGTZ/BLTZ/BGEZ/BLTZAL/BGEZAL, J/JAL/JR/JALR.
// Choices of this design: no divider (none is described for the pipeline),
// no exceptions (ADD/ADDI/SUB wrap like their unsigned forms), no branch
// delay slot, so links save PC+4. Unknown opcodes decode as a NOP with the
// `illegal` flag set.
module decoder
  import mips_pkg::*;
(
  input  logic [31:0] instr,
  input  logic [31:0] pc,
  output ctrl_t       ctrl,
  output logic [31:0] imm,
  output logic [31:0] target
);

  logic [5:0] op, fn;
  logic [4:0] rt, rd;
  logic [31:0] sext, zext, pc4;

  assign op   = instr[31:26];
  assign rt   = instr[20:16];
  assign rd   = instr[15:11];
  assign fn   = instr[5:0];
  assign sext = {{16{instr[15]}}, instr[15:0]};
  assign zext = {16'd0, instr[15:0]};
  assign pc4  = pc + 32'd4;

  always_comb begin
    ctrl   = CTRL_NOP;
    imm    = sext;
    target = pc4 + {sext[29:0], 2'b00};
    unique case (op)
      OP_SPECIAL: begin
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rd;
        unique case (fn)
          FN_SLL:  begin ctrl.alu_op = ALU_SLL; ctrl.a_sel = ASEL_SHAMT; ctrl.uses_rs = 1'b0; end
          FN_SRL:  begin ctrl.alu_op = ALU_SRL; ctrl.a_sel = ASEL_SHAMT; ctrl.uses_rs = 1'b0; end
          FN_SRA:  begin ctrl.alu_op = ALU_SRA; ctrl.a_sel = ASEL_SHAMT; ctrl.uses_rs = 1'b0; end
          FN_SLLV: ctrl.alu_op = ALU_SLL;
          FN_SRLV: ctrl.alu_op = ALU_SRL;
          FN_SRAV: ctrl.alu_op = ALU_SRA;
          FN_JR: begin
            ctrl.br = BR_JR; ctrl.uses_rt = 1'b0; ctrl.reg_write = 1'b0;
          end
          FN_JALR: begin
            ctrl.br = BR_JR; ctrl.uses_rt = 1'b0; ctrl.res_sel = RES_LINK;
          end
          FN_MFHI: begin
            ctrl.res_sel = RES_HI; ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0;
          end
          FN_MFLO: begin
            ctrl.res_sel = RES_LO; ctrl.uses_rs = 1'b0; ctrl.uses_rt = 1'b0;
          end
          FN_MTHI: begin
            // rs passes through the ALU as rs | 0
            ctrl.alu_op = ALU_OR; ctrl.b_sel = BSEL_IMM; ctrl.uses_rt = 1'b0;
            ctrl.reg_write = 1'b0; ctrl.mthi = 1'b1; imm = 32'd0;
          end
          FN_MTLO: begin
            ctrl.alu_op = ALU_OR; ctrl.b_sel = BSEL_IMM; ctrl.uses_rt = 1'b0;
            ctrl.reg_write = 1'b0; ctrl.mtlo = 1'b1; imm = 32'd0;
          end
          FN_MULT:  begin ctrl.mult = 1'b1; ctrl.mult_signed = 1'b1; ctrl.reg_write = 1'b0; end
          FN_MULTU: begin ctrl.mult = 1'b1; ctrl.reg_write = 1'b0; end
          FN_ADD, FN_ADDU: ctrl.alu_op = ALU_ADD;
          FN_SUB, FN_SUBU: ctrl.alu_op = ALU_SUB;
          FN_AND:  ctrl.alu_op = ALU_AND;
          FN_OR:   ctrl.alu_op = ALU_OR;
          FN_XOR:  ctrl.alu_op = ALU_XOR;
          FN_NOR:  ctrl.alu_op = ALU_NOR;
          FN_SLT:  ctrl.alu_op = ALU_SLT;
          FN_SLTU: ctrl.alu_op = ALU_SLTU;
          default: begin ctrl = CTRL_NOP; ctrl.illegal = 1'b1; end
        endcase
      end
      OP_REGIMM: begin
        ctrl.uses_rs = 1'b1;
        unique case (rt)
          RI_BLTZ:   ctrl.br = BR_LTZ;
          RI_BGEZ:   ctrl.br = BR_GEZ;
          RI_BLTZAL: begin ctrl.br = BR_LTZ; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.res_sel = RES_LINK; end
          RI_BGEZAL: begin ctrl.br = BR_GEZ; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.res_sel = RES_LINK; end
          default:   begin ctrl = CTRL_NOP; ctrl.illegal = 1'b1; end
        endcase
      end
      OP_J: begin
        ctrl.br = BR_J;
        target  = {pc4[31:28], instr[25:0], 2'b00};
      end
      OP_JAL: begin
        ctrl.br = BR_J; ctrl.reg_write = 1'b1; ctrl.dest = 5'd31; ctrl.res_sel = RES_LINK;
        target  = {pc4[31:28], instr[25:0], 2'b00};
      end
      OP_BEQ:  begin ctrl.br = BR_EQ;  ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      OP_BNE:  begin ctrl.br = BR_NE;  ctrl.uses_rs = 1'b1; ctrl.uses_rt = 1'b1; end
      OP_BLEZ: begin ctrl.br = BR_LEZ; ctrl.uses_rs = 1'b1; end
      OP_BGTZ: begin ctrl.br = BR_GTZ; ctrl.uses_rs = 1'b1; end
      OP_ADDI, OP_ADDIU, OP_SLTI, OP_SLTIU, OP_ANDI, OP_ORI, OP_XORI, OP_LUI: begin
        ctrl.uses_rs   = (op != OP_LUI);
        ctrl.b_sel     = BSEL_IMM;
        ctrl.reg_write = 1'b1;
        ctrl.dest      = rt;
        unique case (op)
          OP_SLTI:  ctrl.alu_op = ALU_SLT;
          OP_SLTIU: ctrl.alu_op = ALU_SLTU;
          OP_ANDI:  begin ctrl.alu_op = ALU_AND; imm = zext; end
          OP_ORI:   begin ctrl.alu_op = ALU_OR;  imm = zext; end
          OP_XORI:  begin ctrl.alu_op = ALU_XOR; imm = zext; end
          OP_LUI:   begin ctrl.alu_op = ALU_LUI; imm = zext; end
          default:  ctrl.alu_op = ALU_ADD;
        endcase
      end
      OP_LB, OP_LH, OP_LW, OP_LBU, OP_LHU: begin
        ctrl.uses_rs      = 1'b1;
        ctrl.b_sel        = BSEL_IMM;
        ctrl.reg_write    = 1'b1;
        ctrl.dest         = rt;
        ctrl.res_sel      = RES_MEM;
        ctrl.mem_read     = 1'b1;
        ctrl.mem_unsigned = (op == OP_LBU) || (op == OP_LHU);
        ctrl.mem_size     = (op == OP_LW) ? MSZ_WORD :
                            ((op == OP_LH) || (op == OP_LHU)) ? MSZ_HALF : MSZ_BYTE;
      end
      OP_SB, OP_SH, OP_SW: begin
        ctrl.uses_rs   = 1'b1;
        ctrl.uses_rt   = 1'b1;
        ctrl.b_sel     = BSEL_IMM;
        ctrl.mem_write = 1'b1;
        ctrl.mem_size  = (op == OP_SW) ? MSZ_WORD : (op == OP_SH) ? MSZ_HALF : MSZ_BYTE;
      end
      default: ctrl.illegal = 1'b1;
    endcase
    // register 0 is never written
    if (ctrl.dest == 5'd0) ctrl.reg_write = 1'b0;
  end

endmodule
