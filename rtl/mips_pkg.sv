// mips_pkg: types and constants shared by the seven-stage MIPS I pipeline.
//
// Holds the MIPS I opcode and function-field encodings (these are the ISA's
// own numbers), the operation selectors of the execute stage, and the
// decoded-control struct that travels down the pipeline next to each
// instruction. The split of the decoded control into these fields, and the
// enums that name them, are this design's own choices.
package mips_pkg;


  // Primary opcodes (instruction bits 31:26)
  localparam logic [5:0] OP_SPECIAL = 6'h00;
  localparam logic [5:0] OP_REGIMM  = 6'h01;
  localparam logic [5:0] OP_J       = 6'h02;
  localparam logic [5:0] OP_JAL     = 6'h03;
  localparam logic [5:0] OP_BEQ     = 6'h04;
  localparam logic [5:0] OP_BNE     = 6'h05;
  localparam logic [5:0] OP_BLEZ    = 6'h06;
  localparam logic [5:0] OP_BGTZ    = 6'h07;
  localparam logic [5:0] OP_ADDI    = 6'h08;
  localparam logic [5:0] OP_ADDIU   = 6'h09;
  localparam logic [5:0] OP_SLTI    = 6'h0A;
  localparam logic [5:0] OP_SLTIU   = 6'h0B;
  localparam logic [5:0] OP_ANDI    = 6'h0C;
  localparam logic [5:0] OP_ORI     = 6'h0D;
  localparam logic [5:0] OP_XORI    = 6'h0E;
  localparam logic [5:0] OP_LUI     = 6'h0F;
  localparam logic [5:0] OP_LB      = 6'h20;
  localparam logic [5:0] OP_LH      = 6'h21;
  localparam logic [5:0] OP_LW      = 6'h23;
  localparam logic [5:0] OP_LBU     = 6'h24;
  localparam logic [5:0] OP_LHU     = 6'h25;
  localparam logic [5:0] OP_SB      = 6'h28;
  localparam logic [5:0] OP_SH      = 6'h29;
  localparam logic [5:0] OP_SW      = 6'h2B;

  // SPECIAL function codes (instruction bits 5:0)
  localparam logic [5:0] FN_SLL   = 6'h00;
  localparam logic [5:0] FN_SRL   = 6'h02;
  localparam logic [5:0] FN_SRA   = 6'h03;
  localparam logic [5:0] FN_SLLV  = 6'h04;
  localparam logic [5:0] FN_SRLV  = 6'h06;
  localparam logic [5:0] FN_SRAV  = 6'h07;
  localparam logic [5:0] FN_JR    = 6'h08;
  localparam logic [5:0] FN_JALR  = 6'h09;
  localparam logic [5:0] FN_MFHI  = 6'h10;
  localparam logic [5:0] FN_MTHI  = 6'h11;
  localparam logic [5:0] FN_MFLO  = 6'h12;
  localparam logic [5:0] FN_MTLO  = 6'h13;
  localparam logic [5:0] FN_MULT  = 6'h18;
  localparam logic [5:0] FN_MULTU = 6'h19;
  localparam logic [5:0] FN_ADD   = 6'h20;
  localparam logic [5:0] FN_ADDU  = 6'h21;
  localparam logic [5:0] FN_SUB   = 6'h22;
  localparam logic [5:0] FN_SUBU  = 6'h23;
  localparam logic [5:0] FN_AND   = 6'h24;
  localparam logic [5:0] FN_OR    = 6'h25;
  localparam logic [5:0] FN_XOR   = 6'h26;
  localparam logic [5:0] FN_NOR   = 6'h27;
  localparam logic [5:0] FN_SLT   = 6'h2A;
  localparam logic [5:0] FN_SLTU  = 6'h2B;

  // REGIMM rt codes (instruction bits 20:16)
  localparam logic [4:0] RI_BLTZ   = 5'h00;
  localparam logic [4:0] RI_BGEZ   = 5'h01;
  localparam logic [4:0] RI_BLTZAL = 5'h10;
  localparam logic [4:0] RI_BGEZAL = 5'h11;

  // ALU operations. Shifts shift operand b by a[4:0].
  typedef enum logic [3:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_NOR,
    ALU_SLT, ALU_SLTU, ALU_SLL, ALU_SRL, ALU_SRA, ALU_LUI
  } alu_op_e;

  typedef enum logic [1:0] { ASEL_RS, ASEL_SHAMT }  a_sel_e;
  typedef enum logic [0:0] { BSEL_RT, BSEL_IMM }    b_sel_e;

  // Control-transfer kind, resolved in the execute stage
  typedef enum logic [3:0] {
    BR_NONE, BR_EQ, BR_NE, BR_LEZ, BR_GTZ, BR_LTZ, BR_GEZ, BR_J, BR_JR
  } br_e;

  // What a pipeline slot writes to its destination register
  typedef enum logic [2:0] { RES_ALU, RES_LINK, RES_HI, RES_LO, RES_MEM } res_e;

  typedef enum logic [1:0] { MSZ_BYTE, MSZ_HALF, MSZ_WORD } msize_e;

  // Operand source chosen by the forwarding logic for the execute stage
  typedef enum logic [1:0] { FWD_NONE, FWD_MEM1, FWD_MEM2, FWD_WB } fwd_e;

  typedef struct packed {
    alu_op_e    alu_op;
    a_sel_e     a_sel;
    b_sel_e     b_sel;
    logic       uses_rs;
    logic       uses_rt;
    logic       reg_write;
    logic [4:0] dest;
    res_e       res_sel;
    logic       mem_read;
    logic       mem_write;
    msize_e     mem_size;
    logic       mem_unsigned;
    br_e        br;
    logic       mult;
    logic       mult_signed;
    logic       mthi;
    logic       mtlo;
    logic       illegal;
  } ctrl_t;

  // What the hazard unit needs to know about an older instruction in flight
  typedef struct packed {
    logic       valid;
    logic       reg_write;
    logic [4:0] dest;
    logic       load;
    logic       writes_hilo;
  } hz_src_t;

  localparam ctrl_t CTRL_NOP = '{
    alu_op: ALU_ADD, a_sel: ASEL_RS, b_sel: BSEL_RT, uses_rs: 1'b0, uses_rt: 1'b0,
    reg_write: 1'b0, dest: 5'd0, res_sel: RES_ALU, mem_read: 1'b0, mem_write: 1'b0,
    mem_size: MSZ_WORD, mem_unsigned: 1'b0, br: BR_NONE, mult: 1'b0,
    mult_signed: 1'b0, mthi: 1'b0, mtlo: 1'b0, illegal: 1'b0
  };

endpackage
