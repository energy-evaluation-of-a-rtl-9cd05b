// alu: arithmetic logic unit of the EX stage.
//
// Combinational 32-bit unit for the MIPS I integer operations: add, subtract,
// and, or, xor, nor, signed and unsigned set-less-than, logical and
// arithmetic shifts, and load-upper-immediate. Shifts move operand b by
// a[4:0], so the execute stage feeds the shift amount (instruction field or
// rs) on a. Additions wrap; the pipeline raises no overflow exception, as it
// supports no exceptions at all.
module alu
  import mips_pkg::*;
(
  input  alu_op_e     op,
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic [4:0] sh;
  assign sh = a[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_NOR:  y = ~(a | b);
      ALU_SLT:  y = {31'd0, $signed(a) < $signed(b)};
      ALU_SLTU: y = {31'd0, a < b};
      ALU_SLL:  y = b << sh;
      ALU_SRL:  y = b >> sh;
      ALU_SRA:  y = $unsigned($signed(b) >>> sh);
      ALU_LUI:  y = {b[15:0], 16'd0};
      default:  y = '0;
    endcase
  end

endmodule
