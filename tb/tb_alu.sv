// tb_alu: self-checking test of the execute-stage ALU.
//
// Every operation is driven with random operands, and with corner values
// (zero, the most negative number, all ones), and the result is compared with
// a reference written from the MIPS I definitions of the instructions.
module tb_alu;
  import mips_pkg::*;
  localparam int unsigned MAX_CYC = 100000;

  logic        clk = 1'b0;
  alu_op_e     op;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  alu dut (.op, .a, .b, .y);

  always #5 clk = ~clk;

  function automatic logic [31:0] ref_alu(alu_op_e o, logic [31:0] x, logic [31:0] z);
    logic [31:0] r;
    int s;
    s = int'(x[4:0]);
    case (o)
      ALU_ADD:  r = x + z;
      ALU_SUB:  r = x + ~z + 32'd1;
      ALU_AND:  r = x & z;
      ALU_OR:   r = x | z;
      ALU_XOR:  r = x ^ z;
      ALU_NOR:  r = ~x & ~z;
      ALU_SLT:  r = ((x[31] && !z[31]) || (x[31] == z[31] && x < z)) ? 32'd1 : 32'd0;
      ALU_SLTU: r = (x < z) ? 32'd1 : 32'd0;
      ALU_SLL:  begin r = z; repeat (s) r = {r[30:0], 1'b0}; end
      ALU_SRL:  begin r = z; repeat (s) r = {1'b0, r[31:1]}; end
      ALU_SRA:  begin r = z; repeat (s) r = {r[31], r[31:1]}; end
      ALU_LUI:  r = z * 32'h10000;
      default:  r = 32'd0;
    endcase
    return r;
  endfunction

  function automatic logic [31:0] pick_val();
    case ($urandom % 6)
      0: return 32'd0;
      1: return 32'h8000_0000;
      2: return 32'hFFFF_FFFF;
      3: return 32'h7FFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    for (int i = 0; i < 20000; i++) begin
      op = alu_op_e'($urandom % 12);
      a  = pick_val();
      b  = pick_val();
      #1;
      checks++;
      if (y !== ref_alu(op, a, b)) begin
        failures++;
        if (failures < 10) $display("FAIL %s a=%h b=%h y=%h expected %h", op.name(), a, b, y, ref_alu(op, a, b));
      end
    end
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
