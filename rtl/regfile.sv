// regfile: general-purpose register file of the ID stage.
//
// NREGS registers of WIDTH bits (32 x 32 for MIPS I), two asynchronous read
// ports used by the decode stage and one synchronous write port driven by the
// write-back stage. Register 0 reads as zero and ignores writes. A write and a
// read of the same register in one cycle return the value being written, so
// an instruction in decode sees the result retiring in write-back that cycle
// (this write-through is a choice of this design; it closes the one gap the
// execute-stage forwarding paths do not cover). Registers clear on reset.
module regfile #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned NREGS = 32
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [$clog2(NREGS)-1:0] ra1,
  input  logic [$clog2(NREGS)-1:0] ra2,
  output logic [WIDTH-1:0]         rd1,
  output logic [WIDTH-1:0]         rd2,
  input  logic                     we,
  input  logic [$clog2(NREGS)-1:0] wa,
  input  logic [WIDTH-1:0]         wd
);

  logic [WIDTH-1:0] regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREGS); i++) regs[i] <= '0;
    end else if (we && (wa != '0)) begin
      regs[wa] <= wd;
    end
  end

  always_comb begin
    rd1 = (ra1 == '0) ? '0 : (we && (wa == ra1)) ? wd : regs[ra1];
    rd2 = (ra2 == '0) ? '0 : (we && (wa == ra2)) ? wd : regs[ra2];
  end

endmodule
