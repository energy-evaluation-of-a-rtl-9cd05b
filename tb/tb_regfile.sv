// tb_regfile: self-checking test of the register file.
//
// Random writes and reads on both ports are compared with a plain array kept
// by the testbench. Checked as well: all registers read zero after reset,
// register 0 stays zero when written, and a read of the register being
// written in the same cycle returns the new value (write-through).
module tb_regfile;
  localparam int unsigned MAX_CYC = 20000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [4:0]  ra1, ra2, wa;
  logic [31:0] rd1, rd2, wd;
  logic        we;
  logic [31:0] model [32];
  int checks = 0, failures = 0;
  int n_wt = 0;

  regfile dut (.clk, .rst_n, .ra1, .ra2, .rd1, .rd2, .we, .wa, .wd);

  always #5 clk = ~clk;

  function automatic logic [31:0] expect_rd(logic [4:0] ra);
    if (ra == 5'd0) return 32'd0;
    if (we && wa == ra) return wd;
    return model[ra];
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    we = 0; wa = 0; wd = 0; ra1 = 0; ra2 = 0;
    foreach (model[i]) model[i] = 32'd0;
    #1;
    @(negedge clk) rst_n = 1'b1;
    for (int r = 0; r < 32; r++) begin
      ra1 = 5'(r); #1; check("reset value", rd1, 32'd0);
    end
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      we  = ($urandom % 3) != 0;
      wa  = 5'($urandom);
      wd  = $urandom;
      ra1 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      ra2 = ($urandom % 4 == 0) ? wa : 5'($urandom);
      #1;
      if (we && wa != 0 && (ra1 == wa || ra2 == wa)) n_wt++;
      check("rd1", rd1, expect_rd(ra1));
      check("rd2", rd2, expect_rd(ra2));
      @(posedge clk);
      if (we && wa != 5'd0) model[wa] = wd;
    end
    // register 0 ignores writes
    @(negedge clk); we = 1; wa = 0; wd = 32'hDEAD_BEEF;
    @(negedge clk); we = 0; ra1 = 0; #1; check("r0", rd1, 32'd0);
    checks++;
    if (n_wt == 0) begin failures++; $display("FAIL write-through never exercised"); end
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
