// tb_hazard_unit: self-checking test of hazard detection and forwarding select.
//
// Random decode-stage operands and random older instructions in EX, MEM1 and
// MEM2 (register numbers drawn from a small range so that matches are common)
// are compared with a reference: the nearest older writer of an operand
// register supplies it (EX -> FWD_MEM1, MEM1 -> FWD_MEM2, MEM2 -> FWD_WB),
// register 0 is never forwarded, a used operand written by a load in EX or
// MEM1 stalls, and MFHI/MFLO stall while a HI/LO writer is in EX, MEM1 or
// MEM2. Each kind of outcome must occur.
module tb_hazard_unit;
  import mips_pkg::*;
  localparam int unsigned MAX_CYC = 100000;

  logic       clk = 1'b0;
  logic       id_valid, id_uses_rs, id_uses_rt, id_reads_hilo;
  logic [4:0] id_rs, id_rt;
  hz_src_t    ex, mem1, mem2;
  logic       stall;
  fwd_e       fwd_a, fwd_b;
  int checks = 0, failures = 0;
  int n_fwd [4];
  int n_load_stall = 0, n_hilo_stall = 0;

  hazard_unit dut (.id_valid, .id_rs, .id_rt, .id_uses_rs, .id_uses_rt, .id_reads_hilo,
                   .ex, .mem1, .mem2, .stall, .fwd_a, .fwd_b);

  always #5 clk = ~clk;

  function automatic hz_src_t rnd_src();
    hz_src_t s;
    s.valid       = ($urandom % 4) != 0;
    s.reg_write   = 1'($urandom);
    s.dest        = 5'($urandom % 4);
    s.load        = ($urandom % 3) == 0;
    s.writes_hilo = ($urandom % 4) == 0;
    return s;
  endfunction

  // reference: stage k (0 = EX, 1 = MEM1, 2 = MEM2) that holds the newest writer of r, or -1
  function automatic int newest(logic [4:0] r);
    hz_src_t s [3];
    s[0] = ex; s[1] = mem1; s[2] = mem2;
    if (r == 5'd0) return -1;
    for (int k = 0; k < 3; k++)
      if (s[k].valid && s[k].reg_write && s[k].dest == r) return k;
    return -1;
  endfunction

  function automatic fwd_e ref_fwd(logic [4:0] r);
    case (newest(r))
      0: return FWD_MEM1;
      1: return FWD_MEM2;
      2: return FWD_WB;
      default: return FWD_NONE;
    endcase
  endfunction

  function automatic logic ref_load_stall(logic uses, logic [4:0] r);
    hz_src_t s [2];
    logic st = 1'b0;
    s[0] = ex; s[1] = mem1;
    if (!uses || r == 5'd0) return 1'b0;
    for (int k = 0; k < 2; k++)
      if (s[k].valid && s[k].reg_write && s[k].dest == r && s[k].load) st = 1'b1;
    return st;
  endfunction

  initial begin
    logic exp_stall, ls, hs;
    foreach (n_fwd[i]) n_fwd[i] = 0;
    for (int i = 0; i < 20000; i++) begin
      id_valid      = ($urandom % 8) != 0;
      id_rs         = 5'($urandom % 4);
      id_rt         = 5'($urandom % 4);
      id_uses_rs    = 1'($urandom);
      id_uses_rt    = 1'($urandom);
      id_reads_hilo = ($urandom % 4) == 0;
      ex   = rnd_src();
      mem1 = rnd_src();
      mem2 = rnd_src();
      #1;
      ls = ref_load_stall(id_uses_rs, id_rs) || ref_load_stall(id_uses_rt, id_rt);
      hs = id_reads_hilo && ((ex.valid && ex.writes_hilo) || (mem1.valid && mem1.writes_hilo) ||
                             (mem2.valid && mem2.writes_hilo));
      exp_stall = id_valid && (ls || hs);
      checks += 3;
      if (fwd_a !== ref_fwd(id_rs)) begin
        failures++;
        if (failures < 10) $display("FAIL fwd_a %s expected %s", fwd_a.name(), ref_fwd(id_rs).name());
      end
      if (fwd_b !== ref_fwd(id_rt)) begin
        failures++;
        if (failures < 10) $display("FAIL fwd_b %s expected %s", fwd_b.name(), ref_fwd(id_rt).name());
      end
      if (stall !== exp_stall) begin
        failures++;
        if (failures < 10) $display("FAIL stall %b expected %b", stall, exp_stall);
      end
      n_fwd[int'(fwd_a)]++;
      if (id_valid && ls) n_load_stall++;
      if (id_valid && hs && !ls) n_hilo_stall++;
      @(posedge clk);
    end
    for (int k = 1; k < 4; k++) begin
      checks++;
      if (n_fwd[k] == 0) begin failures++; $display("FAIL forwarding source %0d never chosen", k); end
    end
    checks += 2;
    if (n_load_stall == 0) begin failures++; $display("FAIL load-use stall never seen"); end
    if (n_hilo_stall == 0) begin failures++; $display("FAIL HI/LO stall never seen"); end
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
