// mips_asm_pkg: instruction encoders and a self-checking test program for the
// MIPS I pipeline testbenches.
//
// build() assembles one program into `prog` (word i at byte address 4*i) and
// fills `exp_addr`/`exp_val` with the data-memory words the program must leave
// behind. Expected values are computed here, in plain SystemVerilog
// arithmetic, independently of the pipeline.
//
// The program has four parts:
//   1. one result per ALU, shift, immediate, HI/LO and multiply instruction,
//      each stored right after it is computed (so every result is forwarded);
//   2. loads and stores of every size and sign, including a load-use pair;
//   3. every branch and jump kind, taken and not taken, with links;
//   4. an autocorrelation kernel, r[lag] = sum_i x[i]*x[i+lag] over N samples
//      for LAGS lags, a loop nest whose branches train the predictor and whose
//      loads and MFLO create hazard stalls. x[] is preloaded by the testbench
//      from x_init(); r[] is low 32 bits, as MFLO gives.
// The program ends by storing 1 to DONE_ADDR and spinning on a jump.
package mips_asm_pkg;

  localparam logic [31:0] DATA_BASE = 32'h0000_1000;
  localparam logic [31:0] X_BASE    = 32'h0000_2000;
  localparam logic [31:0] R_BASE    = 32'h0000_3000;
  localparam logic [31:0] DONE_ADDR = 32'hFFFF_FFF0;   // sw rX, -16(r0)

  logic [31:0] prog[$];
  logic [31:0] exp_addr[$];
  logic [31:0] exp_val[$];

  function automatic logic [31:0] enc_r(logic [5:0] fn, logic [4:0] rs, logic [4:0] rt,
                                        logic [4:0] rd, logic [4:0] sh = 5'd0);
    return {6'h00, rs, rt, rd, sh, fn};
  endfunction

  function automatic logic [31:0] enc_i(logic [5:0] op, logic [4:0] rs, logic [4:0] rt,
                                        logic [15:0] imm);
    return {op, rs, rt, imm};
  endfunction

  function automatic logic [31:0] enc_j(logic [5:0] op, logic [31:0] addr);
    return {op, addr[27:2]};
  endfunction

  function automatic void emit(logic [31:0] w);
    prog.push_back(w);
  endfunction

  function automatic int unsigned here();
    return prog.size();
  endfunction

  // patch the 16-bit offset of the branch at index `at` to reach index `to`
  function automatic void patch(int unsigned at, int unsigned to);
    logic [15:0] off;
    off = 16'(int'(to) - int'(at) - 1);
    prog[at][15:0] = off;
  endfunction

  function automatic void expect_word(logic [31:0] addr, logic [31:0] val);
    exp_addr.push_back(addr);
    exp_val.push_back(val);
  endfunction

  // store register r at DATA_BASE + 4*slot and record the expectation
  function automatic void check_reg(int unsigned slot, logic [4:0] r, logic [31:0] val);
    emit(enc_i(6'h2B, 5'd10, r, 16'(4 * slot)));
    expect_word(DATA_BASE + 32'(4 * slot), val);
  endfunction

  function automatic logic [31:0] x_init(int unsigned i);
    return 32'($signed(32'((i * 37 + 11) % 201)) - 100);
  endfunction

  function automatic void build(int unsigned n_samples, int unsigned lags);
    logic [31:0] a, b, s;
    logic [63:0] p;
    int unsigned slot, at, loop_outer, loop_inner;
    logic [31:0] acc;

    prog.delete();
    exp_addr.delete();
    exp_val.delete();

    a = 32'h1234_5678;
    b = 32'hFFFF_8001;
    // r1 = a, r2 = b, r3 = 5, r10 = DATA_BASE
    emit(enc_i(6'h0F, 5'd0, 5'd1, 16'h1234));           // lui  r1, 0x1234
    emit(enc_i(6'h0D, 5'd1, 5'd1, 16'h5678));           // ori  r1, r1, 0x5678
    emit(enc_i(6'h09, 5'd0, 5'd2, 16'h8001));           // addiu r2, r0, -32767
    emit(enc_i(6'h09, 5'd0, 5'd3, 16'd5));              // addiu r3, r0, 5
    emit(enc_i(6'h09, 5'd0, 5'd10, DATA_BASE[15:0]));   // addiu r10, r0, DATA_BASE

    // ---- part 1: ALU, shifts, immediates
    slot = 0;
    emit(enc_r(6'h21, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, a + b);
    emit(enc_r(6'h23, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, a - b);
    emit(enc_r(6'h24, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, a & b);
    emit(enc_r(6'h25, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, a | b);
    emit(enc_r(6'h26, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, a ^ b);
    emit(enc_r(6'h27, 5'd1, 5'd2, 5'd4)); check_reg(slot++, 5'd4, ~(a | b));
    emit(enc_r(6'h2A, 5'd2, 5'd1, 5'd4)); check_reg(slot++, 5'd4, 32'd1);      // slt b<a
    emit(enc_r(6'h2B, 5'd2, 5'd1, 5'd4)); check_reg(slot++, 5'd4, 32'd0);      // sltu
    emit(enc_r(6'h00, 5'd0, 5'd1, 5'd4, 5'd4)); check_reg(slot++, 5'd4, a << 4);
    emit(enc_r(6'h02, 5'd0, 5'd2, 5'd4, 5'd8)); check_reg(slot++, 5'd4, b >> 8);
    emit(enc_r(6'h03, 5'd0, 5'd2, 5'd4, 5'd8)); check_reg(slot++, 5'd4, 32'hFFFF_FF80);
    emit(enc_r(6'h04, 5'd3, 5'd1, 5'd4)); check_reg(slot++, 5'd4, a << 5);
    emit(enc_r(6'h06, 5'd3, 5'd2, 5'd4)); check_reg(slot++, 5'd4, b >> 5);
    emit(enc_r(6'h07, 5'd3, 5'd2, 5'd4)); check_reg(slot++, 5'd4, 32'hFFFF_FC00);
    emit(enc_i(6'h08, 5'd1, 5'd4, 16'hFFFF)); check_reg(slot++, 5'd4, a - 1);
    emit(enc_i(6'h0A, 5'd2, 5'd4, 16'hFFFB)); check_reg(slot++, 5'd4, 32'd1);  // slti
    emit(enc_i(6'h0B, 5'd3, 5'd4, 16'd7));    check_reg(slot++, 5'd4, 32'd1);  // sltiu
    emit(enc_i(6'h0C, 5'd1, 5'd4, 16'hF0F0)); check_reg(slot++, 5'd4, a & 32'h0000_F0F0);
    emit(enc_i(6'h0D, 5'd2, 5'd4, 16'h7FFE)); check_reg(slot++, 5'd4, b | 32'h0000_7FFE);
    emit(enc_i(6'h0E, 5'd1, 5'd4, 16'hFFFF)); check_reg(slot++, 5'd4, a ^ 32'h0000_FFFF);
    emit(enc_i(6'h0F, 5'd0, 5'd4, 16'hABCD)); check_reg(slot++, 5'd4, 32'hABCD_0000);
    emit(enc_r(6'h20, 5'd1, 5'd3, 5'd4)); check_reg(slot++, 5'd4, a + 5);      // add
    emit(enc_r(6'h22, 5'd1, 5'd3, 5'd4)); check_reg(slot++, 5'd4, a - 5);      // sub

    // ---- multiply and HI/LO
    p = 64'($signed(a) * $signed(b));
    emit(enc_r(6'h18, 5'd1, 5'd2, 5'd0));                                      // mult
    emit(enc_r(6'h12, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, p[31:0]);    // mflo
    emit(enc_r(6'h10, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, p[63:32]);   // mfhi
    p = {32'd0, a} * {32'd0, b};
    emit(enc_r(6'h19, 5'd1, 5'd2, 5'd0));                                      // multu
    emit(enc_r(6'h10, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, p[63:32]);
    emit(enc_r(6'h12, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, p[31:0]);
    emit(enc_r(6'h11, 5'd3, 5'd0, 5'd0));                                      // mthi r3
    emit(enc_r(6'h13, 5'd1, 5'd0, 5'd0));                                      // mtlo r1
    emit(enc_r(6'h10, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, 32'd5);
    emit(enc_r(6'h12, 5'd0, 5'd0, 5'd4)); check_reg(slot++, 5'd4, a);

    // ---- part 2: loads and stores (scratch at DATA_BASE + 0x200)
    emit(enc_i(6'h2B, 5'd10, 5'd1, 16'h0200));                                 // sw r1
    emit(enc_i(6'h23, 5'd10, 5'd5, 16'h0200));                                 // lw r5
    emit(enc_r(6'h21, 5'd5, 5'd3, 5'd6)); check_reg(slot++, 5'd6, a + 5);      // load-use
    emit(enc_i(6'h20, 5'd10, 5'd5, 16'h0201)); check_reg(slot++, 5'd5, 32'h0000_0056); // lb
    emit(enc_i(6'h25, 5'd10, 5'd5, 16'h0202)); check_reg(slot++, 5'd5, 32'h0000_1234); // lhu
    emit(enc_i(6'h2B, 5'd10, 5'd2, 16'h0204));                                 // sw r2
    emit(enc_i(6'h21, 5'd10, 5'd5, 16'h0204)); check_reg(slot++, 5'd5, 32'hFFFF_8001); // lh
    emit(enc_i(6'h25, 5'd10, 5'd5, 16'h0204)); check_reg(slot++, 5'd5, 32'h0000_8001); // lhu
    emit(enc_i(6'h20, 5'd10, 5'd5, 16'h0205)); check_reg(slot++, 5'd5, 32'hFFFF_FF80); // lb
    emit(enc_i(6'h24, 5'd10, 5'd5, 16'h0205)); check_reg(slot++, 5'd5, 32'h0000_0080); // lbu
    emit(enc_i(6'h2B, 5'd10, 5'd0, 16'h0208));                                 // sw r0
    emit(enc_i(6'h28, 5'd10, 5'd3, 16'h0208));                                 // sb r3
    emit(enc_i(6'h29, 5'd10, 5'd1, 16'h020A));                                 // sh r1
    emit(enc_i(6'h23, 5'd10, 5'd5, 16'h0208)); check_reg(slot++, 5'd5, 32'h5678_0005);
    expect_word(DATA_BASE + 32'h200, a);
    expect_word(DATA_BASE + 32'h204, b);

    // ---- part 3: branches; r7 counts fall-through instructions
    // each test: r7 = 0; branch over "addiu r7, r7, 1"; store r7
    begin
      logic [31:0] br_words[12];
      logic        taken[12];
      br_words[0]  = enc_i(6'h04, 5'd3, 5'd3, 16'd0);  taken[0]  = 1; // beq equal
      br_words[1]  = enc_i(6'h04, 5'd3, 5'd1, 16'd0);  taken[1]  = 0; // beq differ
      br_words[2]  = enc_i(6'h05, 5'd3, 5'd1, 16'd0);  taken[2]  = 1; // bne
      br_words[3]  = enc_i(6'h05, 5'd3, 5'd3, 16'd0);  taken[3]  = 0;
      br_words[4]  = enc_i(6'h06, 5'd2, 5'd0, 16'd0);  taken[4]  = 1; // blez neg
      br_words[5]  = enc_i(6'h06, 5'd3, 5'd0, 16'd0);  taken[5]  = 0; // blez pos
      br_words[6]  = enc_i(6'h07, 5'd3, 5'd0, 16'd0);  taken[6]  = 1; // bgtz pos
      br_words[7]  = enc_i(6'h07, 5'd0, 5'd0, 16'd0);  taken[7]  = 0; // bgtz zero
      br_words[8]  = enc_i(6'h01, 5'd2, 5'd0, 16'd0);  taken[8]  = 1; // bltz neg
      br_words[9]  = enc_i(6'h01, 5'd3, 5'd0, 16'd0);  taken[9]  = 0; // bltz pos
      br_words[10] = enc_i(6'h01, 5'd0, 5'd1, 16'd0);  taken[10] = 1; // bgez zero
      br_words[11] = enc_i(6'h01, 5'd2, 5'd1, 16'd0);  taken[11] = 0; // bgez neg
      for (int k = 0; k < 12; k++) begin
        emit(enc_i(6'h09, 5'd0, 5'd7, 16'd0));                                 // r7 = 0
        at = here();
        emit(br_words[k]);
        emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
        patch(at, here());
        check_reg(slot++, 5'd7, taken[k] ? 32'd0 : 32'd1);
      end
    end
    // bgezal (taken) and bltzal (not taken, still links)
    emit(enc_i(6'h09, 5'd0, 5'd7, 16'd0));
    at = here();
    emit(enc_i(6'h01, 5'd3, 5'd17, 16'd0));                                    // bgezal r3
    emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
    patch(at, here());
    check_reg(slot++, 5'd7, 32'd0);
    check_reg(slot++, 5'd31, 32'(4 * (at + 1)));
    at = here();
    emit(enc_i(6'h01, 5'd3, 5'd16, 16'd1));                                    // bltzal r3 (not taken)
    emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
    check_reg(slot++, 5'd7, 32'd1);
    check_reg(slot++, 5'd31, 32'(4 * (at + 1)));
    // j over one instruction
    emit(enc_i(6'h09, 5'd0, 5'd7, 16'd0));
    emit(enc_j(6'h02, 32'(4 * (here() + 2))));
    emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
    check_reg(slot++, 5'd7, 32'd0);
    // jal over one instruction, then check the link
    emit(enc_i(6'h09, 5'd0, 5'd7, 16'd0));
    at = here();
    emit(enc_j(6'h03, 32'(4 * (here() + 2))));
    emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
    check_reg(slot++, 5'd7, 32'd0);
    check_reg(slot++, 5'd31, 32'(4 * (at + 1)));
    // jalr to a computed address: r8 = address of the instruction after the skip
    emit(enc_i(6'h09, 5'd0, 5'd7, 16'd0));
    emit(enc_i(6'h09, 5'd0, 5'd8, 16'(4 * (here() + 4))));
    at = here() + 1;
    emit(enc_i(6'h09, 5'd0, 5'd9, 16'd0));                                     // filler
    emit(enc_r(6'h09, 5'd8, 5'd0, 5'd9));                                      // jalr r9, r8
    emit(enc_i(6'h09, 5'd7, 5'd7, 16'd1));
    check_reg(slot++, 5'd7, 32'd0);
    check_reg(slot++, 5'd9, 32'(4 * (at + 1)));

    // ---- part 4: autocorrelation kernel
    // r11 = X_BASE, r12 = R_BASE, r13 = lag, r14 = N, r15 = LAGS
    emit(enc_i(6'h09, 5'd0, 5'd11, X_BASE[15:0]));
    emit(enc_i(6'h09, 5'd0, 5'd12, R_BASE[15:0]));
    emit(enc_i(6'h09, 5'd0, 5'd13, 16'd0));
    emit(enc_i(6'h09, 5'd0, 5'd14, 16'(n_samples)));
    emit(enc_i(6'h09, 5'd0, 5'd15, 16'(lags)));
    loop_outer = here();
    emit(enc_i(6'h09, 5'd0, 5'd16, 16'd0));                                    // acc = 0
    emit(enc_r(6'h23, 5'd14, 5'd13, 5'd17));                                   // cnt = N - lag
    emit(enc_i(6'h09, 5'd11, 5'd18, 16'd0));                                   // p = x
    emit(enc_r(6'h00, 5'd0, 5'd13, 5'd19, 5'd2));                              // off = lag*4
    emit(enc_r(6'h21, 5'd18, 5'd19, 5'd19));                                   // q = x + off
    loop_inner = here();
    emit(enc_i(6'h23, 5'd18, 5'd20, 16'd0));                                   // lw a
    emit(enc_i(6'h23, 5'd19, 5'd21, 16'd0));                                   // lw b
    emit(enc_r(6'h18, 5'd20, 5'd21, 5'd0));                                    // mult (load-use)
    emit(enc_r(6'h12, 5'd0, 5'd0, 5'd22));                                     // mflo (hilo stall)
    emit(enc_r(6'h21, 5'd16, 5'd22, 5'd16));                                   // acc += lo
    emit(enc_i(6'h09, 5'd18, 5'd18, 16'd4));
    emit(enc_i(6'h09, 5'd19, 5'd19, 16'd4));
    emit(enc_i(6'h09, 5'd17, 5'd17, 16'hFFFF));                                // cnt--
    at = here();
    emit(enc_i(6'h05, 5'd17, 5'd0, 16'd0));                                    // bne cnt, 0
    patch(at, loop_inner);
    emit(enc_r(6'h00, 5'd0, 5'd13, 5'd23, 5'd2));                              // lag*4
    emit(enc_r(6'h21, 5'd12, 5'd23, 5'd23));
    emit(enc_i(6'h2B, 5'd23, 5'd16, 16'd0));                                   // r[lag] = acc
    emit(enc_i(6'h09, 5'd13, 5'd13, 16'd1));                                   // lag++
    at = here();
    emit(enc_i(6'h05, 5'd13, 5'd15, 16'd0));                                   // bne lag, LAGS
    patch(at, loop_outer);
    for (int unsigned lag = 0; lag < lags; lag++) begin
      acc = 0;
      for (int unsigned i = 0; i + lag < n_samples; i++) begin
        s = x_init(i) * x_init(i + lag);
        acc = acc + s;
      end
      expect_word(R_BASE + 32'(4 * lag), acc);
    end

    // ---- done flag, then spin
    emit(enc_i(6'h09, 5'd0, 5'd24, 16'd1));
    emit(enc_i(6'h2B, 5'd0, 5'd24, DONE_ADDR[15:0]));
    emit(enc_j(6'h02, 32'(4 * here())));
  endfunction

endpackage
