// tb_mult_pipe3: self-checking test of the three-stage multiplier.
//
// A new random operand pair (signed or unsigned, corner values included) is
// presented every cycle while `en` is randomly dropped to model pipeline
// freezes. A queue in the testbench holds the expected 64-bit products; each
// must appear on `p` exactly three enabled edges after its operands were
// taken, and must not move while `en` is low.
module tb_mult_pipe3;
  localparam int unsigned MAX_CYC = 50000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic        en, is_signed;
  logic [31:0] a, b;
  logic [63:0] p;
  logic [63:0] pipe [3];
  logic [63:0] p_prev;
  int checks = 0, failures = 0, n_frozen = 0;

  mult_pipe3 dut (.clk, .rst_n, .en, .is_signed, .a, .b, .p);

  always #5 clk = ~clk;

  function automatic logic [31:0] pick_val();
    case ($urandom % 6)
      0: return 32'd0;
      1: return 32'h8000_0000;
      2: return 32'hFFFF_FFFF;
      3: return 32'h0001_FFFF;
      default: return $urandom;
    endcase
  endfunction

  function automatic logic [63:0] ref_mul(logic sg, logic [31:0] x, logic [31:0] z);
    longint sx, sz;
    if (sg) begin sx = longint'($signed(x)); sz = longint'($signed(z)); end
    else    begin sx = longint'({32'd0, x}); sz = longint'({32'd0, z}); end
    return 64'(sx * sz);
  endfunction

  initial begin
    en = 0; is_signed = 0; a = 0; b = 0;
    foreach (pipe[i]) pipe[i] = 64'd0;
    #1;
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      en        = ($urandom % 4) != 0;
      is_signed = 1'($urandom);
      a         = pick_val();
      b         = pick_val();
      p_prev    = p;
      @(posedge clk);
      #1;
      if (en) begin
        pipe[2] = pipe[1];
        pipe[1] = pipe[0];
        pipe[0] = ref_mul(is_signed, a, b);
        checks++;
        if (p !== pipe[2]) begin
          failures++;
          if (failures < 10) $display("FAIL product %h expected %h", p, pipe[2]);
        end
      end else begin
        n_frozen++;
        checks++;
        if (p !== p_prev) begin
          failures++;
          if (failures < 10) $display("FAIL output moved while frozen");
        end
      end
    end
    checks++;
    if (n_frozen == 0) begin failures++; $display("FAIL freeze never exercised"); end
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
