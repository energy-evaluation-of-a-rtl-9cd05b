// tb_mem_if: self-checking test of the main-memory interface registers.
//
// Random words with random valid strobes are driven from the memory side.
// One cycle later the valid register must repeat the strobe, and the data
// register must hold the most recent word that came with a strobe (words
// without one are ignored). Reset clears both.
module tb_mem_if;
  localparam int unsigned MAX_CYC = 20000;

  logic        clk = 1'b0, rst_n = 1'b0;
  logic [31:0] mm_rdata, data_q, last;
  logic        mm_rvalid, valid_q, last_v;
  int checks = 0, failures = 0;

  mem_if dut (.clk, .rst_n, .mm_rdata, .mm_rvalid, .data_q, .valid_q);

  always #5 clk = ~clk;

  initial begin
    mm_rdata = 32'hFFFF_FFFF; mm_rvalid = 0;
    @(posedge clk);
    #1;
    checks += 2;
    if (valid_q !== 1'b0) failures++;
    if (data_q !== 32'd0) failures++;
    @(negedge clk) rst_n = 1'b1;
    last = 0;
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      mm_rdata  = $urandom;
      mm_rvalid = ($urandom % 3) == 0;
      last_v    = mm_rvalid;
      if (mm_rvalid) last = mm_rdata;
      @(posedge clk);
      #1;
      checks += 2;
      if (valid_q !== last_v) begin failures++; if (failures < 10) $display("FAIL valid"); end
      if (data_q !== last) begin
        failures++;
        if (failures < 10) $display("FAIL data %h expected %h", data_q, last);
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
