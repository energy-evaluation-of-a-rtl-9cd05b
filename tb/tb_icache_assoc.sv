// tb_icache_assoc: the instruction cache in its direct-mapped and two-way
// forms (the 4-way default is covered by tb_icache).
//
// Two caches of 2 kB with 4-word lines, one direct-mapped (128 sets, index
// 7 bits) and one two-way (64 sets), each run their own random fetch stream
// (icache_stream) against main memory. Every returned word is checked; each
// cache must hit, miss and evict. With one way there is no replacement choice,
// so this also exercises the pseudo-LRU table's single-way case.
module tb_icache_assoc;
  localparam int unsigned MAX_CYC = 400000;

  logic clk = 1'b0, rst_n = 1'b0;
  logic fin1, fin2;
  int   ch1, fl1, hi1, mi1, ev1, ch2, fl2, hi2, mi2, ev2;
  int   checks = 0, failures = 0;

  icache_stream #(.WAYS(1)) u_dm (
    .clk, .rst_n, .finished(fin1), .checks(ch1), .failures(fl1),
    .hits(hi1), .misses(mi1), .evictions(ev1));
  icache_stream #(.WAYS(2)) u_2w (
    .clk, .rst_n, .finished(fin2), .checks(ch2), .failures(fl2),
    .hits(hi2), .misses(mi2), .evictions(ev2));

  always #5 clk = ~clk;

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    wait (fin1 && fin2);
    checks   = ch1 + ch2 + 6;
    failures = fl1 + fl2;
    if (hi1 == 0 || hi2 == 0) begin failures++; $display("FAIL no hit"); end
    if (mi1 == 0 || mi2 == 0) begin failures++; $display("FAIL no miss"); end
    if (ev1 == 0 || ev2 == 0) begin failures++; $display("FAIL no eviction"); end
    $display("direct-mapped: hits=%0d misses=%0d evictions=%0d", hi1, mi1, ev1);
    $display("two-way:       hits=%0d misses=%0d evictions=%0d", hi2, mi2, ev2);
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
