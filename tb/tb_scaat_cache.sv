// tb_scaat_cache: self-checking testbench of the cache.
//
// Runs tb_cache_harness on a direct-mapped cache (16 lines) and on a 4-way
// set-associative cache (16 lines, 4 sets), both with 10-bit word addresses,
// 32-bit words and 128-bit lines, and adds up their checks.  Hits, misses
// and LRU evictions must each have happened in both configurations.
module tb_scaat_cache;
  logic clk = 1'b0;
  logic rst;
  logic done_dm, done_4w;
  int c_dm, f_dm, h_dm, m_dm, e_dm;
  int c_4w, f_4w, h_4w, m_4w, e_4w;
  int checks, failures;

  always #5 clk = ~clk;

  tb_cache_harness #(.LINES(16), .ASSOC(1)) dm (
    .clk(clk), .rst(rst), .done(done_dm), .checks(c_dm), .failures(f_dm),
    .hits(h_dm), .misses(m_dm), .evictions(e_dm));
  tb_cache_harness #(.LINES(16), .ASSOC(4)) w4 (
    .clk(clk), .rst(rst), .done(done_4w), .checks(c_4w), .failures(f_4w),
    .hits(h_4w), .misses(m_4w), .evictions(e_4w));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c_dm + c_4w + 1, f_dm + f_4w + 1);
    $finish;
  end

  initial begin
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    wait (done_dm && done_4w);
    checks = c_dm + c_4w;
    failures = f_dm + f_4w;
    $display("direct-mapped: %0d hits %0d misses %0d evictions", h_dm, m_dm, e_dm);
    $display("4-way:         %0d hits %0d misses %0d evictions", h_4w, m_4w, e_4w);
    checks += 6;
    if (h_dm == 0 || m_dm == 0 || e_dm == 0) failures++;
    if (h_4w == 0 || m_4w == 0 || e_4w == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
