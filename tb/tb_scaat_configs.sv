// tb_scaat_configs: the six cache configurations of the area study, each
// run with and without attacks on the same access stream.
//
// Direct-mapped with 64, 128 and 256 lines and 4-way with 256, 512 and 1024
// lines, all with 16-bit word addresses, 32-bit words and 128-bit lines.  For
// every configuration one system sees random attacks (1 in 64 accesses) and
// one sees none (behaving as the plain cache).  Each harness checks the
// remapped addresses and all read data; here the hit rates of the pairs are
// printed side by side, and each attacked run must have remapped at least
// one tag and each run must have had hits and misses.
module tb_scaat_configs;
  localparam int N = 6;
  localparam int NOPS = 8000;
  logic clk = 1'b0;
  logic rst;
  logic done_a [N], done_b [N];
  int c_a [N], f_a [N], h_a [N], m_a [N], r_a [N], s_a [N], o_a [N];
  int c_b [N], f_b [N], h_b [N], m_b [N], r_b [N], s_b [N], o_b [N];

  always #5 clk = ~clk;

  localparam int LINES [N] = '{64, 128, 256, 256, 512, 1024};
  localparam int ASSOC [N] = '{1, 1, 1, 4, 4, 4};

  for (genvar i = 0; i < N; i++) begin : g_cfg
    tb_top_harness #(.LINES(LINES[i]), .ASSOC(ASSOC[i]), .ATTACK(1'b1), .NOPS(NOPS)) with_attacks (
      .clk(clk), .rst(rst), .done(done_a[i]), .checks(c_a[i]), .failures(f_a[i]), .hits(h_a[i]),
      .misses(m_a[i]), .remaps(r_a[i]), .activations(s_a[i]), .attacks(o_a[i]));
    tb_top_harness #(.LINES(LINES[i]), .ASSOC(ASSOC[i]), .ATTACK(1'b0), .NOPS(NOPS)) baseline (
      .clk(clk), .rst(rst), .done(done_b[i]), .checks(c_b[i]), .failures(f_b[i]), .hits(h_b[i]),
      .misses(m_b[i]), .remaps(r_b[i]), .activations(s_b[i]), .attacks(o_b[i]));
  end

  function automatic bit all_done();
    for (int i = 0; i < N; i++) if (!done_a[i] || !done_b[i]) return 1'b0;
    return 1'b1;
  endfunction

  function automatic int sum_checks();
    int s = 0;
    for (int i = 0; i < N; i++) s += c_a[i] + c_b[i];
    return s;
  endfunction

  function automatic int sum_failures();
    int s = 0;
    for (int i = 0; i < N; i++) s += f_a[i] + f_b[i];
    return s;
  endfunction

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", sum_checks(), sum_failures() + 1);
    $finish;
  end

  initial begin
    int checks, failures;
    rst = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    while (!all_done()) @(posedge clk);
    checks = sum_checks();
    failures = sum_failures();
    $display("config              hit rate  hit rate   attacks  activations  tags remapped");
    $display("                    no attack with SCAAT");
    for (int i = 0; i < N; i++) begin
      $display("%4d lines %0d-way      %0.3f     %0.3f     %5d     %5d        %4d", LINES[i], ASSOC[i],
               real'(h_b[i]) / real'(h_b[i] + m_b[i]), real'(h_a[i]) / real'(h_a[i] + m_a[i]),
               o_a[i], s_a[i], r_a[i]);
      checks += 3;
      if (r_a[i] == 0) begin failures++; $display("FAIL: no remap in config %0d", i); end
      if (r_b[i] != 0 || s_b[i] != 0) begin failures++; $display("FAIL: remap without attack in config %0d", i); end
      if (h_a[i] == 0 || m_a[i] == 0 || h_b[i] == 0 || m_b[i] == 0) begin
        failures++; $display("FAIL: no hits or no misses in config %0d", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
