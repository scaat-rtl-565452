// tb_scaat_fig3b: change of the cache access pattern caused by one remap.
//
// A direct-mapped SCAAT system with 8-bit word addresses (3-bit tag, 3-bit
// index, 2-bit offset), 8 lines and the LFSR seeded with 101.  Cache set 010
// holds tag 111 and set 101 holds tag 100.  Three reads follow: tag 111 at
// set 010, tag 111 again, tag 100 at set 101.  Without an attack all three
// hit (the predicted pattern).  With an attack on the second read, tag 111 is
// moved to set 101: the second read misses and replaces tag 100 in set 101,
// so the third read misses too.  Both runs are checked, including the tag
// held in set 101 after each access and that read data is always correct.
module tb_scaat_fig3b;
  import scaat_pkg::*;
  logic clk = 1'b0;
  logic rst, attk;
  logic cpu_req, cpu_write, cpu_rdy, cpu_rstb;
  logic [7:0] cpu_addr, scaat_out;
  logic [31:0] cpu_wdata, cpu_rdata;
  logic mem_req, mem_write, mem_rdy, mem_rstb;
  logic [5:0] mem_addr;
  logic [127:0] mem_wdata, mem_rdata;
  logic [3:0] mem_wmask;
  logic cache_hit, cache_miss, found_in_scaat, scaat_en;
  scaat_mode_e scaat_mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaat_top #(.CACHE_LINES(8), .ASSOCIATIVITY(1), .CPU_ADDR_BITS(8), .CPU_DATA_BITS(32),
              .MEM_DATA_BITS(128), .LFSR_SEED(3'b101)) dut (
    .clk(clk), .rst(rst), .attk(attk),
    .cpu_req(cpu_req), .cpu_write(cpu_write), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .cpu_rdy(cpu_rdy), .cpu_rstb(cpu_rstb), .cpu_rdata(cpu_rdata),
    .mem_req(mem_req), .mem_write(mem_write), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_wmask(mem_wmask), .mem_rdy(mem_rdy), .mem_rstb(mem_rstb), .mem_rdata(mem_rdata),
    .cache_hit(cache_hit), .cache_miss(cache_miss), .scaat_out(scaat_out),
    .found_in_scaat(found_in_scaat), .scaat_en(scaat_en), .scaat_mode(scaat_mode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // memory: line a holds words {a,3}..{a,0}; one-cycle read delay
  function automatic logic [127:0] line(input logic [5:0] a);
    return {24'h0, a, 2'd3, 24'h0, a, 2'd2, 24'h0, a, 2'd1, 24'h0, a, 2'd0};
  endfunction
  assign mem_rdy = 1'b1;
  always @(posedge clk) begin
    mem_rstb <= mem_req && !mem_write;
    mem_rdata <= line(mem_addr);
  end

  // read, return 1 on miss; the data must be the word of the address the
  // cache used
  task automatic rd(input logic [7:0] a, input bit attack, output bit miss, output logic [7:0] used);
    cpu_req = 1'b1; cpu_write = 1'b0; cpu_addr = a; attk = attack;
    #1;
    miss = cache_miss;
    used = scaat_out;
    @(negedge clk);
    cpu_req = 1'b0; attk = 1'b0;
    while (!cpu_rstb) @(negedge clk);
    check(cpu_rdata == {24'h0, used}, $sformatf("data %h for address %b", cpu_rdata, used));
    @(negedge clk);
  endtask

  function automatic logic [2:0] set101_tag();
    return dut.u_cache.tag_q[5][0];
  endfunction

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam logic [7:0] A111 = {3'b111, 3'b010, 2'b00};
  localparam logic [7:0] A100 = {3'b100, 3'b101, 2'b00};

  initial begin
    bit m;
    logic [7:0] u;
    bit [2:0] p_miss, a_miss;
    cpu_req = 1'b0; cpu_write = 1'b0; cpu_addr = '0; cpu_wdata = '0; attk = 1'b0;
    for (int run = 0; run < 2; run++) begin
      rst = 1'b1;
      repeat (2) @(posedge clk);
      @(negedge clk) rst = 1'b0;
      // populate: 010 <- tag 111, 101 <- tag 100
      rd(A111, 1'b0, m, u);
      rd(A100, 1'b0, m, u);
      check(set101_tag() == 3'b100, "set 101 holds tag 100");
      // the three accesses
      rd(A111, 1'b0, m, u);
      a_miss[0] = m;
      rd(A111, run == 1, m, u);
      a_miss[1] = m;
      check(u == (run == 1 ? {3'b111, 3'b101, 2'b00} : A111), $sformatf("second access went to %b", u));
      check(set101_tag() == (run == 1 ? 3'b111 : 3'b100), "set 101 after the second access");
      rd(A100, 1'b0, m, u);
      a_miss[2] = m;
      check(set101_tag() == 3'b100, "set 101 after the third access");
      p_miss = 3'b000;
      if (run == 0) check(a_miss == p_miss, $sformatf("no attack: misses %b, predicted %b", a_miss, p_miss));
      else          check(a_miss == 3'b110, $sformatf("attack: misses %b, expected 110 (access 3,2,1)", a_miss));
      $display("run %0d (%s): predicted misses %b actual %b", run, run ? "attack" : "no attack", p_miss, a_miss);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
