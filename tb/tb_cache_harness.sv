// tb_cache_harness: drives one scaat_cache instance against reference models.
//
// Used by tb_scaat_cache for a direct-mapped and a 4-way configuration.  It
// contains a behavioural main memory (a line's initial content is a fixed
// function of its address; writes honour the word mask; read data returns
// a programmable number of cycles after the request is accepted, and mem_rdy
// can be withheld at random) and a reference cache model: per set, a list of
// tags ordered by recency with ASSOC entries, allocated on read misses only.
// Each access is checked for hit/miss against the reference model and each
// read for the data held in the reference memory.  In the first phase the
// memory is always ready with a fixed read delay and the latencies are
// checked: read hit 1 cycle from acceptance to cpu_rstb, write 2 cycles back
// to cpu_rdy, read miss 2 + read delay cycles.  The second phase adds random
// stalls.  done rises when the run is over; checks/failures/hits/misses/
// evictions count what happened.
module tb_cache_harness #(
  parameter int LINES = 16,
  parameter int ASSOC = 4,
  parameter int NOPS  = 3000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   misses,
  output int   evictions
);
  localparam int AB = 10, DB = 32, MB = 128, WORDS = MB / DB, OB = 2;
  localparam int SETS = LINES / ASSOC, IB = $clog2(SETS), TB = AB - IB - OB;
  localparam int MAB = AB - OB;
  localparam int RD_DELAY = 3;

  logic          cpu_req, cpu_write, cpu_rdy, cpu_rstb;
  logic [AB-1:0] cpu_addr;
  logic [DB-1:0] cpu_wdata, cpu_rdata;
  logic          mem_req, mem_write, mem_rdy, mem_rstb;
  logic [MAB-1:0] mem_addr;
  logic [MB-1:0] mem_wdata, mem_rdata;
  logic [WORDS-1:0] mem_wmask;
  logic          cache_hit, cache_miss;

  scaat_cache #(.CACHE_LINES(LINES), .ASSOCIATIVITY(ASSOC), .CPU_ADDR_BITS(AB),
                .CPU_DATA_BITS(DB), .MEM_DATA_BITS(MB)) dut (
    .clk(clk), .rst(rst), .cpu_req(cpu_req), .cpu_write(cpu_write), .cpu_addr(cpu_addr),
    .cpu_wdata(cpu_wdata), .cpu_rdy(cpu_rdy), .cpu_rstb(cpu_rstb), .cpu_rdata(cpu_rdata),
    .mem_req(mem_req), .mem_write(mem_write), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_wmask(mem_wmask), .mem_rdy(mem_rdy), .mem_rstb(mem_rstb), .mem_rdata(mem_rdata),
    .cache_hit(cache_hit), .cache_miss(cache_miss));

  // ---------------- behavioural main memory ----------------
  logic [MB-1:0] mem [2 ** MAB];
  bit   random_stall;
  int   rd_count;
  logic [MB-1:0] rd_line;

  function automatic logic [MB-1:0] init_line(input int a);
    logic [MB-1:0] l;
    for (int w = 0; w < WORDS; w++) l[w*DB +: DB] = DB'(32'h9E37_79B9 * (a * WORDS + w + 1));
    return l;
  endfunction

  initial for (int a = 0; a < 2 ** MAB; a++) mem[a] = init_line(a);

  always @(negedge clk) mem_rdy <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    mem_rstb <= 1'b0;
    if (rd_count > 0) begin
      rd_count <= rd_count - 1;
      if (rd_count == 1) begin
        mem_rstb  <= 1'b1;
        mem_rdata <= rd_line;
      end
    end
    if (mem_req && mem_rdy) begin
      if (mem_write) begin
        for (int w = 0; w < WORDS; w++)
          if (mem_wmask[w]) mem[mem_addr][w*DB +: DB] <= mem_wdata[w*DB +: DB];
      end else begin
        rd_line  <= mem[mem_addr];
        rd_count <= random_stall ? $urandom_range(1, 4) : RD_DELAY - 1;
        if (!random_stall && RD_DELAY == 1) begin
          mem_rstb  <= 1'b1;
          mem_rdata <= mem[mem_addr];
        end
      end
    end
  end

  // ---------------- reference cache ----------------
  logic [TB-1:0] rtag [SETS][ASSOC];   // index 0 = most recent
  int            rcnt [SETS];

  function automatic bit ref_access(input logic [AB-1:0] a, input bit wr, output bit evicted);
    int s, pos;
    logic [TB-1:0] t;
    s = int'(a[OB +: IB]);
    t = a[AB-1 -: TB];
    evicted = 1'b0;
    pos = -1;
    for (int k = 0; k < rcnt[s]; k++) if (rtag[s][k] == t) pos = k;
    if (pos >= 0) begin
      for (int k = pos; k > 0; k--) rtag[s][k] = rtag[s][k-1];
      rtag[s][0] = t;
      return 1'b1;
    end
    if (!wr) begin
      if (rcnt[s] == ASSOC) evicted = 1'b1;
      else rcnt[s]++;
      for (int k = rcnt[s] - 1; k > 0; k--) rtag[s][k] = rtag[s][k-1];
      rtag[s][0] = t;
    end
    return 1'b0;
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (%0d-way): %s", ASSOC, what); end
  endtask

  task automatic access(input bit wr, input logic [AB-1:0] a, input logic [DB-1:0] d, input bit timed);
    bit exp_hit, ev;
    int lat;
    logic [DB-1:0] exp_data;
    cpu_req = 1'b1; cpu_write = wr; cpu_addr = a; cpu_wdata = d;
    #1;
    while (!cpu_rdy) begin @(negedge clk); #1; end
    exp_hit = ref_access(a, wr, ev);
    if (ev) evictions++;
    check(cache_hit == exp_hit && cache_miss == !exp_hit,
          $sformatf("%s %h: hit %b expected %b", wr ? "write" : "read", a, cache_hit, exp_hit));
    if (exp_hit) hits++; else misses++;
    exp_data = mem[a[AB-1:OB]][a[OB-1:0]*DB +: DB];
    @(negedge clk);
    cpu_req = 1'b0;
    lat = 1;
    if (wr) begin
      while (!cpu_rdy) begin @(negedge clk); lat++; end
      if (timed) check(lat == 2, $sformatf("write latency %0d, expected 2", lat));
    end else begin
      while (!cpu_rstb && lat < 100) begin @(negedge clk); lat++; end
      check(cpu_rstb && cpu_rdata == exp_data,
            $sformatf("read %h: data %h expected %h", a, cpu_rdata, exp_data));
      if (timed) check(lat == (exp_hit ? 1 : 2 + RD_DELAY),
                       $sformatf("read %s latency %0d", exp_hit ? "hit" : "miss", lat));
    end
  endtask

  initial begin
    done = 1'b0; checks = 0; failures = 0; hits = 0; misses = 0; evictions = 0;
    cpu_req = 1'b0; cpu_write = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    random_stall = 1'b0; rd_count = 0; mem_rstb = 1'b0; mem_rdata = '0; rd_line = '0;
    for (int s = 0; s < SETS; s++) rcnt[s] = 0;
    @(negedge rst);
    @(negedge clk);
    // directed: miss, hit, write hit, read back, write miss (no allocate)
    access(1'b0, 10'h005, '0, 1'b1);
    access(1'b0, 10'h006, '0, 1'b1);
    access(1'b1, 10'h006, 32'hCAFE_0001, 1'b1);
    access(1'b0, 10'h006, '0, 1'b1);
    access(1'b1, 10'h3F1, 32'hCAFE_0002, 1'b1);
    access(1'b0, 10'h3F1, '0, 1'b1);
    // fill one set beyond its ways and come back (eviction of the LRU way)
    for (int k = 0; k <= ASSOC; k++) access(1'b0, AB'((k << (IB + OB)) | 8), '0, 1'b1);
    access(1'b0, AB'(8), '0, 1'b1);
    // random, timed
    for (int n = 0; n < NOPS; n++)
      access($urandom_range(0, 3) == 0, AB'($urandom_range(0, 255)), $urandom, 1'b1);
    // random with stalls
    random_stall = 1'b1;
    for (int n = 0; n < NOPS; n++)
      access($urandom_range(0, 3) == 0, AB'($urandom), $urandom, 1'b0);
    done = 1'b1;
  end
endmodule
