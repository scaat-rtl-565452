// tb_scaat_top: end-to-end testbench of the SCAAT system at its default size
// (16-bit word addresses, 4-way, 256 lines of 128 bits, 64-entry SCAAT
// memory).
//
// The testbench plays CPU, attack monitor and main memory.  Accesses are
// reads and writes; the monitor's attk flag is raised with the request for a
// chosen fraction of accesses.  Reference models, written independently of
// the RTL:
//   remap table   tag -> location; an attack on an unmapped tag must take a
//                 non-zero location different from the previous one and
//                 evicts any tag that held that location; a mapped tag always
//                 uses its location; unmapped tags without attack pass
//   cache         per-set recency lists (LRU), read-allocate, no
//                 write-allocate, indexed by the remapped address
//   memory        indexed by the remapped line address, as the cache sends it
// Every access checks the remapped address, the SCAAT enable, hit/miss, the
// memory line address of misses and writes, read data and (with an always-
// ready memory) the latency.  Each mechanism must occur at least once:
// pass-through, new remap, remap of a stored tag without attack, repeated
// attack on a stored tag, SCAAT entry overwritten, cache hit, miss, LRU
// eviction, write-through, memory stall.  The counts of attack occurrences
// (AO), SCAAT activations (SA: accesses that were remapped) and tags stored
// (ST) are printed.
module tb_scaat_top;
  import scaat_pkg::*;
  localparam int AB = 16, DB = 32, MB = 128, WORDS = 4, OB = 2;
  localparam int IB = 6, TB = 8, MAB = AB - OB, ASSOC = 4, SETS = 64;
  localparam int RD_DELAY = 2;

  logic clk = 1'b0;
  logic rst, attk;
  logic cpu_req, cpu_write, cpu_rdy, cpu_rstb;
  logic [AB-1:0] cpu_addr, scaat_out;
  logic [DB-1:0] cpu_wdata, cpu_rdata;
  logic mem_req, mem_write, mem_rdy, mem_rstb;
  logic [MAB-1:0] mem_addr;
  logic [MB-1:0] mem_wdata, mem_rdata;
  logic [WORDS-1:0] mem_wmask;
  logic cache_hit, cache_miss, found_in_scaat, scaat_en;
  scaat_mode_e scaat_mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaat_top dut (
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

  // ---------------- mechanism counters ----------------
  int n_pass, n_new, n_stored_noattk, n_stored_attk, n_overwrite;
  int n_hit, n_miss, n_evict, n_wthrough, n_stall, n_ao, n_sa;

  // ---------------- behavioural main memory ----------------
  logic [MB-1:0] mem [2 ** MAB];
  bit   random_stall;
  int   rd_count;
  logic [MB-1:0] rd_line;
  logic [MAB-1:0] last_mem_addr;
  int   mem_reqs;

  function automatic logic [MB-1:0] init_line(input int a);
    logic [MB-1:0] l;
    for (int w = 0; w < WORDS; w++) l[w*DB +: DB] = DB'(32'h9E37_79B9 * (a * WORDS + w + 1));
    return l;
  endfunction

  initial for (int a = 0; a < 2 ** MAB; a++) mem[a] = init_line(a);

  always @(negedge clk) mem_rdy <= random_stall ? ($urandom_range(0, 2) != 0) : 1'b1;

  always @(posedge clk) begin
    mem_rstb <= 1'b0;
    if (mem_req && !mem_rdy) n_stall++;
    if (rd_count > 0) begin
      rd_count <= rd_count - 1;
      if (rd_count == 1) begin
        mem_rstb  <= 1'b1;
        mem_rdata <= rd_line;
      end
    end
    if (mem_req && mem_rdy) begin
      last_mem_addr <= mem_addr;
      mem_reqs <= mem_reqs + 1;
      if (mem_write) begin
        for (int w = 0; w < WORDS; w++)
          if (mem_wmask[w]) mem[mem_addr][w*DB +: DB] <= mem_wdata[w*DB +: DB];
      end else begin
        rd_line  <= mem[mem_addr];
        rd_count <= random_stall ? $urandom_range(1, 4) : RD_DELAY - 1;
      end
    end
  end

  // ---------------- reference SCAAT map ----------------
  bit          mapped [2 ** TB];
  logic [IB-1:0] loc_of [2 ** TB];
  logic [IB-1:0] last_new;
  int          new_count;

  // ---------------- reference cache ----------------
  logic [TB-1:0] rtag [SETS][ASSOC];
  int            rcnt [SETS];

  function automatic bit ref_cache(input logic [AB-1:0] a, input bit wr, output bit evicted);
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

  // One access: request presented at a falling edge while the cache is idle,
  // so it is accepted at the next rising edge.
  task automatic access(input bit wr, input logic [AB-1:0] a, input logic [DB-1:0] d,
                        input bit attack, input bit timed);
    logic [TB-1:0] t;
    logic [AB-1:0] exp_addr;
    bit exp_hit, ev, exp_en;
    int lat, reqs0;
    logic [DB-1:0] exp_data;
    t = a[AB-1 -: TB];
    cpu_req = 1'b1; cpu_write = wr; cpu_addr = a; cpu_wdata = d; attk = attack;
    #1;
    check(cpu_rdy, "cache not idle");
    if (attack) n_ao++;
    exp_en = 1'b0;
    if (mapped[t]) begin
      exp_addr = {t, loc_of[t], a[OB-1:0]};
      if (attack) n_stored_attk++; else n_stored_noattk++;
      n_sa++;
    end else if (attack) begin
      logic [IB-1:0] l;
      l = scaat_out[OB +: IB];
      exp_en = 1'b1;
      check(l != '0, "location 0 chosen");
      check(new_count == 0 || l != last_new, "LFSR did not step");
      for (int k = 0; k < 2 ** TB; k++)
        if (mapped[k] && loc_of[k] == l) begin mapped[k] = 1'b0; n_overwrite++; end
      mapped[t] = 1'b1; loc_of[t] = l; last_new = l; new_count++;
      exp_addr = {t, l, a[OB-1:0]};
      n_new++; n_sa++;
    end else begin
      exp_addr = a;
      n_pass++;
    end
    check(scaat_out == exp_addr, $sformatf("address %h remapped to %h, expected %h", a, scaat_out, exp_addr));
    check(scaat_en == exp_en && found_in_scaat == (mapped[t] && !exp_en), "SCAAT enable / found");
    exp_hit = ref_cache(exp_addr, wr, ev);
    if (ev) n_evict++;
    check(cache_hit == exp_hit && cache_miss == !exp_hit,
          $sformatf("%s %h: hit %b expected %b", wr ? "write" : "read", exp_addr, cache_hit, exp_hit));
    if (exp_hit) n_hit++; else n_miss++;
    exp_data = mem[exp_addr[AB-1:OB]][exp_addr[OB-1:0]*DB +: DB];
    reqs0 = mem_reqs;
    @(negedge clk);
    cpu_req = 1'b0; attk = 1'b0;
    lat = 1;
    if (wr) begin
      while (!cpu_rdy) begin @(negedge clk); lat++; end
      if (timed) check(lat == 2, $sformatf("write latency %0d, expected 2", lat));
      n_wthrough++;
    end else begin
      while (!cpu_rstb && lat < 100) begin @(negedge clk); lat++; end
      check(cpu_rstb && cpu_rdata == exp_data,
            $sformatf("read %h: data %h expected %h", exp_addr, cpu_rdata, exp_data));
      if (timed) check(lat == (exp_hit ? 1 : 2 + RD_DELAY),
                       $sformatf("read %s latency %0d", exp_hit ? "hit" : "miss", lat));
    end
    if (wr || !exp_hit) begin
      check(mem_reqs == reqs0 + 1 && last_mem_addr == exp_addr[AB-1:OB],
            $sformatf("memory line %h, expected %h", last_mem_addr, exp_addr[AB-1:OB]));
    end else begin
      check(mem_reqs == reqs0, "memory accessed on a read hit");
    end
    @(negedge clk);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [AB-1:0] mk(input int tag, input int idx, input int off);
    return {TB'(tag), IB'(idx), OB'(off)};
  endfunction

  initial begin
    int hits_before, new_before;
    n_pass = 0; n_new = 0; n_stored_noattk = 0; n_stored_attk = 0; n_overwrite = 0;
    n_hit = 0; n_miss = 0; n_evict = 0; n_wthrough = 0; n_stall = 0; n_ao = 0; n_sa = 0;
    random_stall = 1'b0; rd_count = 0; mem_reqs = 0; last_mem_addr = '0;
    mem_rstb = 1'b0; mem_rdata = '0; rd_line = '0;
    foreach (mapped[i]) begin mapped[i] = 1'b0; loc_of[i] = '0; end
    for (int s = 0; s < SETS; s++) rcnt[s] = 0;
    last_new = '0; new_count = 0;
    rst = 1'b1; attk = 1'b0; cpu_req = 1'b0; cpu_write = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;

    // 1. the four-access sequence of one block: pass, attack, stored, attack again
    access(1'b1, mk(8'h07, 2, 1), 32'h1111_0000, 1'b0, 1'b1);
    access(1'b1, mk(8'h07, 2, 1), 32'h2222_0000, 1'b1, 1'b1);
    access(1'b1, mk(8'h07, 2, 1), 32'h3333_0000, 1'b0, 1'b1);
    new_before = n_new;
    access(1'b0, mk(8'h07, 2, 1), '0, 1'b1, 1'b1);
    check(n_new == new_before, "repeated attack remapped again");

    // 2. a block cached before the attack misses after it (its set changes)
    access(1'b0, mk(8'h21, 9, 0), '0, 1'b0, 1'b1);
    hits_before = n_hit;
    access(1'b0, mk(8'h21, 9, 0), '0, 1'b0, 1'b1);
    check(n_hit == hits_before + 1, "second read of a cached block did not hit");
    hits_before = n_hit;
    access(1'b0, mk(8'h21, 9, 0), '0, 1'b1, 1'b1);
    check(n_hit == hits_before, "read predicted to hit still hit after remapping");

    // 3. random workload, always-ready memory, timed: 40 tags, all sets
    for (int n = 0; n < 6000; n++)
      access($urandom_range(0, 3) == 0, mk($urandom_range(0, 39), $urandom_range(0, 63), $urandom_range(0, 3)),
             $urandom, $urandom_range(0, 19) == 0, 1'b1);

    // 4. attacks on many tags: the LFSR wraps and SCAAT entries are replaced
    random_stall = 1'b1;
    for (int n = 0; n < 6000; n++)
      access($urandom_range(0, 3) == 0, mk($urandom_range(0, 255), $urandom_range(0, 63), $urandom_range(0, 3)),
             $urandom, $urandom_range(0, 3) == 0, 1'b0);

    $display("AO (attack occurrences)   %0d", n_ao);
    $display("SA (SCAAT activations)    %0d", n_sa);
    $display("ST (tags stored at end)   %0d", $countones(dut.u_scaat.u_mem.valid_q));
    $display("pass %0d new %0d stored %0d stored+attack %0d overwritten %0d",
             n_pass, n_new, n_stored_noattk, n_stored_attk, n_overwrite);
    $display("hit %0d miss %0d evict %0d write-through %0d stall %0d  hit rate %0.3f",
             n_hit, n_miss, n_evict, n_wthrough, n_stall, real'(n_hit) / real'(n_hit + n_miss));
    check(n_pass > 0, "no pass-through access");
    check(n_new > 0, "no new remap");
    check(n_stored_noattk > 0, "no remap of a stored tag without attack");
    check(n_stored_attk > 0, "no repeated attack on a stored tag");
    check(n_overwrite > 0, "no SCAAT entry overwritten");
    check(n_hit > 0 && n_miss > 0, "no hit or no miss");
    check(n_evict > 0, "no eviction");
    check(n_wthrough > 0, "no write-through");
    check(n_stall > 0, "no memory stall");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
