// tb_scaat_unit: self-checking testbench of the SCAAT unit.
//
// Part 1 replays the four-access example: 8-bit addresses split into a 3-bit
// tag, 3-bit index and 2-bit offset, LFSR seeded with 101, four accesses to
// the block with tag 111 (index 010):
//   CASE1 write, no attack    address passes unchanged, nothing enabled
//   CASE2 write, attacked     index 101 from the LFSR in the same cycle, en
//                             for exactly one cycle, tag found at 101 from the
//                             next cycle, LFSR stepped
//   CASE3 write, no attack    found, index 101
//   CASE4 read, attacked      found, index 101, en stays low, LFSR not stepped
// (writes are held 3 cycles, reads 2).  Inputs change on the falling edge.
// Part 2 drives random addresses and attacks against a reference map of
// remapped tags: unmapped tags pass unchanged without attack; an attack on an
// unmapped tag takes a new location different from the previous one and
// evicts any tag mapped there; a mapped tag always gets its location.  Over
// the first seven new remaps all seven non-zero locations must appear.
module tb_scaat_unit;
  import scaat_pkg::*;
  logic clk = 1'b0;
  logic rst, attk;
  logic [7:0] cpu_addr, scaat_out;
  logic found, en;
  scaat_mode_e mode;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaat_unit #(.CPU_ADDR_BITS(8), .INDEX_BITS(3), .OFFSET_BITS(2), .LFSR_SEED(3'b101)) dut (
    .clk(clk), .rst(rst), .attk(attk), .cpu_addr(cpu_addr), .scaat_out(scaat_out),
    .found_in_scaat(found), .en(en), .mode(mode));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // count enable cycles
  int en_cycles = 0;
  always @(posedge clk) if (!rst && en) en_cycles++;

  localparam logic [7:0] A = {3'b111, 3'b010, 2'b01};

  // reference for part 2
  bit       mapped  [8];
  logic [2:0] loc_of [8];

  initial begin
    int en_before;
    logic [2:0] lfsr_after_case2;
    logic [2:0] last_new;
    bit seen_loc [8];
    int new_count;
    rst = 1'b1; attk = 1'b0; cpu_addr = '0;
    repeat (2) @(negedge clk);
    #1 rst = 1'b0;

    // CASE1: write, 3 cycles, no attack
    cpu_addr = A;
    for (int c = 0; c < 3; c++) begin
      #1 check(scaat_out == A && !found && !en && mode == SCAAT_PASS, $sformatf("CASE1 cycle %0d: out %b", c, scaat_out));
      @(negedge clk);
    end
    // CASE2: write, attack in its first cycle
    attk = 1'b1;
    #1 check(scaat_out == {3'b111, 3'b101, 2'b01} && en && !found, $sformatf("CASE2 first cycle: out %b en %b", scaat_out, en));
    check(mode == SCAAT_REMAP_NEW, "CASE2 mode");
    @(negedge clk);
    #1 attk = 1'b0;
    #1 check(found && !en && scaat_out == {3'b111, 3'b101, 2'b01}, "CASE2 second cycle: found at 101");
    check(dut.scaat_mem_out == 4'b1101, $sformatf("SCAAT_mem_out %b, expected 1101", dut.scaat_mem_out));
    lfsr_after_case2 = dut.lfsr_out;
    check(lfsr_after_case2 != 3'b101, "LFSR stepped after CASE2");
    @(negedge clk);
    #1 check(found && scaat_out == {3'b111, 3'b101, 2'b01}, "CASE2 third cycle");
    @(negedge clk);
    // CASE3: write, no attack
    for (int c = 0; c < 3; c++) begin
      #1 check(found && !en && scaat_out == {3'b111, 3'b101, 2'b01} && mode == SCAAT_REMAP_STORED, "CASE3");
      @(negedge clk);
    end
    // CASE4: read, attacked in both cycles
    attk = 1'b1;
    en_before = en_cycles;
    for (int c = 0; c < 2; c++) begin
      #1 check(found && !en && scaat_out == {3'b111, 3'b101, 2'b01}, "CASE4: no new remap");
      @(negedge clk);
    end
    #1 attk = 1'b0;
    check(en_cycles == en_before, "CASE4 enabled the LFSR/memory");
    check(dut.lfsr_out == lfsr_after_case2, "CASE4 stepped the LFSR");
    check(en_cycles == 1, $sformatf("en was high %0d cycles, expected 1", en_cycles));

    // Part 2: random traffic against the reference map
    rst = 1'b1; @(negedge clk); #1 rst = 1'b0;
    foreach (mapped[i]) begin mapped[i] = 1'b0; loc_of[i] = '0; end
    foreach (seen_loc[i]) seen_loc[i] = 1'b0;
    last_new = 3'b000;
    new_count = 0;
    for (int n = 0; n < 4000; n++) begin
      logic [2:0] t;
      logic [7:0] exp;
      cpu_addr = 8'($urandom);
      attk = ($urandom_range(0, 5) == 0);
      t = cpu_addr[7:5];
      #1;
      if (mapped[t]) begin
        exp = {t, loc_of[t], cpu_addr[1:0]};
        check(found && !en && scaat_out == exp, $sformatf("mapped tag %0d: out %b exp %b", t, scaat_out, exp));
      end else if (!attk) begin
        check(!found && !en && scaat_out == cpu_addr, "unmapped tag changed without attack");
      end else begin
        logic [2:0] l;
        l = scaat_out[4:2];
        check(!found && en, $sformatf("new remap: found %b en %b tag %0d out %b", found, en, t, scaat_out));
        check(scaat_out[7:5] == t && scaat_out[1:0] == cpu_addr[1:0], "new remap keeps tag/offset");
        check(l != 3'b000, "location 0 chosen");
        check(new_count == 0 || l != last_new, "LFSR did not step");
        if (new_count < 7) seen_loc[l] = 1'b1;
        new_count++;
        last_new = l;
        for (int k = 0; k < 8; k++) if (mapped[k] && loc_of[k] == l) mapped[k] = 1'b0;
        mapped[t] = 1'b1; loc_of[t] = l;
      end
      @(negedge clk);
    end
    check(new_count >= 7, "too few new remaps");
    for (int l = 1; l < 8; l++) check(seen_loc[l], $sformatf("location %0d never chosen in first 7 remaps", l));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
