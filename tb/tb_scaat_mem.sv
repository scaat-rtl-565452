// tb_scaat_mem: self-checking testbench of the SCAAT memory.
//
// Default size (64 x 8).  A reference array of {valid, tag} per location is
// kept in the testbench.  Checks: nothing is found after reset (not even tag
// 0); a written tag is not visible in the write cycle and is found, with its
// location and the found MSB set, from the next cycle; overwriting a location
// drops the old tag; random writes and searches agree with the reference.
module tb_scaat_mem;
  localparam int IB = 6, TB = 8, DEPTH = 64;
  logic clk = 1'b0;
  logic rst, we;
  logic [IB-1:0] waddr;
  logic [TB-1:0] wdata, search_tag;
  logic [IB:0] mem_out;
  int checks = 0, failures = 0;

  bit            ref_valid [DEPTH];
  logic [TB-1:0] ref_tag   [DEPTH];

  always #5 clk = ~clk;

  scaat_mem #(.INDEX_BITS(IB), .TAG_BITS(TB)) dut (
    .clk(clk), .rst(rst), .we(we), .waddr(waddr), .wdata(wdata),
    .search_tag(search_tag), .mem_out(mem_out));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic [IB:0] expect_out(input logic [TB-1:0] t);
    for (int i = 0; i < DEPTH; i++)
      if (ref_valid[i] && ref_tag[i] == t) return {1'b1, IB'(i)};
    return '0;
  endfunction

  task automatic write(input logic [IB-1:0] a, input logic [TB-1:0] d);
    we = 1'b1; waddr = a; wdata = d;
    @(posedge clk); #1;
    we = 1'b0;
    // replacing: the reference never holds duplicates, drop an old copy
    for (int i = 0; i < DEPTH; i++) if (ref_tag[i] == d) ref_valid[i] = 1'b0;
    ref_valid[a] = 1'b1; ref_tag[a] = d;
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; we = 1'b0; waddr = '0; wdata = '0; search_tag = '0;
    foreach (ref_valid[i]) begin ref_valid[i] = 1'b0; ref_tag[i] = '0; end
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    for (int t = 0; t < 256; t++) begin
      search_tag = TB'(t); #1;
      check(mem_out == '0, $sformatf("tag %0h found after reset", t));
    end

    // write 0x77 at 5: not visible in the write cycle, visible after
    search_tag = 8'h77; we = 1'b1; waddr = 6'd5; wdata = 8'h77; #1;
    check(mem_out[IB] == 1'b0, "tag visible before the write edge");
    @(posedge clk); #1 we = 1'b0;
    ref_valid[5] = 1'b1; ref_tag[5] = 8'h77;
    check(mem_out == {1'b1, 6'd5}, $sformatf("tag 77 at 5, got %b", mem_out));
    // tag 0 at location 0
    write(6'd0, 8'h00);
    search_tag = 8'h00; #1;
    check(mem_out == {1'b1, 6'd0}, "tag 00 at location 0");
    // overwrite location 5 with another tag
    write(6'd5, 8'h12);
    search_tag = 8'h77; #1;
    check(mem_out[IB] == 1'b0, "overwritten tag still found");
    search_tag = 8'h12; #1;
    check(mem_out == {1'b1, 6'd5}, "new tag at 5");

    // random traffic against the reference
    for (int n = 0; n < 3000; n++) begin
      if ($urandom_range(0, 2) == 0) begin
        logic [TB-1:0] d;
        d = TB'($urandom);
        // the unit only writes tags that are not present
        if (expect_out(d) == '0) write(IB'($urandom), d);
      end
      search_tag = TB'($urandom_range(0, 255)); #1;
      check(mem_out == expect_out(search_tag),
            $sformatf("search %0h: got %b expected %b", search_tag, mem_out, expect_out(search_tag)));
    end

    // reset clears every entry
    rst = 1'b1; @(posedge clk); #1 rst = 1'b0;
    for (int t = 0; t < 256; t++) begin
      search_tag = TB'(t); #1;
      check(mem_out[IB] == 1'b0, "found after second reset");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
