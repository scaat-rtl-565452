// tb_scaat_ctrl: self-checking testbench of the SCAAT control logic.
//
// The control is combinational, so every combination of attk and
// found_in_scaat is applied with random addresses, locations and LFSR values
// (8-bit addresses: 3 tag, 3 index, 2 offset bits, and the default 16-bit
// layout).  Expected values follow the rules directly: en = attk & !found;
// the index field comes from the stored location if found, from the LFSR on
// a new attack, and is unchanged otherwise; tag and offset never change.
module tb_scaat_ctrl;
  import scaat_pkg::*;
  logic attk, found;
  logic [7:0] a8, o8;
  logic [2:0] loc3, lfsr3;
  logic en8;
  scaat_mode_e mode8;
  logic [15:0] a16, o16;
  logic [5:0] loc6, lfsr6;
  logic en16;
  scaat_mode_e mode16;
  int checks = 0, failures = 0;

  scaat_ctrl #(.CPU_ADDR_BITS(8), .INDEX_BITS(3), .OFFSET_BITS(2)) dut8 (
    .attk(attk), .cpu_addr(a8), .found_in_scaat(found), .scaat_loc(loc3),
    .lfsr_out(lfsr3), .en(en8), .mode(mode8), .scaat_out(o8));
  scaat_ctrl dut16 (
    .attk(attk), .cpu_addr(a16), .found_in_scaat(found), .scaat_loc(loc6),
    .lfsr_out(lfsr6), .en(en16), .mode(mode16), .scaat_out(o16));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] e8;
    logic [15:0] e16;
    for (int n = 0; n < 2000; n++) begin
      attk  = n[0];
      found = n[1];
      a8 = 8'($urandom); loc3 = 3'($urandom); lfsr3 = 3'($urandom);
      a16 = 16'($urandom); loc6 = 6'($urandom); lfsr6 = 6'($urandom);
      #1;
      e8 = a8;
      e16 = a16;
      if (found) begin
        e8[4:2] = loc3; e16[7:2] = loc6;
      end else if (attk) begin
        e8[4:2] = lfsr3; e16[7:2] = lfsr6;
      end
      check(o8 == e8, $sformatf("8-bit out %b expected %b (attk %b found %b)", o8, e8, attk, found));
      check(o16 == e16, $sformatf("16-bit out %h expected %h", o16, e16));
      check(en8 == (attk && !found) && en16 == (attk && !found), "en rule");
      check(mode8 == (found ? SCAAT_REMAP_STORED : attk ? SCAAT_REMAP_NEW : SCAAT_PASS), "mode");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
