// tb_scaat_lfsr: self-checking testbench of the SCAAT LFSR.
//
// Runs the default 6-bit LFSR and a 3-bit one (the width of the 3-bit
// example scenario) and checks: the reset value is the seed; the value holds
// while en is low; each enabled step is a one-bit left shift; the sequence
// never reaches zero and visits all 2^W-1 non-zero values exactly once before
// returning to the seed (maximal length).
module tb_scaat_lfsr;
  logic clk = 1'b0;
  logic rst;
  logic en6, en3;
  logic [5:0] out6;
  logic [2:0] out3;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scaat_lfsr #(.WIDTH(6)) dut6 (.clk(clk), .rst(rst), .en(en6), .lfsr_out(out6));
  scaat_lfsr #(.WIDTH(3), .SEED(3'b101)) dut3 (.clk(clk), .rst(rst), .en(en3), .lfsr_out(out3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit seen6 [64];
    bit seen3 [8];
    logic [5:0] prev6;
    logic [2:0] prev3;
    int period;
    rst = 1'b1; en6 = 1'b0; en3 = 1'b0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    check(out6 == 6'b111111, "6-bit reset value");
    check(out3 == 3'b101, "3-bit reset value");
    // hold while disabled
    repeat (5) @(posedge clk);
    #1 check(out6 == 6'b111111 && out3 == 3'b101, "hold while en=0");

    // 6-bit: full period
    foreach (seen6[i]) seen6[i] = 1'b0;
    period = 0;
    en6 = 1'b1;
    do begin
      prev6 = out6;
      check(!seen6[out6], $sformatf("6-bit value %0h repeated early", out6));
      seen6[out6] = 1'b1;
      @(posedge clk); #1;
      period++;
      check(out6[5:1] == prev6[4:0], "6-bit step is a left shift");
      check(out6 != 0, "6-bit never zero");
    end while (out6 != 6'b111111 && period < 100);
    check(period == 63, $sformatf("6-bit period %0d, expected 63", period));
    en6 = 1'b0;

    // 3-bit: full period, with en toggling
    foreach (seen3[i]) seen3[i] = 1'b0;
    period = 0;
    do begin
      prev3 = out3;
      seen3[out3] = 1'b1;
      en3 = 1'b1;
      @(posedge clk); #1;
      en3 = 1'b0;
      period++;
      check(out3[2:1] == prev3[1:0], "3-bit step is a left shift");
      prev3 = out3;
      @(posedge clk); #1;
      check(out3 == prev3, "3-bit holds when en drops");
    end while (out3 != 3'b101 && period < 20);
    check(period == 7, $sformatf("3-bit period %0d, expected 7", period));
    for (int i = 1; i < 8; i++) check(seen3[i], $sformatf("3-bit value %0d visited", i));

    // reset mid-sequence returns to the seed
    en6 = 1'b1;
    repeat (3) @(posedge clk);
    #1 rst = 1'b1; en6 = 1'b0;
    @(posedge clk); #1 rst = 1'b0;
    check(out6 == 6'b111111, "reset reloads seed");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
