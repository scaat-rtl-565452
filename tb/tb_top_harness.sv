// tb_top_harness: runs one scaat_top instance on a synthetic access stream.
//
// Used by tb_scaat_configs.  The stream comes from a fixed linear
// congruential generator, so every instance sees the same accesses: 3 in 4
// are reads, 7 in 8 fall in a hot region of 2 x CACHE_LINES words (some
// locality), the rest anywhere in the 16-bit word space.  With ATTACK set,
// attk is raised with 1 in 64 accesses; without it attk stays low and the
// system behaves as the plain cache.  A behavioural memory sits on the memory
// port.  Every read is checked against the memory word at the address the
// cache was actually given (scaat_out), and the SCAAT decision is checked
// against a reference remap table.  Outputs: hit and miss counts, new remaps,
// accesses remapped (SCAAT activations), attack occurrences.
module tb_top_harness #(
  parameter int LINES  = 256,
  parameter int ASSOC  = 4,
  parameter bit ATTACK = 1'b1,
  parameter int NOPS   = 20000
) (
  input  logic clk,
  input  logic rst,
  output logic done,
  output int   checks,
  output int   failures,
  output int   hits,
  output int   misses,
  output int   remaps,
  output int   activations,
  output int   attacks
);
  import scaat_pkg::*;
  localparam int AB = 16, DB = 32, MB = 128, WORDS = 4, OB = 2, MAB = AB - OB;
  localparam int SETS = LINES / ASSOC, IB = $clog2(SETS), TB = AB - IB - OB;

  logic attk, cpu_req, cpu_write, cpu_rdy, cpu_rstb;
  logic [AB-1:0] cpu_addr, scaat_out;
  logic [DB-1:0] cpu_wdata, cpu_rdata;
  logic mem_req, mem_write, mem_rdy, mem_rstb;
  logic [MAB-1:0] mem_addr;
  logic [MB-1:0] mem_wdata, mem_rdata;
  logic [WORDS-1:0] mem_wmask;
  logic cache_hit, cache_miss, found_in_scaat, scaat_en;
  scaat_mode_e scaat_mode;

  scaat_top #(.CACHE_LINES(LINES), .ASSOCIATIVITY(ASSOC)) dut (
    .clk(clk), .rst(rst), .attk(attk),
    .cpu_req(cpu_req), .cpu_write(cpu_write), .cpu_addr(cpu_addr), .cpu_wdata(cpu_wdata),
    .cpu_rdy(cpu_rdy), .cpu_rstb(cpu_rstb), .cpu_rdata(cpu_rdata),
    .mem_req(mem_req), .mem_write(mem_write), .mem_addr(mem_addr), .mem_wdata(mem_wdata),
    .mem_wmask(mem_wmask), .mem_rdy(mem_rdy), .mem_rstb(mem_rstb), .mem_rdata(mem_rdata),
    .cache_hit(cache_hit), .cache_miss(cache_miss), .scaat_out(scaat_out),
    .found_in_scaat(found_in_scaat), .scaat_en(scaat_en), .scaat_mode(scaat_mode));

  // memory: always ready, read data two cycles after the request
  logic [MB-1:0] mem [2 ** MAB];
  logic          rd_pend;
  logic [MB-1:0] rd_line;
  initial for (int a = 0; a < 2 ** MAB; a++)
    for (int w = 0; w < WORDS; w++) mem[a][w*DB +: DB] = DB'(32'h9E37_79B9 * (a * WORDS + w + 1));
  assign mem_rdy = 1'b1;
  always @(posedge clk) begin
    mem_rstb <= rd_pend;
    mem_rdata <= rd_line;
    rd_pend <= 1'b0;
    if (mem_req && mem_write) begin
      for (int w = 0; w < WORDS; w++)
        if (mem_wmask[w]) mem[mem_addr][w*DB +: DB] <= mem_wdata[w*DB +: DB];
    end else if (mem_req) begin
      rd_pend <= 1'b1;
      rd_line <= mem[mem_addr];
    end
  end

  // reference remap table
  bit            mapped [2 ** TB];
  logic [IB-1:0] loc_of [2 ** TB];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL (%0d lines %0d-way): %s", LINES, ASSOC, what); end
  endtask

  initial begin
    logic [31:0] lcg;
    logic [AB-1:0] a, exp_addr;
    logic [DB-1:0] exp_data;
    logic [TB-1:0] t;
    bit wr, at;
    done = 1'b0; checks = 0; failures = 0; hits = 0; misses = 0;
    remaps = 0; activations = 0; attacks = 0;
    attk = 1'b0; cpu_req = 1'b0; cpu_write = 1'b0; cpu_addr = '0; cpu_wdata = '0;
    rd_pend = 1'b0; rd_line = '0; mem_rstb = 1'b0; mem_rdata = '0;
    foreach (mapped[i]) begin mapped[i] = 1'b0; loc_of[i] = '0; end
    lcg = 32'h1234_5678;
    @(negedge rst);
    @(negedge clk);
    for (int n = 0; n < NOPS; n++) begin
      lcg = lcg * 32'd1664525 + 32'd1013904223;
      wr = (lcg[31:30] == 2'b00);
      at = ATTACK && (lcg[29:24] == 6'd0);
      if (lcg[23:21] != 3'b000) a = AB'(32'h4000 + (lcg[20:0] % (2 * LINES * WORDS)));
      else                      a = AB'(lcg[15:0] ^ lcg[31:16]);
      t = a[AB-1 -: TB];
      cpu_req = 1'b1; cpu_write = wr; cpu_addr = a; cpu_wdata = lcg; attk = at;
      #1;
      if (at) attacks++;
      if (mapped[t]) begin
        exp_addr = {t, loc_of[t], a[OB-1:0]};
        activations++;
      end else if (at) begin
        for (int k = 0; k < 2 ** TB; k++) if (mapped[k] && loc_of[k] == scaat_out[OB +: IB]) mapped[k] = 1'b0;
        mapped[t] = 1'b1; loc_of[t] = scaat_out[OB +: IB];
        exp_addr = {t, scaat_out[OB +: IB], a[OB-1:0]};
        activations++; remaps++;
      end else begin
        exp_addr = a;
      end
      check(cpu_rdy && scaat_out == exp_addr && scaat_en == (at && !found_in_scaat),
            $sformatf("address %h went to %h, expected %h", a, scaat_out, exp_addr));
      if (cache_hit) hits++;
      if (cache_miss) misses++;
      exp_data = mem[scaat_out[AB-1:OB]][scaat_out[OB-1:0]*DB +: DB];
      @(negedge clk);
      cpu_req = 1'b0; attk = 1'b0;
      if (wr) begin
        while (!cpu_rdy) @(negedge clk);
      end else begin
        while (!cpu_rstb) @(negedge clk);
        check(cpu_rdata == exp_data, $sformatf("read %h: %h expected %h", exp_addr, cpu_rdata, exp_data));
        @(negedge clk);
      end
    end
    done = 1'b1;
  end
endmodule
