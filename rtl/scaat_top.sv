// scaat_top: the SCAAT secure cache system.
//
// A SCAAT unit (scaat_unit) is fitted to the CPU-side address port of an
// unmodified set-associative cache (scaat_cache).  Every CPU address goes
// through the unit; while the external attack monitor holds attk for an
// access to a tag that has not been remapped, the unit sends the access to a
// random cache set (LFSR value) and records the tag in its SCAAT memory at
// that set number; from then on every access with that tag, attacked or not,
// goes to the recorded set.  Only the index bits change; tag and word offset
// pass through.  The cache is not aware of the remapping: it sees, and sends
// to main memory, the remapped address.
//
// The attack monitor, the CPU and main memory are outside this module: attk
// is an input, and the CPU and memory ports of the cache are brought out.
// cache_hit/cache_miss (the behaviour a monitor observes) and the SCAAT
// status signals are outputs for observation.
//
// Timing: cpu_addr to the cache address is combinational; the cache samples
// it when it accepts a request (cpu_req && cpu_rdy).  Read hit: data 1 cycle
// after acceptance; write: cpu_rdy again 2 cycles after acceptance with an
// always-ready memory.
//
// Defaults are the 4-way, 256-line, 4 KB configuration with a 16-bit CPU
// word address, 32-bit CPU data and 128-bit lines: 64 sets, so INDEX_BITS =
// 6, OFFSET_BITS = 2, TAG_BITS = 8 and a 64-entry x 8-bit SCAAT memory.
module scaat_top
  import scaat_pkg::*;
#(
  parameter int unsigned CACHE_LINES   = 256,
  parameter int unsigned ASSOCIATIVITY = 4,
  parameter int unsigned CPU_ADDR_BITS = 16,
  parameter int unsigned CPU_DATA_BITS = 32,
  parameter int unsigned MEM_DATA_BITS = 128,
  localparam int unsigned CACHE_SETS    = CACHE_LINES / ASSOCIATIVITY,
  localparam int unsigned WORDS         = MEM_DATA_BITS / CPU_DATA_BITS,
  localparam int unsigned OFFSET_BITS   = $clog2(WORDS),
  localparam int unsigned INDEX_BITS    = $clog2(CACHE_SETS),
  localparam int unsigned MEM_ADDR_BITS = CPU_ADDR_BITS - OFFSET_BITS,
  parameter logic [INDEX_BITS-1:0] LFSR_SEED = '1
) (
  input  logic                     clk,
  input  logic                     rst,
  // attack monitor
  input  logic                     attk,
  // CPU side
  input  logic                     cpu_req,
  input  logic                     cpu_write,
  input  logic [CPU_ADDR_BITS-1:0] cpu_addr,
  input  logic [CPU_DATA_BITS-1:0] cpu_wdata,
  output logic                     cpu_rdy,
  output logic                     cpu_rstb,
  output logic [CPU_DATA_BITS-1:0] cpu_rdata,
  // main memory side
  output logic                     mem_req,
  output logic                     mem_write,
  output logic [MEM_ADDR_BITS-1:0] mem_addr,
  output logic [MEM_DATA_BITS-1:0] mem_wdata,
  output logic [WORDS-1:0]         mem_wmask,
  input  logic                     mem_rdy,
  input  logic                     mem_rstb,
  input  logic [MEM_DATA_BITS-1:0] mem_rdata,
  // observation
  output logic                     cache_hit,
  output logic                     cache_miss,
  output logic [CPU_ADDR_BITS-1:0] scaat_out,
  output logic                     found_in_scaat,
  output logic                     scaat_en,
  output scaat_mode_e              scaat_mode
);

  scaat_unit #(
    .CPU_ADDR_BITS (CPU_ADDR_BITS),
    .INDEX_BITS    (INDEX_BITS),
    .OFFSET_BITS   (OFFSET_BITS),
    .LFSR_SEED     (LFSR_SEED)
  ) u_scaat (
    .clk            (clk),
    .rst            (rst),
    .attk           (attk),
    .cpu_addr       (cpu_addr),
    .scaat_out      (scaat_out),
    .found_in_scaat (found_in_scaat),
    .en             (scaat_en),
    .mode           (scaat_mode)
  );

  scaat_cache #(
    .CACHE_LINES   (CACHE_LINES),
    .ASSOCIATIVITY (ASSOCIATIVITY),
    .CPU_ADDR_BITS (CPU_ADDR_BITS),
    .CPU_DATA_BITS (CPU_DATA_BITS),
    .MEM_DATA_BITS (MEM_DATA_BITS)
  ) u_cache (
    .clk        (clk),
    .rst        (rst),
    .cpu_req    (cpu_req),
    .cpu_write  (cpu_write),
    .cpu_addr   (scaat_out),
    .cpu_wdata  (cpu_wdata),
    .cpu_rdy    (cpu_rdy),
    .cpu_rstb   (cpu_rstb),
    .cpu_rdata  (cpu_rdata),
    .mem_req    (mem_req),
    .mem_write  (mem_write),
    .mem_addr   (mem_addr),
    .mem_wdata  (mem_wdata),
    .mem_wmask  (mem_wmask),
    .mem_rdy    (mem_rdy),
    .mem_rstb   (mem_rstb),
    .mem_rdata  (mem_rdata),
    .cache_hit  (cache_hit),
    .cache_miss (cache_miss)
  );

endmodule
