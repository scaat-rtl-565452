// scaat_unit: Secure Cache Alternative Address Table unit.
//
// Sits between the CPU and the cache address port.  Inputs are clk, rst,
// the monitor's attack flag attk and cpu_addr; the output scaat_out drives the
// cache address.  The tag bits of cpu_addr are searched in the SCAAT memory
// (scaat_mem); the control logic (scaat_ctrl) either passes the address on,
// substitutes the stored location for the index bits, or, on an attack on a
// tag not yet stored, substitutes the LFSR value (scaat_lfsr) and enables the
// LFSR and the memory so that the tag is stored at that location and a fresh
// random value is ready by the next cycle.  cpu_addr to scaat_out is
// combinational; the stored tag is visible to the search one cycle later and
// then yields the same location, so the remapped address does not change
// while an access is held.
//
// Status outputs (found_in_scaat, en, mode) are brought out for observation;
// they are additions of this design.  Default sizes are those of the 16-bit,
// 4-way, 256-line configuration: INDEX_BITS = 6, OFFSET_BITS = 2, TAG_BITS = 8.
module scaat_unit
  import scaat_pkg::*;
#(
  parameter int unsigned           CPU_ADDR_BITS = 16,
  parameter int unsigned           INDEX_BITS    = 6,
  parameter int unsigned           OFFSET_BITS   = 2,
  parameter logic [INDEX_BITS-1:0] LFSR_SEED     = '1
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     attk,
  input  logic [CPU_ADDR_BITS-1:0] cpu_addr,
  output logic [CPU_ADDR_BITS-1:0] scaat_out,
  output logic                     found_in_scaat,
  output logic                     en,
  output scaat_mode_e              mode
);

  localparam int unsigned TAG_BITS = CPU_ADDR_BITS - INDEX_BITS - OFFSET_BITS;

  logic [INDEX_BITS-1:0] lfsr_out;
  logic [INDEX_BITS:0]   scaat_mem_out;
  logic [TAG_BITS-1:0]   tag;

  assign tag            = cpu_addr[CPU_ADDR_BITS-1 -: TAG_BITS];
  assign found_in_scaat = scaat_mem_out[INDEX_BITS];

  scaat_lfsr #(
    .WIDTH (INDEX_BITS),
    .SEED  (LFSR_SEED)
  ) u_lfsr (
    .clk      (clk),
    .rst      (rst),
    .en       (en),
    .lfsr_out (lfsr_out)
  );

  scaat_mem #(
    .INDEX_BITS (INDEX_BITS),
    .TAG_BITS   (TAG_BITS)
  ) u_mem (
    .clk        (clk),
    .rst        (rst),
    .we         (en),
    .waddr      (lfsr_out),
    .wdata      (tag),
    .search_tag (tag),
    .mem_out    (scaat_mem_out)
  );

  scaat_ctrl #(
    .CPU_ADDR_BITS (CPU_ADDR_BITS),
    .INDEX_BITS    (INDEX_BITS),
    .OFFSET_BITS   (OFFSET_BITS)
  ) u_ctrl (
    .attk           (attk),
    .cpu_addr       (cpu_addr),
    .found_in_scaat (found_in_scaat),
    .scaat_loc      (scaat_mem_out[INDEX_BITS-1:0]),
    .lfsr_out       (lfsr_out),
    .en             (en),
    .mode           (mode),
    .scaat_out      (scaat_out)
  );

  // a tag stored in one cycle is found in the next if it is still presented
  a_found_after_store: assert property (@(posedge clk) disable iff (rst)
    en |=> (tag != $past(tag)) || found_in_scaat);

endmodule
