// scaat_ctrl: control logic of the SCAAT unit.
//
// Every CPU address passes through here.  The address is split as
// {tag, index, offset}.  Each cycle one of three things happens:
//   SCAAT_PASS          no attack and the tag is not in the SCAAT memory:
//                       scaat_out = cpu_addr, LFSR and memory stay disabled.
//   SCAAT_REMAP_STORED  the tag is in the SCAAT memory (attack or not): the
//                       index bits are replaced by the stored location; the
//                       LFSR is not stepped, so a repeated attack on a
//                       remapped tag does not move it again.
//   SCAAT_REMAP_NEW     attack on a tag not yet stored: the index bits are
//                       replaced by the present LFSR value straight away, and
//                       en is raised so the tag is written at that location and
//                       the LFSR steps at the end of the cycle.
// The decision is purely combinational (cpu_addr to scaat_out in the same
// cycle), as in the document's timing diagram; tag and offset bits always
// pass unchanged.  The three cases and the enable rule (en = attk AND NOT
// found) follow the document; the address bit order {tag, index, offset} is
// the usual one and is this design's reading.
module scaat_ctrl
  import scaat_pkg::*;
#(
  parameter int unsigned CPU_ADDR_BITS = 16,
  parameter int unsigned INDEX_BITS    = 6,
  parameter int unsigned OFFSET_BITS   = 2
) (
  input  logic                     attk,
  input  logic [CPU_ADDR_BITS-1:0] cpu_addr,
  input  logic                     found_in_scaat,
  input  logic [INDEX_BITS-1:0]    scaat_loc,
  input  logic [INDEX_BITS-1:0]    lfsr_out,
  output logic                     en,
  output scaat_mode_e              mode,
  output logic [CPU_ADDR_BITS-1:0] scaat_out
);

  localparam int unsigned TAG_BITS = CPU_ADDR_BITS - INDEX_BITS - OFFSET_BITS;

  logic [TAG_BITS-1:0]    tag;
  logic [OFFSET_BITS-1:0] offset;

  assign tag    = cpu_addr[CPU_ADDR_BITS-1 -: TAG_BITS];
  assign offset = cpu_addr[OFFSET_BITS-1:0];

  always_comb begin
    if (found_in_scaat)  mode = SCAAT_REMAP_STORED;
    else if (attk)       mode = SCAAT_REMAP_NEW;
    else                 mode = SCAAT_PASS;
  end

  assign en = (mode == SCAAT_REMAP_NEW);

  always_comb begin
    unique case (mode)
      SCAAT_REMAP_STORED: scaat_out = {tag, scaat_loc, offset};
      SCAAT_REMAP_NEW:    scaat_out = {tag, lfsr_out, offset};
      default:            scaat_out = cpu_addr;
    endcase
  end

endmodule
