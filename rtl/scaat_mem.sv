// scaat_mem: the SCAAT memory, a small content-searched tag store.
//
// DEPTH = 2^INDEX_BITS entries of TAG_BITS each, one per cache set.  It has a
// single write port (we, waddr, wdata: the tag under attack is written at
// the LFSR location on the rising clock edge) and a single read port that is
// a search: search_tag is compared with every valid entry in the same cycle,
// and mem_out = {found, location} gives the location of the matching entry
// with a found bit added as MSB ('1' found, '0' not found).  A tag written in
// cycle t is found from cycle t+1 on.
//
// Write port, search behaviour, data width, the location output and the
// found MSB follow the document.  Per-entry valid bits (cleared by the
// synchronous reset, so an empty entry never matches) and the lowest-index
// priority among several matches are choices of this design; the SCAAT
// control never writes a tag that is already present, so at most one valid
// entry matches.  Writing over an occupied location replaces that entry.
module scaat_mem #(
  parameter int unsigned INDEX_BITS = 6,
  parameter int unsigned TAG_BITS   = 8
) (
  input  logic                  clk,
  input  logic                  rst,
  input  logic                  we,
  input  logic [INDEX_BITS-1:0] waddr,
  input  logic [TAG_BITS-1:0]   wdata,
  input  logic [TAG_BITS-1:0]   search_tag,
  output logic [INDEX_BITS:0]   mem_out     // {found_in_SCAAT, location}
);

  localparam int unsigned DEPTH = 2 ** INDEX_BITS;

  logic [TAG_BITS-1:0] tag_q   [DEPTH];
  logic [DEPTH-1:0]    valid_q;

  always_ff @(posedge clk) begin
    if (we) tag_q[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (rst)     valid_q <= '0;
    else if (we) valid_q[waddr] <= 1'b1;
  end

  logic [DEPTH-1:0] match;

  always_comb begin
    for (int i = 0; i < DEPTH; i++) match[i] = valid_q[i] && tag_q[i] == search_tag;
  end

  always_comb begin
    mem_out = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (match[i]) mem_out = {1'b1, INDEX_BITS'(i)};
    end
  end

  // the SCAAT control never stores a tag twice
  a_single_match: assert property (@(posedge clk) disable iff (rst) $onehot0(match));
  a_no_duplicate_write: assert property (@(posedge clk) disable iff (rst) we |-> match == '0 || search_tag != wdata);

endmodule
