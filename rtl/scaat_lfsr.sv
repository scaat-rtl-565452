// scaat_lfsr: pseudo-random location generator of the SCAAT unit.
//
// A WIDTH-bit Fibonacci LFSR (WIDTH = INDEX_BITS of the cache).  Its present
// value, lfsr_out, is the cache set to which the next tag under attack is
// remapped.  When en is high the register steps to its next value at the
// rising clock edge ("at the end of the current clock cycle"); when en is low
// it holds.  Synchronous active-high reset loads SEED.
//
// The document fixes the width and the step-on-enable behaviour.  The
// polynomial (maximal length, period 2^WIDTH-1, see scaat_pkg::lfsr_taps),
// XOR feedback, the reset seed and the synchronous reset are choices of this
// design.  Because the state is never all-zero, location 0 is never chosen.
module scaat_lfsr
  import scaat_pkg::*;
#(
  parameter int unsigned      WIDTH = 6,
  parameter logic [WIDTH-1:0] SEED  = '1
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] lfsr_out
);

  localparam logic [WIDTH-1:0] TAPS = WIDTH'(lfsr_taps(WIDTH));

  logic [WIDTH-1:0] state_q;
  logic             feedback;

  assign feedback = ^(state_q & TAPS);

  always_ff @(posedge clk) begin
    if (rst)     state_q <= SEED;
    else if (en) state_q <= {state_q[WIDTH-2:0], feedback};
  end

  assign lfsr_out = state_q;

  initial begin
    assert (WIDTH >= 2 && WIDTH <= 32) else $fatal(1, "scaat_lfsr: WIDTH must be 2..32");
    assert (SEED != '0) else $fatal(1, "scaat_lfsr: SEED must be non-zero");
  end

endmodule
