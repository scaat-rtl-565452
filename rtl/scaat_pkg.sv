// scaat_pkg: types and helper functions shared by the SCAAT unit and the cache.
//
// scaat_mode_e names the three things the SCAAT control logic can do with an
// address in a given cycle.  lfsr_taps() returns the feedback tap mask of a
// maximal-length XOR LFSR for widths 2 to 32 (tap k of the usual one-based
// tap lists is bit k-1 of the mask); the tap lists are the standard
// maximal-length polynomials, the choice of polynomial is this design's own.
package scaat_pkg;

  // What the control logic does with cpu_addr in the current cycle.
  typedef enum logic [1:0] {
    SCAAT_PASS         = 2'd0,  // no attack, tag not remapped: address unchanged
    SCAAT_REMAP_STORED = 2'd1,  // tag already in the SCAAT memory: use its location
    SCAAT_REMAP_NEW    = 2'd2   // attack on a new tag: use LFSR value, store the tag
  } scaat_mode_e;

  // Feedback taps of a maximal-length Fibonacci LFSR of the given width.
  function automatic logic [31:0] lfsr_taps(input int unsigned width);
    logic [31:0] m;
    m = '0;
    case (width)
      2:  m = (32'b1 << 1) | (32'b1 << 0);
      3:  m = (32'b1 << 2) | (32'b1 << 1);
      4:  m = (32'b1 << 3) | (32'b1 << 2);
      5:  m = (32'b1 << 4) | (32'b1 << 2);
      6:  m = (32'b1 << 5) | (32'b1 << 4);
      7:  m = (32'b1 << 6) | (32'b1 << 5);
      8:  m = (32'b1 << 7) | (32'b1 << 5) | (32'b1 << 4) | (32'b1 << 3);
      9:  m = (32'b1 << 8) | (32'b1 << 4);
      10: m = (32'b1 << 9) | (32'b1 << 6);
      11: m = (32'b1 << 10) | (32'b1 << 8);
      12: m = (32'b1 << 11) | (32'b1 << 5) | (32'b1 << 3) | (32'b1 << 0);
      13: m = (32'b1 << 12) | (32'b1 << 3) | (32'b1 << 2) | (32'b1 << 0);
      14: m = (32'b1 << 13) | (32'b1 << 4) | (32'b1 << 2) | (32'b1 << 0);
      15: m = (32'b1 << 14) | (32'b1 << 13);
      16: m = (32'b1 << 15) | (32'b1 << 14) | (32'b1 << 12) | (32'b1 << 3);
      17: m = (32'b1 << 16) | (32'b1 << 13);
      18: m = (32'b1 << 17) | (32'b1 << 10);
      19: m = (32'b1 << 18) | (32'b1 << 5) | (32'b1 << 1) | (32'b1 << 0);
      20: m = (32'b1 << 19) | (32'b1 << 16);
      21: m = (32'b1 << 20) | (32'b1 << 18);
      22: m = (32'b1 << 21) | (32'b1 << 20);
      23: m = (32'b1 << 22) | (32'b1 << 17);
      24: m = (32'b1 << 23) | (32'b1 << 22) | (32'b1 << 21) | (32'b1 << 16);
      25: m = (32'b1 << 24) | (32'b1 << 21);
      26: m = (32'b1 << 25) | (32'b1 << 5) | (32'b1 << 1) | (32'b1 << 0);
      27: m = (32'b1 << 26) | (32'b1 << 4) | (32'b1 << 1) | (32'b1 << 0);
      28: m = (32'b1 << 27) | (32'b1 << 24);
      29: m = (32'b1 << 28) | (32'b1 << 26);
      30: m = (32'b1 << 29) | (32'b1 << 5) | (32'b1 << 3) | (32'b1 << 0);
      31: m = (32'b1 << 30) | (32'b1 << 27);
      32: m = (32'b1 << 31) | (32'b1 << 21) | (32'b1 << 1) | (32'b1 << 0);
      default: m = '0;
    endcase
    return m;
  endfunction

endpackage
