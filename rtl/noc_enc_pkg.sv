// Shared definitions for the coupling-aware flit encoders.
//
// The link carries the payload on its low lines and one (Scheme I) or two
// (Schemes II and III) control lines on top. Every control line starts as a
// zero that the encoder inverts together with the other lines of its parity,
// so a control line sitting at an odd index reports an odd inversion and one
// at an even index reports an even inversion. A full inversion is an odd and
// an even inversion at once. The 2-bit action code below is {odd, even}, the
// order of the Module C outputs: 10 odd, 01 even, 11 full, 00 none.
package noc_enc_pkg;

  typedef enum logic [1:0] {
    INV_NONE = 2'b00,
    INV_EVEN = 2'b01,
    INV_ODD  = 2'b10,
    INV_FULL = 2'b11
  } inv_action_e;

  // Link width of a scheme for payload width W-1: Scheme I adds one control
  // line (W lines in all), Schemes II and III add two (W+1 lines).
  function automatic int unsigned link_width(int unsigned scheme, int unsigned w);
    return (scheme == 1) ? w : w + 1;
  endfunction

endpackage
