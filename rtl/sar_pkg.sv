// sar_pkg: constants shared by the successive approximation register (SAR).
//
// The register has 15 output bits, OUT14 (most significant) to OUT0, as on
// the component symbol of the design. One extra token stage in front of the
// bits drives S_OUT, the start-of-conversion marker, so the one-hot token
// chain is SAR_BITS + 1 = 16 stages long: exactly two 8-bit shift registers.
package sar_pkg;
  // Number of output bits of the register (OUT14..OUT0).
  parameter int unsigned SAR_BITS = 15;
  // Width of one shift/storage register part in the token chain.
  parameter int unsigned SR_WIDTH = 8;
  // Rising S_IN edges after RESET is released until the code is final:
  // one to load the token, one to show it on S_OUT, one per bit, one to
  // close the last bit.
  function automatic int unsigned conv_edges(int unsigned n_bits);
    return n_bits + 3;
  endfunction
endpackage
