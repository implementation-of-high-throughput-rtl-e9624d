// vd_pkg: constants and trellis helper functions shared by the hard-decision
// Viterbi encoder/decoder blocks.
//
// The code is the rate-1/2, constraint length K = 3 convolutional code with
// generator polynomials 101 and 111 (binary; 5 and 7 in octal).  A trellis
// state holds the last K-1 input bits with the most recent bit in the MSB:
//   state s = {x(n-1), ..., x(n-K+1)}
// The K-bit encoder window for input bit x is {x, s}; output bit Y0 is the
// parity of (window & G0) and Y1 the parity of (window & G1).  The received
// or transmitted symbol is written as the 2-bit value {Y1, Y0}.
//
// Path metrics are 8 bits wide: 7 bits of precision plus one extra bit for
// modulo (wrap-around) normalisation, as the design's ACS section specifies.
// Branch metrics are carried on 5 bits.  The survivor depth (15 = 5*K) and the
// T-algorithm purge threshold are this design's own choices.
package vd_pkg;

  parameter int unsigned K_DEF        = 3;      // constraint length
  parameter int unsigned G0_DEF       = 'b101;  // generator for Y0
  parameter int unsigned G1_DEF       = 'b111;  // generator for Y1
  parameter int unsigned PM_W_DEF     = 8;      // path metric width (7 + 1 modulo bit)
  parameter int unsigned BM_W_DEF     = 5;      // branch metric width
  parameter int unsigned DEPTH_DEF    = 15;     // survivor (register exchange) depth
  parameter int unsigned T_DEF        = 2;      // T-algorithm purge threshold

  // Number of trellis states for constraint length k.
  function automatic int unsigned num_states(input int unsigned k);
    return 1 << (k - 1);
  endfunction

  // Encoder output {Y1, Y0} when input bit x enters a coder in state s.
  function automatic logic [1:0] code_bits(input int unsigned k, input int unsigned g0,
                                           input int unsigned g1, input int unsigned s,
                                           input logic x);
    int unsigned window;
    window = (int'(x) << (k - 1)) | s;
    return {^(window & g1), ^(window & g0)};
  endfunction

  // Predecessor of state ns along the branch whose dropped (oldest) bit is b.
  function automatic int unsigned pred_state(input int unsigned k, input int unsigned ns,
                                             input logic b);
    return ((ns << 1) & ((1 << (k - 1)) - 1)) | int'(b);
  endfunction

  // Input bit carried by every branch that enters state ns (its MSB).
  function automatic logic in_bit_of(input int unsigned k, input int unsigned ns);
    return ns[k - 2];
  endfunction

endpackage
