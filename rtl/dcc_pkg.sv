// dcc_pkg: constants and helper functions shared by the decimal convolutional
// encoder and its Viterbi decoder.
//
// A decimal convolutional code runs a rate-1/2 code with constraint length K1
// for the first BS-1 stages of every L-stage frame and with K2 = K1-1 from the
// break stage BS on. The defaults describe the decimal code of constraint
// length 6.3 = 6 + (10-1)/30 (K1 = 7, K2 = K1-1 = 6, L = 30, BS = 10), the code the
// hardware evaluation uses. The generator polynomials (171, 133 octal, the
// usual K = 7 pair) and the 3-bit soft-decision width are choices of this
// design; the code after the break stage uses the same generators with their
// oldest tap removed.
//
// Bit conventions used everywhere:
//   * a state of M = K-1 bits holds past inputs, MSB = newest, LSB = oldest;
//   * the encoder register vector of a stage is {u_t, state}, K bits;
//   * generator bit K-1 taps u_t, bit 0 taps the oldest input;
//   * a code symbol is {c0, c1}, c0 from G0, c1 from G1; c0 is sent first.
package dcc_pkg;

  localparam int DEF_K1 = 7;           // constraint length before the break stage
  localparam int DEF_L  = 30;          // frame length in trellis stages
  localparam int DEF_BS = 10;          // break stage (1-based)
  localparam int DEF_Q  = 3;           // soft-decision input width
  localparam int DEF_REP = 4;          // repetitions of the latent bit per frame
  localparam logic [31:0] DEF_G0 = 32'o171;
  localparam logic [31:0] DEF_G1 = 32'o133;

  // Which trellis a stage belongs to: the full trellis before the break
  // stage, the break stage itself (four-way merge), or the halved trellis.
  typedef enum logic [1:0] {
    ST_FULL    = 2'd0,
    ST_BREAK   = 2'd1,
    ST_REDUCED = 2'd2
  } stage_mode_t;

  // Even parity of a 32-bit vector.
  function automatic logic parity32(input logic [31:0] v);
    return ^v;
  endfunction

  // Code symbol {c0, c1} for register vector vec under generators g0/g1.
  function automatic logic [1:0] code_sym(input logic [31:0] vec,
                                          input logic [31:0] g0,
                                          input logic [31:0] g1);
    return {^(vec & g0), ^(vec & g1)};
  endfunction

  // Width of a path metric that holds any real metric of an L-stage frame
  // plus the "unreachable" start value, without wrapping.
  function automatic int pm_width(input int l, input int q);
    int maxpm;
    maxpm = l * 2 * ((1 << q) - 1);
    return $clog2(maxpm + 1) + 1;
  endfunction

endpackage
