// fp_pkg: constants shared by the digital-fingerprint blocks.
//
// The fingerprint circuit watches the 64 output bits of a 32-bit
// combinational multiplier. Two capture methods use them:
//  * nodal cumulative sampling (NCS): an 8-bit one-hot shift register per
//    output counts the transitions on that output (a base-8 digit), and
//  * transitional sampling (TS): one output is used as a clock that samples
//    all 64 outputs into 4-deep shift registers (samples n0..n3).
// The sizes below are the ones used in the evaluation of the method
// (32-bit multiplier, base-8 digits, four samples per trigger line).
// NCS_ID_LINES lists the 18 outputs whose digits were found stable and
// distinguishing across devices; they form the 54-bit ID. This list is a
// measurement result for one device family and is meant to be replaced
// after characterising other parts.
package fp_pkg;

  // Width of each multiplier operand.
  localparam int unsigned MULT_N    = 32;
  // Number of monitored signal lines (the product bits).
  localparam int unsigned N_LINES   = 2 * MULT_N;
  // One-hot register length: base-8 digit.
  localparam int unsigned OH_WIDTH  = 8;
  // Bits of one binary digit: log2(OH_WIDTH).
  localparam int unsigned DIGIT_W   = $clog2(OH_WIDTH);
  // Samples kept per line by transitional sampling.
  localparam int unsigned TS_DEPTH  = 4;
  // Width of the trigger-line selector.
  localparam int unsigned SEL_W     = $clog2(N_LINES);

  // Outputs used for the short ID, most significant digit first.
  localparam int unsigned N_ID_LINES = 18;
  typedef int unsigned id_list_t [N_ID_LINES];
  localparam id_list_t NCS_ID_LINES = '{51, 48, 47, 46, 42, 35, 34, 30, 27,
                                        25, 21, 19, 17, 14, 13, 11, 10,  9};
  localparam int unsigned ID_BITS = N_ID_LINES * DIGIT_W;   // 54

endpackage
