// id_select: builds the short NCS ID from chosen lines' digits.
//
// Of the 64 multiplier outputs only some give a digit that is both stable
// from run to run and different between devices. This block picks the digits
// of those lines (NCS_ID_LINES in fp_pkg: 18 lines) and concatenates them,
// the first listed line in the most significant digit, into a
// N_ID_LINES * DIGIT_W bit ID (54 bits). Purely combinational; the digits
// of the other lines are deliberately left unused.
// The line list and the 54-bit length follow the source design's
// characterisation; the digit order is this design's choice.
module id_select
  import fp_pkg::*;
(
  input  logic [N_LINES*DIGIT_W-1:0] digits,
  output logic [ID_BITS-1:0]         id
);

  for (genvar k = 0; k < N_ID_LINES; k++) begin : g_pick
    assign id[(N_ID_LINES-1-k)*DIGIT_W +: DIGIT_W] =
      digits[NCS_ID_LINES[k]*DIGIT_W +: DIGIT_W];
  end

endmodule
