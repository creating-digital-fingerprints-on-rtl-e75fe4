// ncs_fingerprint: nodal cumulative sampling over N_LINES signal lines.
//
// Every signal line clocks its own one-hot shift register (onehot_shift_reg)
// that counts the line's transitions; each register is converted into a
// binary digit (onehot_to_bin). The digits side by side are the fingerprint:
// line i occupies digits[i*DIGIT_W +: DIGIT_W], so 64 lines of base-8 digits
// give a 192-bit ID. raw exposes the one-hot registers themselves, as they
// were read out in the original measurements.
// Interface: lines are the monitored signals (each one a clock), clear is an
// asynchronous active-high start of a measurement; all outputs follow the
// registers combinationally. The structure follows the source design; the
// per-line valid/overflow flags are additions of this design.
module ncs_fingerprint #(
  parameter int unsigned N_LINES  = 64,
  parameter int unsigned OH_WIDTH = 8,
  parameter bit          FALLING  = 1'b0,
  localparam int unsigned DIGIT_W = $clog2(OH_WIDTH)
) (
  input  logic [N_LINES-1:0]          lines,
  input  logic                        clear,
  output logic [N_LINES*OH_WIDTH-1:0] raw,
  output logic [N_LINES*DIGIT_W-1:0]  digits,
  output logic [N_LINES-1:0]          valid,
  output logic [N_LINES-1:0]          overflow
);

  for (genvar i = 0; i < N_LINES; i++) begin : g_line
    logic [OH_WIDTH-1:0] q;

    onehot_shift_reg #(.WIDTH(OH_WIDTH), .FALLING(FALLING)) u_sr (
      .line (lines[i]),
      .clear(clear),
      .q    (q)
    );

    onehot_to_bin #(.WIDTH(OH_WIDTH)) u_bin (
      .onehot  (q),
      .digit   (digits[i*DIGIT_W +: DIGIT_W]),
      .valid   (valid[i]),
      .overflow(overflow[i])
    );

    assign raw[i*OH_WIDTH +: OH_WIDTH] = q;
  end

endmodule
