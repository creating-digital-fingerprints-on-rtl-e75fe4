// onehot_to_bin: one-hot register value to a binary digit.
//
// Turns the contents of a one-hot transition-count register into the
// position of its '1', i.e. the base-WIDTH digit as log2(WIDTH) binary bits.
// This is how an ID made of base-8 digits becomes a binary ID three times as
// long. valid is high when exactly one bit is set; an all-zero input (the
// '1' has been shifted out, more than WIDTH-1 transitions) gives digit 0,
// valid low and overflow high. Purely combinational.
// The base-8 to binary conversion follows the source design; the valid and
// overflow flags are this design's additions.
module onehot_to_bin #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0]         onehot,
  output logic [$clog2(WIDTH)-1:0] digit,
  output logic                     valid,
  output logic                     overflow
);

  always_comb begin
    digit = '0;
    for (int unsigned i = 0; i < WIDTH; i++) begin
      if (onehot[i]) digit = digit | ($clog2(WIDTH))'(i);
    end
  end

  assign valid    = (onehot != '0) && ((onehot & (onehot - 1'b1)) == '0);
  assign overflow = (onehot == '0);

endmodule
