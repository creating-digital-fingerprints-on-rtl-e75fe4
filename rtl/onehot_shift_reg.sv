// onehot_shift_reg: transition counter for one monitored signal line.
//
// The monitored line itself is the clock of this register. Clearing puts a
// single '1' in bit 0 (the LSB). Every active transition of the line shifts
// a '0' in at the LSB, so the '1' moves one place towards the MSB; after k
// transitions it sits in bit k. Transitions too short to meet the flip-flop
// setup/hold times are missed, which is what makes the final count depend on
// the individual device. After WIDTH transitions the '1' has left the
// register and q reads all zeros.
// Interface: line is the clock; clear is asynchronous and active high and
// must be released while line is quiet; q is the register contents.
// The one-hot structure, the LSB start value and the rising-edge default
// follow the source design; the asynchronous clear and the FALLING option
// (count 1->0 transitions instead) are this design's choices.
module onehot_shift_reg #(
  parameter int unsigned WIDTH   = 8,
  parameter bit          FALLING = 1'b0
) (
  input  logic             line,
  input  logic             clear,
  output logic [WIDTH-1:0] q
);

  logic edge_clk;
  assign edge_clk = FALLING ? ~line : line;

  always_ff @(posedge edge_clk or posedge clear) begin
    if (clear) q <= WIDTH'(1);
    else       q <= {q[WIDTH-2:0], 1'b0};
  end

endmodule
