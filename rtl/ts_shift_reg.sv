// ts_shift_reg: transitional-sampling shift register for one signal line.
//
// On each active transition of the trigger line the current value of the
// sampled line is shifted in. The register keeps the last DEPTH samples:
// q[0] is the oldest kept sample (n0) and q[DEPTH-1] the newest. Whether a
// sample catches the old or the new value of a line that changes close to
// the trigger edge depends on the device's delays and setup/hold times.
// Interface: trig is the clock; clear is asynchronous and active high and
// empties the register to zeros; line is the sampled data.
// Sampling on a circuit signal used as a clock follows the source design;
// the asynchronous clear, the sample order and the FALLING option are this
// design's choices.
module ts_shift_reg #(
  parameter int unsigned DEPTH   = 4,
  parameter bit          FALLING = 1'b0
) (
  input  logic             trig,
  input  logic             clear,
  input  logic             line,
  output logic [DEPTH-1:0] q
);

  logic edge_clk;
  assign edge_clk = FALLING ? ~trig : trig;

  // Shift towards index 0 so that after DEPTH triggers q[0] is the first.
  always_ff @(posedge edge_clk or posedge clear) begin
    if (clear) q <= '0;
    else       q <= {line, q[DEPTH-1:1]};
  end

endmodule
