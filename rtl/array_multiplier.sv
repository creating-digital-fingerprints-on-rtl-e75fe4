// array_multiplier: N x N unsigned combinational array multiplier.
//
// This is the test circuit whose 2N output bits are the monitored signal
// lines. Partial product row j is a & {N{b[j]}}. Row 0 is taken as the
// running sum; each further row j is added to the upper N bits of the
// running sum by a ripple_adder, whose carry out becomes the new top bit.
// The lowest bit of each running sum is final and drops out as product bit
// j. Because every row waits for the previous one and every row ripples,
// the product bits settle at staggered times; the low and the top few bits
// pass through few adders and therefore see few transitions.
// Interface: a, b in; p = a * b out; purely combinational, no clock.
// The operand width follows the source design (32 bits); the array
// structure is the simplest one built from ripple adders.
module array_multiplier #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  // acc[j] holds the N+1 bit partial sum after row j has been added,
  // already shifted so that its bit 0 has weight 2^j.
  logic [N:0] acc [N];

  assign acc[0] = {1'b0, a & {N{b[0]}}};
  assign p[0]   = acc[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N-1:0] s;
    logic         co;
    ripple_adder #(.W(N)) u_add (
      .a   (acc[j-1][N:1]),
      .b   (a & {N{b[j]}}),
      .cin (1'b0),
      .sum (s),
      .cout(co)
    );
    assign acc[j] = {co, s};
    assign p[j]   = s[0];
  end

  assign p[2*N-1:N] = acc[N-1][N:1];

endmodule
