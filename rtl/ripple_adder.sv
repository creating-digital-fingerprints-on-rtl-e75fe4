// ripple_adder: W-bit ripple-carry adder.
//
// A chain of full adders; the carry of bit i feeds bit i+1, so a change at
// bit 0 settles one full-adder delay later at every following bit. This
// staggered settling is what makes the outputs of the multiplier built from
// these adders glitch, and the glitches are what the fingerprint counts.
// The adder is plain combinational logic: a, b, cin in; sum, cout out, no
// clock. That the multiplier rows are ripple adders follows the source
// design; the full-adder equations are the textbook ones.
module ripple_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] sum,
  output logic         cout
);

  // c[i] is the carry into bit i; c[W] is the carry out.
  logic c [W+1];

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_fa
    assign sum[i]  = a[i] ^ b[i] ^ c[i];
    assign c[i+1]  = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];

endmodule
