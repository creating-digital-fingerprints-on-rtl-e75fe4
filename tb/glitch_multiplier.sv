// glitch_multiplier: timing model of the 32x32 array multiplier.
// Testbench model only. Same array as the synthesizable multiplier
// (partial-product rows, each added by a ripple chain of full adders) but
// every full adder is a delay_fa whose delays depend on `device`. A new
// operand pair therefore makes the product bits glitch in a pattern that
// differs from one modelled device to the next, like the real test circuit.
// The partial-product AND gates have no delay.
module glitch_multiplier #(
  parameter int unsigned N = 32
) (
  input  int unsigned    device,
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  logic [N:0] acc [N];

  assign acc[0] = {1'b0, a & {N{b[0]}}};
  assign p[0]   = acc[0][0];

  for (genvar j = 1; j < N; j++) begin : g_row
    logic [N-1:0] pp, s;
    logic [N:0]   c;
    assign pp   = a & {N{b[j]}};
    assign c[0] = 1'b0;
    for (genvar i = 0; i < N; i++) begin : g_fa
      delay_fa u_fa (
        .device(device), .row(j), .col(i),
        .a(acc[j-1][i+1]), .b(pp[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
    end
    assign acc[j] = {c[N], s};
    assign p[j]   = s[0];
  end

  assign p[2*N-1:N] = acc[N-1][N:1];
endmodule
