// delay_fa: behavioural full adder with device-dependent output delays.
// Testbench model only, not synthesizable. It stands in for one LUT-based
// full adder of a particular device: sum and carry follow the inputs after
// delays drawn from a hash of (device, row, col), so each modelled device
// has its own fixed delay pattern. Outputs use transport delay: every
// intermediate value, however short, reaches the output, which makes the
// ripple structure glitch the way the fingerprint relies on.
// Delays are in picoseconds: NOM_PS plus 0..SPREAD_PS-1.
module delay_fa #(
  parameter int unsigned NOM_PS    = 300,
  parameter int unsigned SPREAD_PS = 120
) (
  input  int unsigned device,
  input  int unsigned row,
  input  int unsigned col,
  input  logic        a,
  input  logic        b,
  input  logic        ci,
  output logic        s,
  output logic        co
);
  timeunit 1ps;
  timeprecision 1ps;

  // Small integer hash; any well-mixing function would do.
  function automatic int unsigned mix(input int unsigned x);
    x = x ^ (x >> 16);
    x = x * 32'h7feb352d;
    x = x ^ (x >> 15);
    x = x * 32'h846ca68b;
    x = x ^ (x >> 16);
    return x;
  endfunction

  int unsigned d_s, d_c;
  always_comb begin
    d_s = NOM_PS + mix(device * 32'h9e3779b9 ^ (row << 16) ^ (col << 1))      % SPREAD_PS;
    d_c = NOM_PS + mix(device * 32'h9e3779b9 ^ (row << 16) ^ (col << 1) ^ 1) % SPREAD_PS;
  end

  initial begin
    s  = 1'b0;
    co = 1'b0;
  end

  always @(a or b or ci) begin
    s  <= #(d_s) a ^ b ^ ci;
    co <= #(d_c) (a & b) | (a & ci) | (b & ci);
  end
endmodule
