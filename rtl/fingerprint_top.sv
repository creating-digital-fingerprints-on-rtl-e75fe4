// fingerprint_top: a test circuit with both fingerprint methods attached.
//
// The test circuit is a 32-bit combinational array multiplier. An operand
// register launches new operands on a clock edge when load is high; the
// product bits then settle through the ripple adders, and on silicon each
// bit glitches a device-dependent number of times on the way. All 64
// product bits are the monitored signal lines:
//  * ncs_fingerprint counts the 0->1 transitions of each line in a one-hot
//    register (one base-8 digit per line, ncs_id192 = all 64 digits);
//  * id_select keeps the 18 digits found usable, ncs_id54;
//  * ts_sampler uses the line chosen by trig_sel as a clock and samples all
//    64 lines into four 64-bit words ts_samples[0..3] (n0..n3).
// A measurement: hold clear high, release it while the operands are still,
// then pulse load with the new operands; the counts and samples can be read
// once the product has settled. clear resets both methods asynchronously;
// rst_n (asynchronous, active low) clears the operand register.
// The multiplier, both capture methods and their sizes follow the source
// design. The operand register, the run-time trigger multiplexer and the
// clear inputs are this design's choices: the source does not say how the
// multiplier was stimulated or how a measurement was started.
module fingerprint_top
  import fp_pkg::*;
(
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          load,
  input  logic [MULT_N-1:0]             a_in,
  input  logic [MULT_N-1:0]             b_in,
  input  logic                          clear,
  input  logic [SEL_W-1:0]              trig_sel,
  output logic [N_LINES-1:0]            product,
  output logic [N_LINES*OH_WIDTH-1:0]   ncs_raw,
  output logic [N_LINES*DIGIT_W-1:0]    ncs_id192,
  output logic [N_LINES-1:0]            ncs_valid,
  output logic [N_LINES-1:0]            ncs_overflow,
  output logic [ID_BITS-1:0]            ncs_id54,
  output logic [TS_DEPTH-1:0][N_LINES-1:0] ts_samples,
  output logic [$clog2(TS_DEPTH+1)-1:0] ts_n_trig
);

  logic [MULT_N-1:0] a_q, b_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0;
      b_q <= '0;
    end else if (load) begin
      a_q <= a_in;
      b_q <= b_in;
    end
  end

  array_multiplier #(.N(MULT_N)) u_mult (
    .a(a_q),
    .b(b_q),
    .p(product)
  );

  ncs_fingerprint #(.N_LINES(N_LINES), .OH_WIDTH(OH_WIDTH)) u_ncs (
    .lines   (product),
    .clear   (clear),
    .raw     (ncs_raw),
    .digits  (ncs_id192),
    .valid   (ncs_valid),
    .overflow(ncs_overflow)
  );

  id_select u_id (
    .digits(ncs_id192),
    .id    (ncs_id54)
  );

  ts_sampler #(.N_LINES(N_LINES), .DEPTH(TS_DEPTH)) u_ts (
    .lines   (product),
    .trig_sel(trig_sel),
    .clear   (clear),
    .samples (ts_samples),
    .n_trig  (ts_n_trig)
  );

endmodule
