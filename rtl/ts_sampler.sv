// ts_sampler: transitional sampling over N_LINES signal lines.
//
// One of the signal lines, chosen by trig_sel, acts as the clock: each of
// its active transitions samples every line (the trigger line included) into
// that line's DEPTH-deep ts_shift_reg. Sample k of all lines together is the
// N_LINES-bit word samples[k]; samples[0] is n0, the first of the last DEPTH
// captures. n_trig counts triggers since clear and saturates at DEPTH, so a
// reader can tell which samples hold data.
// Interface: lines are the monitored signals, trig_sel must be stable
// during a measurement, clear is asynchronous and active high.
// Using a circuit output as the sampling clock and four samples per trigger
// line follow the source design, which does not say how the trigger line
// was chosen; here trig_sel picks it at run time through a multiplexer,
// which is this design's choice, as are clear and n_trig.
module ts_sampler #(
  parameter int unsigned N_LINES = 64,
  parameter int unsigned DEPTH   = 4,
  parameter bit          FALLING = 1'b0,
  localparam int unsigned SEL_W  = $clog2(N_LINES),
  localparam int unsigned CNT_W  = $clog2(DEPTH + 1)
) (
  input  logic [N_LINES-1:0]              lines,
  input  logic [SEL_W-1:0]                trig_sel,
  input  logic                            clear,
  output logic [DEPTH-1:0][N_LINES-1:0]   samples,
  output logic [CNT_W-1:0]                n_trig
);

  logic trig;
  assign trig = lines[trig_sel];

  for (genvar i = 0; i < N_LINES; i++) begin : g_line
    logic [DEPTH-1:0] q;
    ts_shift_reg #(.DEPTH(DEPTH), .FALLING(FALLING)) u_sr (
      .trig (trig),
      .clear(clear),
      .line (lines[i]),
      .q    (q)
    );
    for (genvar k = 0; k < DEPTH; k++) begin : g_s
      assign samples[k][i] = q[k];
    end
  end

  logic edge_clk;
  assign edge_clk = FALLING ? ~trig : trig;

  always_ff @(posedge edge_clk or posedge clear) begin
    if (clear)                 n_trig <= '0;
    else if (n_trig != CNT_W'(DEPTH)) n_trig <= n_trig + 1'b1;
  end

endmodule
