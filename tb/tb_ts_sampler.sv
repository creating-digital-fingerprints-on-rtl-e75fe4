// tb_ts_sampler: self-checking test of the transitional-sampling bank.
// For several trigger lines, the other 63 lines are set to random words and
// then only the trigger line rises. The testbench records the 64-bit word
// present after each rising edge (the trigger line reads '1' in its own
// sample) and checks samples[0..3] against the last four, and n_trig
// against min(edges, 4). Lines also change while the trigger is high or
// falling, which must not be captured.
module tb_ts_sampler;
  localparam int unsigned N     = 64;
  localparam int unsigned DEPTH = 4;

  logic [N-1:0]            lines = '0;
  logic [5:0]              trig_sel = '0;
  logic                    clear = 1'b0;
  logic [DEPTH-1:0][N-1:0] samples;
  logic [2:0]              n_trig;
  int                      checks = 0, failures = 0;
  logic                    clk = 1'b0;

  ts_sampler #(.N_LINES(N), .DEPTH(DEPTH)) dut (
    .lines(lines), .trig_sel(trig_sel), .clear(clear), .samples(samples), .n_trig(n_trig));

  always #5 clk = ~clk;

  function automatic logic [N-1:0] rnd64();
    return {$urandom, $urandom};
  endfunction

  initial begin
    int sels [5] = '{2, 25, 24, 63, 0};
    for (int r = 0; r < 5; r++) begin
      logic [N-1:0] hist [$];
      hist.delete();
      trig_sel = 6'(sels[r]);
      lines = '0;
      #2 clear = 1'b1; #2 clear = 1'b0; #2;
      for (int k = 0; k < 2 + 2 * r; k++) begin
        logic [N-1:0] w;
        w = rnd64();
        w[sels[r]] = 1'b0;
        lines = w; #2;
        lines[sels[r]] = 1'b1;                 // trigger edge
        hist.push_back(lines);
        #1 lines = rnd64() | (N'(1) << sels[r]);  // change while high
        #2 lines[sels[r]] = 1'b0;
        #2;
        checks++;
        if (n_trig !== 3'((k + 1) < DEPTH ? k + 1 : DEPTH)) begin
          failures++;
          $display("FAIL sel %0d edge %0d n_trig=%0d", sels[r], k, n_trig);
        end
        for (int s = 0; s < DEPTH; s++) begin
          logic [N-1:0] exp;
          int idx;
          idx = hist.size() - DEPTH + s;     // oldest kept sample in slot 0
          exp = idx >= 0 ? hist[idx] : '0;
          checks++;
          if (samples[s] !== exp) begin
            failures++;
            $display("FAIL sel %0d edge %0d n%0d=%h exp %h", sels[r], k, s, samples[s], exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
