// tb_ncs_fingerprint: self-checking test of nodal cumulative sampling.
// Each of the 64 lines gets a random number (0..10) of pulses, interleaved
// between lines and of random widths. Expected digits, valid and overflow
// flags and the raw one-hot registers are derived from the pulse counts
// the testbench chose. Each round ends with a random subset of lines left
// high, so a rising edge without its falling edge must already count.
// Three rounds, each started with clear.
module tb_ncs_fingerprint;
  localparam int unsigned N  = 64;
  localparam int unsigned OW = 8;
  localparam int unsigned DW = 3;

  logic [N-1:0]    lines = '0;
  logic            clear = 1'b0;
  logic [N*OW-1:0] raw;
  logic [N*DW-1:0] digits;
  logic [N-1:0]    valid, overflow;
  int              checks = 0, failures = 0;
  int              n_ovf = 0;
  logic            clk = 1'b0;

  ncs_fingerprint #(.N_LINES(N), .OH_WIDTH(OW)) dut (
    .lines(lines), .clear(clear), .raw(raw), .digits(digits),
    .valid(valid), .overflow(overflow));

  always #5 clk = ~clk;

  initial begin
    int cnt [N];
    int left [N];
    for (int round = 0; round < 3; round++) begin
      lines = '0;
      #2 clear = 1'b1; #2 clear = 1'b0; #2;
      for (int i = 0; i < N; i++) begin
        cnt[i]  = (round == 0) ? i % 11 : int'($urandom_range(10));
        left[i] = cnt[i];
      end
      // Pulse all lines that still have pulses left, in random subsets.
      for (int step = 0; step < 40; step++) begin
        logic [N-1:0] m;
        m = '0;
        for (int i = 0; i < N; i++)
          if (left[i] > 0 && $urandom_range(1)) begin m[i] = 1'b1; left[i]--; end
        lines = lines | m; #($urandom_range(3) + 1);
        lines = '0;        #($urandom_range(3) + 1);
      end
      for (int i = 0; i < N; i++)
        while (left[i] > 0) begin
          lines[i] = 1'b1; #1; lines[i] = 1'b0; #1; left[i]--;
        end
      // Leave a random subset of lines high: one more rising edge each,
      // with no falling edge after it.
      begin
        logic [N-1:0] m;
        m = {$urandom, $urandom};
        for (int i = 0; i < N; i++) cnt[i] += int'(m[i]);
        lines = m;
      end
      #1;
      for (int i = 0; i < N; i++) begin
        logic [OW-1:0] exp_raw;
        exp_raw = cnt[i] < OW ? OW'(1) << cnt[i] : '0;
        checks++;
        if (raw[i*OW +: OW] !== exp_raw ||
            valid[i] !== (cnt[i] < OW) || overflow[i] !== (cnt[i] >= OW) ||
            digits[i*DW +: DW] !== (cnt[i] < OW ? DW'(cnt[i]) : '0)) begin
          failures++;
          $display("FAIL round %0d line %0d count %0d raw %b digit %0d", round, i, cnt[i],
                   raw[i*OW +: OW], digits[i*DW +: DW]);
        end
        if (cnt[i] >= OW) n_ovf++;
      end
    end
    checks++;
    if (n_ovf == 0) begin failures++; $display("FAIL no overflow exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
