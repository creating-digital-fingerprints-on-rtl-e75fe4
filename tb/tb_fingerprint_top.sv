// tb_fingerprint_top: end-to-end test of the fingerprint circuit at its
// default sizes (32-bit multiplier, 64 lines, base-8 digits, 4 samples).
// Three measurements are run, each started with clear and a different
// trigger line. In each, a sequence of operand pairs is loaded, with idle
// cycles (load low) in between. The testbench computes every product with
// the * operator and, from consecutive products, the 0->1 transitions of
// each output bit. From these it predicts the one-hot registers, the
// 192-bit and 54-bit IDs, the valid/overflow flags and the four
// transitional samples (the product words present at the last four rising
// edges of the trigger line), and checks all of them and the product.
// In zero-delay simulation every product bit changes at most once per new
// operand pair, so the counts are those of glitch-free logic; the device-
// dependent glitches of real silicon are not modelled.
// Mechanisms that must occur at least once: a counted transition, a count
// overflowing the 8-bit one-hot register, a sample window rolling over
// (more than 4 trigger edges), an idle cycle, and a change of trigger line.
module tb_fingerprint_top;
  import fp_pkg::*;

  logic                            clk = 1'b0, rst_n = 1'b0, load = 1'b0, clear = 1'b0;
  logic [31:0]                     a_in = '0, b_in = '0;
  logic [5:0]                      trig_sel = '0;
  logic [63:0]                     product;
  logic [511:0]                    ncs_raw;
  logic [191:0]                    ncs_id192;
  logic [63:0]                     ncs_valid, ncs_overflow;
  logic [53:0]                     ncs_id54;
  logic [3:0][63:0]                ts_samples;
  logic [2:0]                      ts_n_trig;

  int checks = 0, failures = 0;
  int n_counted = 0, n_overflow = 0, n_roll = 0, n_idle = 0, n_sel_change = 0;

  fingerprint_top dut (
    .clk(clk), .rst_n(rst_n), .load(load), .a_in(a_in), .b_in(b_in), .clear(clear),
    .trig_sel(trig_sel), .product(product), .ncs_raw(ncs_raw), .ncs_id192(ncs_id192),
    .ncs_valid(ncs_valid), .ncs_overflow(ncs_overflow), .ncs_id54(ncs_id54),
    .ts_samples(ts_samples), .ts_n_trig(ts_n_trig));

  always #5 clk = ~clk;

  logic [63:0] cur = '0;   // product the testbench expects now

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One measurement of n operand pairs; mode 0 alternates zero operands
  // with random ones (many transitions per line), mode 1 is fully random.
  task automatic measure(input int sel, input int n, input int mode);
    int cnt [64];
    logic [63:0] hist [$];
    int edges;
    int id_lines [18] = '{51, 48, 47, 46, 42, 35, 34, 30, 27, 25, 21, 19, 17, 14, 13, 11, 10, 9};
    logic [53:0] exp_id;
    if (6'(sel) != trig_sel) n_sel_change++;
    trig_sel = 6'(sel);
    @(negedge clk) clear = 1'b1;
    @(negedge clk) clear = 1'b0;
    foreach (cnt[i]) cnt[i] = 0;
    edges = 0;
    for (int v = 0; v < n; v++) begin
      logic [31:0] x, y;
      logic [63:0] nxt, rise;
      if (mode == 0 && v % 2 == 0) begin x = '0; y = $urandom; end
      else begin x = $urandom; y = $urandom; end
      @(negedge clk) begin load = 1'b1; a_in = x; b_in = y; end
      @(negedge clk) load = 1'b0;
      nxt  = {32'd0, x} * {32'd0, y};
      rise = ~cur & nxt;
      for (int i = 0; i < 64; i++) cnt[i] += int'(rise[i]);
      if (rise[sel]) begin hist.push_back(nxt); edges++; end
      cur = nxt;
      chk(product === cur, $sformatf("product %h exp %h", product, cur));
      if (v % 3 == 2) begin   // idle cycle: new inputs but load low
        a_in = $urandom; b_in = $urandom;
        @(negedge clk);
        n_idle++;
        chk(product === cur, "product changed without load");
      end
    end
    for (int i = 0; i < 64; i++) begin
      logic [7:0] er;
      er = cnt[i] < 8 ? 8'(1) << cnt[i] : '0;
      chk(ncs_raw[i*8 +: 8] === er,
          $sformatf("sel %0d line %0d raw %b exp %b", sel, i, ncs_raw[i*8 +: 8], er));
      chk(ncs_id192[i*3 +: 3] === (cnt[i] < 8 ? 3'(cnt[i]) : 3'd0) &&
          ncs_valid[i] === (cnt[i] < 8) && ncs_overflow[i] === (cnt[i] >= 8),
          $sformatf("line %0d digit %0d count %0d", i, ncs_id192[i*3 +: 3], cnt[i]));
      if (cnt[i] > 0) n_counted++;
      if (cnt[i] >= 8) n_overflow++;
    end
    for (int k = 0; k < 18; k++)
      exp_id[(17-k)*3 +: 3] = cnt[id_lines[k]] < 8 ? 3'(cnt[id_lines[k]]) : 3'd0;
    chk(ncs_id54 === exp_id, $sformatf("id54 %h exp %h", ncs_id54, exp_id));
    chk(ts_n_trig === 3'(edges < 4 ? edges : 4), $sformatf("n_trig %0d edges %0d", ts_n_trig, edges));
    for (int s = 0; s < 4; s++) begin
      int idx;
      logic [63:0] es;
      idx = hist.size() - 4 + s;
      es  = idx >= 0 ? hist[idx] : '0;
      chk(ts_samples[s] === es, $sformatf("sel %0d n%0d %h exp %h", sel, s, ts_samples[s], es));
    end
    if (edges > 4) n_roll++;
    $display("measurement sel=%0d: %0d trigger edges, id54=%h", sel, edges, ncs_id54);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    measure(25, 32, 0);
    measure(24, 12, 1);
    measure(40, 24, 0);
    chk(n_counted > 0,    "no transition counted");
    chk(n_overflow > 0,   "no one-hot overflow");
    chk(n_roll > 0,       "sample window never rolled over");
    chk(n_idle > 0,       "no idle cycle");
    chk(n_sel_change > 1, "trigger line never changed");
    $display("mechanisms: counted=%0d overflow=%0d roll=%0d idle=%0d sel_change=%0d",
             n_counted, n_overflow, n_roll, n_idle, n_sel_change);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
