// tb_device_fingerprints: the fingerprint circuit on a population of
// modelled devices.
// The synthesizable multiplier is glitch-free in simulation, so this bench
// drives the NCS and TS blocks from glitch_multiplier, a timing model whose
// full-adder delays differ per device. For each device a measurement is:
// operands 0, clear, then operand pairs OPS_A/OPS_B applied one after the
// other with time to settle. An independent observer counts the rising
// edges of every product line and records the lines at each rising edge of
// the trigger line. Checks:
//  * every one-hot register matches the observer's count (or reads empty
//    on overflow) -- the NCS method under real glitching;
//  * every TS sample matches the observer's record, except for lines that
//    switched at the very instant of the trigger edge (a race in hardware
//    too, left unchecked), and n_trig matches the edge count;
//  * measuring the same device again gives the same 192-bit ID and samples
//    (checked on the first trigger line);
//  * the 192-bit IDs of NDEV (20) devices are all different, and at least
//    one of the eight trigger lines gives samples that tell all of them
//    apart (the bench prints how many each trigger line separates).
// Mechanisms counted: lines with two or more edges (glitches), trigger
// races skipped; counter overflows are counted and reported.
// The model has no setup/hold window and no run-to-run noise, so every
// glitch is caught and repeated measurements agree exactly; the unstable
// digits seen on silicon are not reproduced.
module tb_device_fingerprints;
  timeunit 1ns;
  timeprecision 1ps;
  import fp_pkg::*;

  localparam int unsigned NDEV    = 20;
  localparam int unsigned SETTLE  = 80;   // ns after each operand change
  localparam int unsigned NOPS    = 3;
  localparam logic [31:0] OPS_A [NOPS] = '{32'h0000_ffff, 32'h1357_9bdf, 32'h2468_ace0};
  localparam logic [31:0] OPS_B [NOPS] = '{32'h0000_8421, 32'h0000_00ff, 32'h00c3_0000};
  // Trigger lines of the original evaluation's results table.
  localparam int unsigned NTRIG   = 8;
  localparam int unsigned TRIGS [NTRIG] = '{19, 21, 24, 25, 28, 30, 34, 40};

  int unsigned             device = 0;
  logic [31:0]             a = '0, b = '0;
  logic [63:0]             lines;
  logic                    clear = 1'b0;
  logic [5:0]              trig_sel = '0;
  logic [511:0]            raw;
  logic [191:0]            digits;
  logic [63:0]             valid, overflow;
  logic [53:0]             id54;
  logic [3:0][63:0]        samples;
  logic [2:0]              n_trig;
  logic                    clk = 1'b0;

  int checks = 0, failures = 0;
  int n_overflow = 0, n_glitchy = 0, n_race_bits = 0, n_full_sep = 0;

  glitch_multiplier #(.N(32)) u_model (.device(device), .a(a), .b(b), .p(lines));

  ncs_fingerprint #(.N_LINES(64), .OH_WIDTH(8)) u_ncs (
    .lines(lines), .clear(clear), .raw(raw), .digits(digits), .valid(valid), .overflow(overflow));
  id_select u_id (.digits(digits), .id(id54));
  ts_sampler #(.N_LINES(64), .DEPTH(4)) u_ts (
    .lines(lines), .trig_sel(trig_sel), .clear(clear), .samples(samples), .n_trig(n_trig));

  always #5 clk = ~clk;

  // ---------------- observer ----------------
  int     obs_cnt [64];
  realtime chg_t  [64][$];
  logic [63:0] snap [$];
  realtime     snap_t [$];
  bit      obs_on = 1'b0;

  for (genvar i = 0; i < 64; i++) begin : g_obs
    always @(posedge lines[i]) if (obs_on) obs_cnt[i]++;
    always @(lines[i])         if (obs_on) chg_t[i].push_back($realtime);
  end
  always @(posedge lines[trig_sel]) if (obs_on) begin
    snap.push_back(lines);
    snap_t.push_back($realtime);
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // One measurement on the current device; returns the ID and samples.
  task automatic measure(output logic [191:0] id, output logic [3:0][63:0] smp);
    a = '0; b = '0;
    #(SETTLE);
    clear = 1'b1; #1; clear = 1'b0; #1;
    foreach (obs_cnt[i]) begin obs_cnt[i] = 0; chg_t[i].delete(); end
    snap.delete(); snap_t.delete();
    obs_on = 1'b1;
    for (int k = 0; k < NOPS; k++) begin
      a = OPS_A[k]; b = OPS_B[k];
      #(SETTLE);
    end
    obs_on = 1'b0;
    chk(lines === OPS_A[NOPS-1] * OPS_B[NOPS-1], "model product wrong");
    for (int i = 0; i < 64; i++) begin
      logic [7:0] er;
      er = obs_cnt[i] < 8 ? 8'(1) << obs_cnt[i] : '0;
      chk(raw[i*8 +: 8] === er, $sformatf("dev %0d line %0d raw %b observed %0d edges",
                                          device, i, raw[i*8 +: 8], obs_cnt[i]));
      if (obs_cnt[i] >= 8) n_overflow++;
      if (obs_cnt[i] >= 2) n_glitchy++;
    end
    chk(n_trig === 3'(snap.size() < 4 ? snap.size() : 4),
        $sformatf("dev %0d n_trig %0d, %0d trigger edges", device, n_trig, snap.size()));
    for (int s = 0; s < 4; s++) begin
      int idx;
      logic [63:0] es, mask;
      idx  = snap.size() - 4 + s;
      es   = idx >= 0 ? snap[idx] : '0;
      mask = '1;
      if (idx >= 0)
        for (int i = 0; i < 64; i++)
          foreach (chg_t[i][q]) if (chg_t[i][q] == snap_t[idx]) mask[i] = 1'b0;
      for (int i = 0; i < 64; i++) if (!mask[i]) n_race_bits++;
      chk((samples[s] & mask) === (es & mask),
          $sformatf("dev %0d trig %0d n%0d %h exp %h (mask %h)", device, trig_sel, s,
                    samples[s], es, mask));
    end
    id  = digits;
    smp = samples;
  endtask

  initial begin
    logic [191:0]      ids [NDEV];
    logic [3:0][63:0]  ts  [NTRIG][NDEV];
    int distinct;
    for (int t = 0; t < NTRIG; t++) begin
      trig_sel = 6'(TRIGS[t]);
      for (int d = 0; d < NDEV; d++) begin
        logic [191:0]     id2;
        logic [3:0][63:0] s2;
        device = 32'(d + 1);
        measure(ids[d], ts[t][d]);
        if (t == 0) begin
          measure(id2, s2);
          chk(id2 === ids[d] && s2 === ts[t][d], $sformatf("dev %0d not repeatable", d + 1));
        end
        if (t == 0 && d < 10) begin
          string dg;
          dg = "";
          for (int i = 63; i >= 0; i--) dg = {dg, $sformatf("%0d", ids[d][i*3 +: 3])};
          $display("device %0d NCS digits (line 63..0) %s id54 %h", d + 1, dg, id54);
        end
      end
      distinct = 0;
      for (int d = 0; d < NDEV; d++) begin
        bit uniq = 1'b1;
        for (int e = 0; e < NDEV; e++) if (e != d && ts[t][e] === ts[t][d]) uniq = 1'b0;
        distinct += int'(uniq);
      end
      $display("trigger %0d: %0d of %0d devices told apart by their samples", TRIGS[t], distinct, NDEV);
      if (distinct == NDEV) n_full_sep++;
    end
    distinct = 0;
    for (int d = 0; d < NDEV; d++) begin
      bit uniq = 1'b1;
      for (int e = 0; e < NDEV; e++) if (e != d && ids[e] === ids[d]) uniq = 1'b0;
      distinct += int'(uniq);
    end
    $display("NCS: %0d of %0d devices have a unique 192-bit ID", distinct, NDEV);
    chk(distinct == NDEV, "NCS IDs do not separate all devices");
    chk(n_glitchy > 0, "no line glitched");
    chk(n_full_sep > 0, "no trigger line separates all devices");
    $display("lines with >=2 edges: %0d, overflows: %0d, race bits skipped: %0d",
             n_glitchy, n_overflow, n_race_bits);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
