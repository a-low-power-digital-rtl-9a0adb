// tb_loaded_tables: single-cell workloads that need tables other than the hard-wired ones, run on
// the network built with writable storage blocks (RECONFIG = 1). Three cases are run in turn:
//   0: Hill set m = n = p = 1 (stimulus 2 uM/s), Dt = 1/180 s, scale s = 7
//   1: Hill set m = n = p = 2 (stimulus 6 uM/s), Dt = 1/180 s, scale s = 16
//   2: Hill set m = n = 2, p = 4 (stimulus 3 uM/s), Dt = 1/64 s, scale s = 1
// Cases 0 and 1 oscillate over about 4 uM (x) and 11 uM (y), and 10 uM and 20 uM. That is
// beyond the 4.10 word and the cell plane, which covers [-0.1, 1.9) in word units. Their tables
// are therefore tuned to the range: they describe the scaled variables x/s and y/s, so the
// unchanged datapath covers s * [-0.1, 1.9) uM. Cell (X, Y) stands for x = s * (-0.1 + X/16),
// y = s * (-0.1 + Y/16), and its stored words are round(1024 * Dt * F(x, y) / s) and
// round(1024 * Dt * G(x, y) / s). The stimulus is scaled the same way. Case 2 is the time step
// of the power-versus-timescale study: every row of that study uses dt / timescale = 1/64, so
// the chip goes through the same sequence of states in every row and only the core clock
// (16 / dt) and hence the wall-clock speed differ. The testbench prints, for each row, the
// clock and the wall-clock period of the oscillation.
// For each case the testbench loads the two tables through rx_word while cfg_en is high,
// pulses reset, loads the input into all sixteen units and records 30 emulated seconds. It
// integrates the continuous model (forward Euler, 64 steps per update) alongside. Over the
// last 15 s the emulated unit must spike regularly with a period within 15 % of the continuous
// model's. Its x peak must lie within 35 % of the continuous one and its y extremes within
// three cells (3*s/16 uM) or 0.25 uM, whichever is larger. Every unit must spike as often as
// unit 0 (within one). Spikes are x rising through half the continuous model's x peak. The
// stimulus rounds to whole LSBs (2.46 instead of 2 uM/s, 5.63 instead of 6 uM/s); the
// continuous model uses the exact value.
module tb_loaded_tables;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load_en = 0, cfg_en = 0, rx_tgl = 0;
  logic [13:0] rx_word = 0;
  logic signed [13:0] x_out, y_out;
  logic [3:0] out_unit;
  logic frame_tgl, in_written, sat;

  calcium_network #(.N(16), .RECONFIG(1'b1)) dut (.clk, .rst_n, .load_en, .cfg_en, .rx_word,
      .rx_tgl, .x_out, .y_out, .out_unit, .frame_tgl, .in_written, .sat);

  always #10 clk = ~clk;

  localparam int  MAXSTEPS = 5400;     // 30 s at Dt = 1/180 s

  // Table 1 columns: m = n = p = 1, m = n = p = 2, m = n = 2 with p = 4
  localparam real Z1B [3] = '{2.0, 6.0, 3.0};
  localparam real VM2 [3] = '{250.0, 100.0, 65.0};
  localparam real VM3 [3] = '{2000.0, 700.0, 500.0};
  localparam real KR  [3] = '{30.0, 15.0, 2.0};
  localparam real KA  [3] = '{2.5, 2.5, 0.9};
  localparam real KF  [3] = '{0.1, 0.0, 1.0};
  localparam real KK  [3] = '{5.0, 8.0, 10.0};
  localparam int  HN  [3] = '{1, 2, 2};
  localparam int  HM  [3] = '{1, 2, 2};
  localparam int  HP  [3] = '{1, 2, 4};
  localparam real SCALE [3] = '{7.0, 16.0, 1.0};
  localparam int  DT_INV [3] = '{180, 180, 64};   // updates per emulated second

  real xs [MAXSTEPS], ys [MAXSTEPS];
  real cxs [MAXSTEPS], cys [MAXSTEPS];
  int n_table = 0, n_spikes = 0;

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic real pw(real v, int e);
    real r = 1.0;
    for (int k = 0; k < e; k++) r *= v;
    return r;
  endfunction

  // dx/dt without the stimulus (f) and dy/dt (g) of the calcium model for Hill set c
  function automatic real rate(int c, bit comp_y, real x, real y);
    real z2 = VM2[c] * pw(x, HN[c]) / (1.0 + pw(x, HN[c]));
    real z3 = VM3[c] * (pw(y, HM[c]) / (pw(KR[c], HM[c]) + pw(y, HM[c])))
                     * (pw(x, HP[c]) / (pw(KA[c], HP[c]) + pw(x, HP[c])));
    return comp_y ? (z2 - z3 - KF[c] * y) : (1.0 - z2 + z3 + KF[c] * y - KK[c] * x);
  endfunction

  function automatic int word(real v);
    int w = int'($floor(v * 1024.0 + 0.5));
    return w > 8191 ? 8191 : w < -8192 ? -8192 : w;
  endfunction

  task automatic send(int w);
    rx_word <= 14'(w); rx_tgl <= ~rx_tgl;
    repeat (4) @(posedge clk);
  endtask

  initial #1 rst_n = 0;

  initial begin
    #(20 * 16 * 3 * (MAXSTEPS + 2048 + 400));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_set(int c);
    real s = SCALE[c], dt = 1.0 / DT_INV[c], x, y, thr, cmax, per_c, per_d, ytol;
    int  steps = 30 * DT_INV[c], half = steps / 2, per = 64;   // Euler steps per update
    real h = dt / per;
    real xmax, ymin, ymax, cymin, cymax;
    real spk_c [$], spk_d [$];
    int uspk [16];
    bit uhi [16], hi;
    int in_w;
    // continuous model
    x = 0.0; y = 0.0;
    for (int k = 0; k < steps * per; k++) begin
      real f = rate(c, 0, x, y) + Z1B[c], g = rate(c, 1, x, y);
      x += h * f;
      y += h * g;
      if ((k + 1) % per == 0) begin cxs[(k + 1) / per - 1] = x; cys[(k + 1) / per - 1] = y; end
    end
    // tables, X storage then Y storage, address {X, Y}
    cfg_en = 1;
    repeat (3) @(posedge clk);
    for (int comp = 0; comp < 2; comp++)
      for (int i = 0; i < 32; i++)
        for (int j = 0; j < 32; j++) begin
          send(word(dt * rate(c, comp[0], s * (-0.1 + i / 16.0), s * (-0.1 + j / 16.0)) / s));
          n_table++;
        end
    cfg_en = 0;
    repeat (3) @(posedge clk);
    // restart the units on the new tables, then load the stimulus into all of them
    #1 rst_n = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    in_w = word(dt * Z1B[c] / s);
    load_en = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) send(in_w);
    load_en = 0;
    repeat (4) @(posedge clk);
    // record every unit from its next update on
    foreach (uspk[i]) begin uspk[i] = 0; uhi[i] = 0; end
    cmax = -1.0e9;
    for (int k = half; k < steps; k++) if (cxs[k] > cmax) cmax = cxs[k];
    thr = cmax / 2.0;
    @(posedge clk); #1;
    while (out_unit != 4'd15) begin @(posedge clk); #1; end
    for (int k = 0; k < steps; k++) begin
      for (int u = 0; u < 16; u++) begin
        @(posedge clk); #1;
        x = x_out * s / 1024.0;
        if (u == 0) begin xs[k] = x; ys[k] = y_out * s / 1024.0; end
        if (k >= half) begin
          if (!uhi[u] && x > thr) begin uhi[u] = 1; uspk[u]++; n_spikes++; end
          if (uhi[u] && x < thr / 2.0) uhi[u] = 0;
        end
      end
    end
    for (int u = 1; u < 16; u++)
      expect_true("same spike count as unit 0", uspk[u] - uspk[0] <= 1 && uspk[0] - uspk[u] <= 1);
    // spike times, extremes
    hi = 0; xmax = -1.0e9; ymin = 1.0e9; ymax = -1.0e9; cymin = 1.0e9; cymax = -1.0e9;
    for (int k = half; k < steps; k++) begin
      if (!hi && xs[k] > thr) begin hi = 1; spk_d.push_back(k * dt); end
      if (hi && xs[k] < thr / 2.0) hi = 0;
      if (xs[k] > xmax) xmax = xs[k];
      if (ys[k] < ymin) ymin = ys[k];
      if (ys[k] > ymax) ymax = ys[k];
      if (cys[k] < cymin) cymin = cys[k];
      if (cys[k] > cymax) cymax = cys[k];
    end
    hi = 0;
    for (int k = half; k < steps; k++) begin
      if (!hi && cxs[k] > thr) begin hi = 1; spk_c.push_back(k * dt); end
      if (hi && cxs[k] < thr / 2.0) hi = 0;
    end
    expect_true("emulated unit spikes at least 3 times in 15 s", spk_d.size() >= 3);
    expect_true("continuous model spikes at least 3 times in 15 s", spk_c.size() >= 3);
    if (spk_d.size() >= 3 && spk_c.size() >= 3) begin
      per_d = (spk_d[spk_d.size() - 1] - spk_d[0]) / (spk_d.size() - 1);
      per_c = (spk_c[spk_c.size() - 1] - spk_c[0]) / (spk_c.size() - 1);
      for (int k = 1; k < spk_d.size(); k++)
        expect_true("regular spike intervals", (spk_d[k] - spk_d[k-1] - per_d) < 0.1 * per_d && (per_d - (spk_d[k] - spk_d[k-1])) < 0.1 * per_d);
      expect_true("period within 15 % of the continuous model", per_d < 1.15 * per_c && per_d > 0.85 * per_c);
      $display("m = n = %0d, p = %0d, Dt = 1/%0d s, scale %0.0f, input %0d LSB (%0.3f uM/s): period emulated %0.3f s, continuous %0.3f s; x peak %0.2f / %0.2f uM; y %0.2f .. %0.2f / %0.2f .. %0.2f uM; spikes unit 0 %0d",
               HN[c], HP[c], DT_INV[c], s, in_w, in_w * s / 1024.0 / dt, per_d, per_c, xmax, cmax, ymin, ymax, cymin, cymax, uspk[0]);
    end
    expect_true("x peak within 35 % of the continuous model", xmax < 1.35 * cmax && xmax > 0.65 * cmax);
    ytol = 3.0 * s / 16.0 > 0.25 ? 3.0 * s / 16.0 : 0.25;
    expect_true("y minimum close", ymin - cymin < ytol && cymin - ymin < ytol);
    expect_true("y maximum close", ymax - cymax < ytol && cymax - ymax < ytol);
    if (c == 2 && spk_d.size() >= 3)
      for (int r = 0; r < 5; r++)   // rows of the timescale study: timescale 1, 1/2 .. 1/16
        $display("  timescale %0.4f: dt = 1/%0d s, core clock %0d Hz, wall-clock period %0.4f s",
                 1.0 / (1 << r), 64 << r, 16 * (64 << r), per_d / (1 << r));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    run_set(0);
    run_set(1);
    run_set(2);
    expect_true("table words", n_table == 3 * 2048);
    $display("mechanisms: table words %0d | spikes %0d", n_table, n_spikes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
