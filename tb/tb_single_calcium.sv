// tb_single_calcium: the single-cell workload, Hill coefficients m = n = 2, p = 4, stimulus
// z1*beta = 3 uM/s, run on the 16-unit network for 10 emulated seconds (1800 updates per unit).
// Every unit gets the same input Dt*3 = 17 LSB. The units receive it a few updates apart while
// it is loaded, so their phases differ slightly, but every one must oscillate with the same
// number of spikes as unit 0 (within one): sharing the datapath must not couple or stall them. In parallel the testbench
// integrates the continuous model (forward Euler with a 0.1 ms step, in floating point) and
// compares: the emulated oscillation must be regular (equal spike intervals once settled),
// its period within 35 % of the continuous model's, and x and y must cover the continuous
// model's ranges (y peaks between 1.8 and 2.1 uM, x spikes above 1 uM and rests below 0.5 uM).
// The root-mean-square difference between the two x traces is printed for information; it
// grows with the period difference and is not checked.
module tb_single_calcium;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load_en = 0, rx_tgl = 0;
  logic [13:0] rx_word = 0;
  logic signed [13:0] x_out, y_out;
  logic [3:0] out_unit;
  logic frame_tgl, in_written, sat;

  calcium_network #(.N(16)) dut (.clk, .rst_n, .load_en, .cfg_en(1'b0), .rx_word, .rx_tgl, .x_out, .y_out,
                                 .out_unit, .frame_tgl, .in_written, .sat);

  always #10 clk = ~clk;

  localparam int STEPS = 1800;
  int xs [STEPS], ys [STEPS];
  real cx [STEPS];
  real spk_c [$], spk_d [$];

  task automatic expect_true(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial #1 rst_n = 0;

  initial begin
    #(20 * 16 * (STEPS + 200));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // continuous reference
  task automatic run_continuous();
    real x = 0.0, y = 0.0, h = 1.0e-4, z2, z3, f, g;
    bit hi = 0;
    int per = 56;   // 0.1 ms steps per 1/180 s, rounded
    for (int s = 0; s < STEPS * per; s++) begin
      z2 = 65.0 * x * x / (1.0 + x * x);
      z3 = 500.0 * (y * y / (4.0 + y * y)) * (x ** 4 / (0.6561 + x ** 4));
      f  = 1.0 - z2 + z3 + y - 10.0 * x + 3.0;
      g  = z2 - z3 - y;
      x += h * f;
      y += h * g;
      if (!hi && x > 1.0) begin hi = 1; spk_c.push_back(s * h); end
      if (hi && x < 0.5) hi = 0;
      if ((s + 1) % per == 0) cx[(s + 1) / per - 1] = x;
    end
  endtask

  initial begin
    real t, per_c, per_d, d, rms;
    int ymax = -9000, xmax = -9000, xmin = 9000, dev = 0;
    bit hi = 0;
    int uspk [16];
    bit uhi [16];
    foreach (uspk[i]) begin uspk[i] = 0; uhi[i] = 0; end
    run_continuous();
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // load 17 (= Dt * 3 uM/s in 4.10) into all sixteen units; states stay near 0 meanwhile
    load_en = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      rx_word <= 14'd17; rx_tgl <= ~rx_tgl;
      repeat (4) @(posedge clk);
    end
    load_en = 0;
    repeat (4) @(posedge clk);
    // record unit 0 .. 15 from their next update on
    @(posedge clk); #1;
    while (out_unit != 4'd15) begin @(posedge clk); #1; end
    for (int s = 0; s < STEPS; s++) begin
      for (int u = 0; u < 16; u++) begin
        @(posedge clk); #1;
        if (u == 0) begin xs[s] = x_out; ys[s] = y_out; end
        if (!uhi[u] && x_out > 14'sd1024) begin uhi[u] = 1; uspk[u]++; end
        if (uhi[u] && x_out < 14'sd512) uhi[u] = 0;
        if (out_unit != 4'(u)) dev++;
      end
    end
    expect_true("unit order", dev == 0);
    for (int u = 1; u < 16; u++)
      expect_true("same spike count as unit 0", uspk[u] - uspk[0] <= 1 && uspk[0] - uspk[u] <= 1);
    for (int s = 0; s < STEPS; s++) begin
      t = (s + 1) / 180.0;
      if (!hi && xs[s] > 1024) begin hi = 1; spk_d.push_back(t); end
      if (hi && xs[s] < 512) hi = 0;
      if (s > STEPS / 2) begin
        if (ys[s] > ymax) ymax = ys[s];
        if (xs[s] > xmax) xmax = xs[s];
        if (xs[s] < xmin) xmin = xs[s];
      end
    end
    expect_true("at least 6 spikes in 10 s", spk_d.size() >= 6);
    expect_true("continuous model spikes", spk_c.size() >= 6);
    per_d = (spk_d[spk_d.size() - 1] - spk_d[1]) / (spk_d.size() - 2);
    per_c = (spk_c[spk_c.size() - 1] - spk_c[1]) / (spk_c.size() - 2);
    for (int k = 2; k < spk_d.size(); k++)
      expect_true("regular spike intervals", (spk_d[k] - spk_d[k-1] - per_d) < 0.02 && (per_d - (spk_d[k] - spk_d[k-1])) < 0.02);
    expect_true("period within 35 % of the continuous model", per_d < 1.35 * per_c && per_d > 0.65 * per_c);
    expect_true("y peak 1.8 .. 2.1 uM", ymax > 1843 && ymax < 2150);
    expect_true("x spikes above 1 uM", xmax > 1024);
    expect_true("x rests below 0.5 uM", xmin < 512);
    rms = 0.0;
    for (int s = 0; s < STEPS; s++) begin d = xs[s] / 1024.0 - cx[s]; rms += d * d; end
    rms = $sqrt(rms / STEPS);
    $display("period: emulated %0.3f s, continuous %0.3f s; spikes %0d / %0d; y peak %0.3f uM; x range %0.3f .. %0.3f uM; x rms difference %0.3f uM",
             per_d, per_c, spk_d.size(), spk_c.size(), ymax / 1024.0, xmin / 1024.0, xmax / 1024.0, rms);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
