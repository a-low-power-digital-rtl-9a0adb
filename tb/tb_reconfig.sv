// tb_reconfig: end-to-end test of the chip built with the table reconfiguration path.
//
// Same bench as the fixed chip's (clock ratios, UART framing, reference model), but the chip is
// built with RECONFIG = 1, so its storage blocks start empty. After reset the testbench raises
// cfg_en and sends both velocity tables on in_serial, 1024 words for X then 1024 for Y, three
// core periods apart. It then pulses rst_n so the units restart from 0 on the loaded tables,
// which reset leaves in place, and only then starts decoding frames. The tables it sends describe the same m = n = 2, p = 4 model with twice
// the time step, Dt = 1/90 s, so the emulated cell runs twice as fast as real time at the same
// core clock (the faster biological timescales of the power study). The inputs are scaled the
// same way: Dt*(0.27*eta + 2.7) uM/s, and Dt*3 uM/s for unit 0. Every later frame is compared
// bit-exactly with a reference model that reads the tables the testbench sent, so a word lost
// or misplaced in loading, or a read of the hard-wired table, shows up as a mismatch. The run
// covers 450 updates per unit (5 emulated seconds at the doubled speed) and counts the same
// mechanisms as the fixed chip's bench, plus the table words loaded.
module tb_reconfig;
  int checks = 0, failures = 0;
  logic clk_core = 0, clk_serial1 = 0, clk_serial2 = 0;
  logic rst_n = 1, load_en = 0, cfg_en = 0, in_serial = 1;
  logic out_serial;
  logic [5:0] out_parallel_x, out_parallel_y;

  cicr_chip #(.RECONFIG(1'b1)) dut (.clk_core, .clk_serial1, .clk_serial2, .rst_n, .load_en, .cfg_en, .in_serial,
                 .out_serial, .out_parallel_x, .out_parallel_y);

  localparam int T2 = 10;          // CLK_serial2 period
  localparam int T1 = 8 * T2;      // baud period
  localparam int TC = 40 * T1;     // core period
  localparam int UPDATES = 450;    // per unit: 5 emulated s at Dt = 1/90 s

  always #(T2 / 2) clk_serial2 = ~clk_serial2;
  always #(T1 / 2) clk_serial1 = ~clk_serial1;
  always #(TC / 2) clk_core    = ~clk_core;

  logic [13:0] romx [1024], romy [1024];
  int mx [16], my [16], min [16];
  bit seeded [16], high [16];
  int uspk [16];
  int n_up_x = 0, n_dn_x = 0, n_nc_x = 0, n_up_y = 0, n_dn_y = 0, n_nc_y = 0;
  int n_multi = 0, n_clamp = 0, n_spike = 0, n_frames = 0, n_words = 0, n_table = 0, n_checked = 0;
  int edges = 0, seed_from = 1 << 30;
  bit tables_loaded = 0;
  logic [5:0] par_x [int], par_y [int];

  // velocities Dt*F and Dt*G with Dt = 1/90 s at the lower corner of cell (i, j), rounded to 4.10
  function automatic int ref_vel(bit comp_y, int i, int j);
    real x = -0.1 + i / 16.0, y = -0.1 + j / 16.0;
    real z2 = 65.0 * x * x / (1.0 + x * x);
    real z3 = 500.0 * (y * y / (4.0 + y * y)) * (x ** 4 / (0.6561 + x ** 4));
    real v = comp_y ? (z2 - z3 - y) : (1.0 - z2 + z3 + y - 10.0 * x);
    return int'($floor(v / 90.0 * 1024.0 + 0.5));
  endfunction

  function automatic int cidx(int v, int sh, int maxi);
    int d = v + 102;
    if (d < 0) return 0;
    return (d >> sh) > maxi ? maxi : (d >> sh);
  endfunction
  function automatic int sx14(logic [13:0] w);
    return int'(signed'(w));
  endfunction
  function automatic int sat14(int v);
    return v > 8191 ? 8191 : v < -8192 ? -8192 : v;
  endfunction

  task automatic model_step(int u);
    int xi = cidx(mx[u], 6, 31), yi = cidx(my[u], 6, 31), nx, ny, dxi, dyi;
    if (((mx[u] + 102) >> 6) > 31 || ((my[u] + 102) >> 6) > 31 || mx[u] < -102 || my[u] < -102) n_clamp++;
    nx = sat14(mx[u] + sx14(romx[xi * 32 + yi]) + min[u]);
    ny = sat14(my[u] + sx14(romy[xi * 32 + yi]));
    dxi = cidx(nx, 6, 31) - xi; dyi = cidx(ny, 6, 31) - yi;
    if (dxi > 0) n_up_x++; else if (dxi < 0) n_dn_x++; else n_nc_x++;
    if (dyi > 0) n_up_y++; else if (dyi < 0) n_dn_y++; else n_nc_y++;
    if (dxi > 1 || dxi < -1 || dyi > 1 || dyi < -1) n_multi++;
    if (!high[u] && nx > 1024) begin high[u] = 1; n_spike++; uspk[u]++; end
    if (high[u] && nx < 512) high[u] = 0;
    mx[u] = nx; my[u] = ny;
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  task automatic uart_send(logic [6:0] d);
    logic [9:0] f = {2'b11, d, 1'b0};
    for (int b = 0; b < 10; b++) begin
      in_serial = f[b];
      #(T1);
    end
  endtask

  // parallel outputs: value after core edge e belongs to frame e-1
  always @(negedge clk_core) if (rst_n) begin
    par_x[edges - 1] = out_parallel_x;
    par_y[edges - 1] = out_parallel_y;
  end
  always @(posedge clk_core) if (rst_n) edges++; else edges = 0;

  // serial decoder, sampling in the middle of each bit (falling edge of the baud clock)
  initial begin
    logic [6:0] p [4];
    int u, xv, yv;
    wait (tables_loaded);   // decode from the reset that follows the table load
    @(posedge rst_n);
    forever begin
      @(negedge clk_serial1);
      while (out_serial) @(negedge clk_serial1);
      for (int k = 0; k < 4; k++) begin
        if (k > 0) begin @(negedge clk_serial1); expect_eq("start bit", out_serial, 0); end
        for (int b = 0; b < 7; b++) begin @(negedge clk_serial1); p[k][b] = out_serial; end
        @(negedge clk_serial1); expect_eq("stop bit", out_serial, 1);
        @(negedge clk_serial1); expect_eq("stop bit", out_serial, 1);
      end
      u  = n_frames % 16;
      xv = sx14({p[0], p[1]});
      yv = sx14({p[2], p[3]});
      if (n_frames >= seed_from) begin
        if (!seeded[u]) begin
          mx[u] = xv; my[u] = yv; seeded[u] = 1;
        end else begin
          model_step(u);
          expect_eq("serial x", xv, mx[u]);
          expect_eq("serial y", yv, my[u]);
          n_checked++;
        end
        expect_eq("parallel x", par_x[n_frames], cidx(xv, 5, 63));
        expect_eq("parallel y", par_y[n_frames], cidx(yv, 5, 63));
      end
      par_x.delete(n_frames);
      par_y.delete(n_frames);
      n_frames++;
    end
  end

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #(longint'(TC) * (16 * UPDATES + 4 * 2048 + 400));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int w;
    for (int i = 0; i < 1024; i++) begin
      romx[i] = 14'(ref_vel(0, i / 32, i % 32));
      romy[i] = 14'(ref_vel(1, i / 32, i % 32));
    end
    foreach (mx[i]) begin mx[i] = 0; my[i] = 0; seeded[i] = 0; high[i] = 0; uspk[i] = 0; end
    #(2 * TC + TC / 4 + 3);   // reset spans two core clock edges
    rst_n = 1;
    #(2 * TC);
    cfg_en = 1;
    #(2 * TC);
    for (int i = 0; i < 2048; i++) begin
      w = sx14(i < 1024 ? romx[i] : romy[i - 1024]);
      uart_send(7'(w >> 7));
      uart_send(7'(w));
      n_table++;
      #(3 * TC);
    end
    cfg_en = 0;
    #(2 * TC);
    // the units ran on unloaded tables until now: restart them (the tables survive reset)
    tables_loaded = 1;
    @(posedge clk_core);
    #(TC / 4 + 3);
    rst_n = 0;
    repeat (2) @(posedge clk_core);
    #(TC / 4 + 3);
    rst_n = 1;
    #(2 * TC);
    load_en = 1;
    #(2 * TC);
    for (int i = 0; i < 16; i++) begin
      if (i == 0) w = 34;   // Dt * 3 uM/s
      else w = int'($floor((0.27 * ($urandom_range(0, 999) / 1000.0) + 2.7) / 90.0 * 1024.0 + 0.5));
      min[i] = w;
      uart_send(7'(w >> 7));
      uart_send(7'(w));
      n_words++;
      #(4 * TC);
    end
    load_en = 0;
    #(4 * TC);
    seed_from = n_frames + 8;
    wait (n_checked >= 16 * UPDATES);
    $display("mechanisms: X up %0d down %0d none %0d | Y up %0d down %0d none %0d | multi-cell %0d | clamp %0d | spikes %0d | table words %0d | input words %0d | frames %0d",
             n_up_x, n_dn_x, n_nc_x, n_up_y, n_dn_y, n_nc_y, n_multi, n_clamp, n_spike, n_table, n_words, n_frames);
    for (int i = 0; i < 16; i++)
      $display("unit %2d: input %0d LSB (%0.2f uM/s), spikes %0d", i, min[i], min[i] * 90.0 / 1024.0, uspk[i]);
    expect_eq("X up seen", n_up_x > 0, 1);   expect_eq("X down seen", n_dn_x > 0, 1);
    expect_eq("X none seen", n_nc_x > 0, 1); expect_eq("Y up seen", n_up_y > 0, 1);
    expect_eq("Y down seen", n_dn_y > 0, 1); expect_eq("Y none seen", n_nc_y > 0, 1);
    expect_eq("multi-cell seen", n_multi > 0, 1);
    expect_eq("clamp seen", n_clamp > 0, 1);
    expect_eq("spikes seen", n_spike >= 3, 1);
    expect_eq("input words", n_words, 16);
    expect_eq("table words", n_table, 2048);
    expect_eq("unit 0 spikes", uspk[0] >= 3, 1);
    // one frame per core cycle: frames decoded track core edges
    expect_eq("frame rate", (edges - n_frames) >= 0 && (edges - n_frames) <= 2, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
