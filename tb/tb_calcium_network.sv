// tb_calcium_network: runs the 16-unit network and compares every output with a reference
// model kept in the testbench: per unit, X = clamp((x + 102) >> 6), the velocity pair of cell
// (X, Y) from the model's velocity functions, x += vx + in_ext, y += vy, saturated to 14 bits.
// Phase 1 starts from reset (all states 0, all inputs 0) and checks the first 64 updates and
// the unit order (unit 0 first, one unit per clock). Phase 2 loads 16 inhomogeneous inputs
// Dt*(0.27*eta + 2.7), eta uniform in [0,1), as for the network experiment (unit 0 gets the
// single-cell input Dt*3, which is known to oscillate on this plane), re-seeds the model
// from the outputs after the load, and checks 5 emulated seconds (900 updates per unit).
// Counted mechanisms: cell moves up, down and none in X and Y, moves of more than one cell
// in one update, address clamping at the plane's edge, input words stored, calcium spikes.
module tb_calcium_network;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, load_en = 0, rx_tgl = 0;
  logic [13:0] rx_word = 0;
  logic signed [13:0] x_out, y_out;
  logic [3:0] out_unit;
  logic frame_tgl, in_written, sat;

  calcium_network #(.N(16)) dut (.clk, .rst_n, .load_en, .cfg_en(1'b0), .rx_word, .rx_tgl, .x_out, .y_out,
                                 .out_unit, .frame_tgl, .in_written, .sat);

  always #10 clk = ~clk;

  logic [13:0] romx [1024], romy [1024];
  int mx [16], my [16], min [16];
  int n_up_x = 0, n_dn_x = 0, n_nc_x = 0, n_up_y = 0, n_dn_y = 0, n_nc_y = 0;
  int n_multi = 0, n_clamp = 0, n_written = 0, n_spike = 0;
  bit high [16];

  always @(posedge clk) if (rst_n && in_written) n_written++;

  // reference velocities Dt*F and Dt*G at the lower corner of cell (i, j), rounded to 4.10
  function automatic int ref_vel(bit comp_y, int i, int j);
    real x = -0.1 + i / 16.0, y = -0.1 + j / 16.0;
    real z2 = 65.0 * x * x / (1.0 + x * x);
    real z3 = 500.0 * (y * y / (4.0 + y * y)) * (x ** 4 / (0.6561 + x ** 4));
    real v = comp_y ? (z2 - z3 - y) : (1.0 - z2 + z3 + y - 10.0 * x);
    return int'($floor(v / 180.0 * 1024.0 + 0.5));
  endfunction

  function automatic int cidx(int v);
    int d = v + 102;
    if (d < 0) return 0;
    return (d >> 6) > 31 ? 31 : (d >> 6);
  endfunction
  function automatic int sx14(logic [13:0] w);
    return int'(signed'(w));
  endfunction
  function automatic int sat14(int v);
    return v > 8191 ? 8191 : v < -8192 ? -8192 : v;
  endfunction

  // advance unit u of the model and count what happened
  task automatic model_step(int u);
    int xi = cidx(mx[u]), yi = cidx(my[u]), nx, ny, dxi, dyi;
    if (((mx[u] + 102) >> 6) > 31 || ((my[u] + 102) >> 6) > 31 || mx[u] < -102 || my[u] < -102) n_clamp++;
    nx = sat14(mx[u] + sx14(romx[xi * 32 + yi]) + min[u]);
    ny = sat14(my[u] + sx14(romy[xi * 32 + yi]));
    dxi = cidx(nx) - xi; dyi = cidx(ny) - yi;
    if (dxi > 0) n_up_x++; else if (dxi < 0) n_dn_x++; else n_nc_x++;
    if (dyi > 0) n_up_y++; else if (dyi < 0) n_dn_y++; else n_nc_y++;
    if (dxi > 1 || dxi < -1 || dyi > 1 || dyi < -1) n_multi++;
    if (!high[u] && nx > 1024) begin high[u] = 1; n_spike++; end
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

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u, w;
    for (int i = 0; i < 1024; i++) begin
      romx[i] = 14'(ref_vel(0, i / 32, i % 32));
      romy[i] = 14'(ref_vel(1, i / 32, i % 32));
    end
    foreach (mx[i]) begin mx[i] = 0; my[i] = 0; min[i] = 0; high[i] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // phase 1: from reset
    for (int c = 0; c < 64; c++) begin
      @(posedge clk); #1;
      u = c % 16;
      model_step(u);
      expect_eq("unit order", out_unit, u);
      expect_eq("x", x_out, mx[u]);
      expect_eq("y", y_out, my[u]);
    end
    // phase 2: load the inputs, four clocks apart
    load_en = 1;
    repeat (3) @(posedge clk);
    for (int i = 0; i < 16; i++) begin
      if (i == 0) w = 17;   // unit 0: single-cell input z1*beta = 3 uM/s, Dt*3 = 17 LSB
      else w = int'($floor((0.27 * ($urandom_range(0, 999) / 1000.0) + 2.7) / 180.0 * 1024.0 + 0.5));
      min[i] = w;
      rx_word <= 14'(w);
      rx_tgl  <= ~rx_tgl;
      repeat (4) @(posedge clk);
    end
    load_en = 0;
    repeat (5) @(posedge clk);
    expect_eq("input words stored", n_written, 16);
    // re-seed the model from one full turn of outputs, then check 900 updates per unit
    for (int c = 0; c < 16; c++) begin
      @(posedge clk); #1;
      mx[out_unit] = x_out; my[out_unit] = y_out;
    end
    for (int c = 0; c < 900 * 16; c++) begin
      @(posedge clk); #1;
      u = out_unit;
      model_step(u);
      expect_eq("x", x_out, mx[u]);
      expect_eq("y", y_out, my[u]);
      expect_eq("no saturation", sat, 0);
    end
    $display("mechanisms: X up %0d down %0d none %0d | Y up %0d down %0d none %0d | multi-cell %0d | clamp %0d | spikes %0d | inputs %0d",
             n_up_x, n_dn_x, n_nc_x, n_up_y, n_dn_y, n_nc_y, n_multi, n_clamp, n_spike, n_written);
    expect_eq("X up seen", n_up_x > 0, 1);   expect_eq("X down seen", n_dn_x > 0, 1);
    expect_eq("X none seen", n_nc_x > 0, 1); expect_eq("Y up seen", n_up_y > 0, 1);
    expect_eq("Y down seen", n_dn_y > 0, 1); expect_eq("Y none seen", n_nc_y > 0, 1);
    expect_eq("multi-cell seen", n_multi > 0, 1);
    expect_eq("clamp seen", n_clamp > 0, 1);
    expect_eq("spikes seen", n_spike >= 3, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
