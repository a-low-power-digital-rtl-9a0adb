// tb_parallel_only: the chip with only its core clock running, as the parallel interface
// allows. Both serial clocks are held low and in_serial idles high, so no input can be loaded
// and every unit runs with IN = 0 from x = y = 0. After every core edge the testbench compares
// out_parallel_x / out_parallel_y with the 6-bit code of a reference model of the cellular
// update (same velocity formula as the chip's tables), for 400 updates per unit, and checks
// that out_serial stays idle (high). It counts the cell moves seen on the parallel outputs.
module tb_parallel_only;
  int checks = 0, failures = 0;
  logic clk_core = 0, rst_n = 1;
  logic out_serial;
  logic [5:0] out_parallel_x, out_parallel_y;

  cicr_chip dut (.clk_core, .clk_serial1(1'b0), .clk_serial2(1'b0), .rst_n, .load_en(1'b0),
                 .cfg_en(1'b0), .in_serial(1'b1), .out_serial, .out_parallel_x, .out_parallel_y);

  localparam int TC = 100;
  localparam int UPDATES = 400;

  always #(TC / 2) clk_core = ~clk_core;

  int mx [16], my [16];
  int n_moves = 0;

  function automatic int ref_vel(bit comp_y, int i, int j);
    real x = -0.1 + i / 16.0, y = -0.1 + j / 16.0;
    real z2 = 65.0 * x * x / (1.0 + x * x);
    real z3 = 500.0 * (y * y / (4.0 + y * y)) * (x ** 4 / (0.6561 + x ** 4));
    real v = comp_y ? (z2 - z3 - y) : (1.0 - z2 + z3 + y - 10.0 * x);
    return int'($floor(v / 180.0 * 1024.0 + 0.5));
  endfunction

  function automatic int cidx(int v, int sh, int maxi);
    int d = v + 102;
    if (d < 0) return 0;
    return (d >> sh) > maxi ? maxi : (d >> sh);
  endfunction

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  initial #1 rst_n = 0;

  initial begin
    #(TC * (16 * UPDATES + 100));
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int u, xi, yi, px, py;
    foreach (mx[i]) begin mx[i] = 0; my[i] = 0; end
    #(2 * TC + TC / 4);
    rst_n = 1;
    for (int k = 0; k < 16 * UPDATES; k++) begin
      u = k % 16;
      @(posedge clk_core); #1;
      xi = cidx(mx[u], 6, 31);
      yi = cidx(my[u], 6, 31);
      px = cidx(mx[u], 5, 63);
      py = cidx(my[u], 5, 63);
      mx[u] += ref_vel(0, xi, yi);
      my[u] += ref_vel(1, xi, yi);
      if (cidx(mx[u], 5, 63) != px || cidx(my[u], 5, 63) != py) n_moves++;
      expect_eq("parallel x", out_parallel_x, cidx(mx[u], 5, 63));
      expect_eq("parallel y", out_parallel_y, cidx(my[u], 5, 63));
      expect_eq("serial output idle", out_serial, 1);
    end
    $display("mechanisms: parallel code changes %0d of %0d updates", n_moves, 16 * UPDATES);
    expect_eq("parallel outputs move", n_moves > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
