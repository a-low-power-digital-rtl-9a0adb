// tb_velocity_rom: checks every word of the X and Y storage tables against the CICR velocity
// functions evaluated in floating point: Dt*F and Dt*G at (x_min + X*dx, y_min + Y*dy) with
// m = n = 2, p = 4, z0 = 1, VM2 = 65, VM3 = 500, K2 = 1, KR = 2, KA = 0.9, kf = 1, k = 10 and
// Dt = 1/180 s, rounded to 4.10. A difference of one LSB is allowed for rounding ties.
module tb_velocity_rom;
  int checks = 0, failures = 0;
  logic [4:0] xi, yi;
  logic signed [13:0] vx, vy;

  velocity_rom #(.IDX_W(5), .COMPONENT_Y(1'b0)) dut_x (.x_idx(xi), .y_idx(yi), .vel(vx));
  velocity_rom #(.IDX_W(5), .COMPONENT_Y(1'b1)) dut_y (.x_idx(xi), .y_idx(yi), .vel(vy));

  localparam real DT = 1.0 / 180.0;

  function automatic int q410(real r);
    return int'($floor(r * 1024.0 + 0.5));
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x, y, x2, x4, y2, z2, z3, f, g;
    int ef, eg;
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        xi = 5'(i); yi = 5'(j);
        #1;
        x  = -0.1 + i * 0.0625;
        y  = -0.1 + j * 0.0625;
        x2 = x * x; x4 = x2 * x2; y2 = y * y;
        z2 = 65.0 * x2 / (1.0 + x2);
        z3 = 500.0 * (y2 / (4.0 + y2)) * (x4 / (0.9 ** 4 + x4));
        f  = 1.0 - z2 + z3 + 1.0 * y - 10.0 * x;
        g  = z2 - z3 - 1.0 * y;
        ef = q410(DT * f);
        eg = q410(DT * g);
        checks++;
        if (int'(vx) - ef > 1 || ef - int'(vx) > 1 || int'(vy) - eg > 1 || eg - int'(vy) > 1) begin
          failures++;
          if (failures < 10) $display("FAIL cell (%0d,%0d) vx=%0d exp %0d vy=%0d exp %0d", i, j, vx, ef, vy, eg);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
