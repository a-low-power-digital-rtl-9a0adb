// velocity_rom: hard-wired storage block holding one velocity component for every cell.
//
// The R x S array holds Delta_t * F(x, y) (X storage, COMPONENT_Y = 0) or Delta_t * G(x, y)
// (Y storage, COMPONENT_Y = 1) of the CICR calcium model with Hill coefficients m = n = 2,
// p = 4, evaluated at the lower corner of each cell, x = x_min + X * delta, y = y_min + Y * delta:
//   z2 = VM2 x^2 / (K2^2 + x^2),  z3 = VM3 (y^2 / (KR^2 + y^2)) (x^4 / (KA^4 + x^4))
//   F  = z0 - z2 + z3 + kf y - k x,   G = z2 - z3 - kf y
// and rounded to the nearest 14-bit 4.10 word (clipped to the word's range). The table is a
// constant computed when the design is elaborated, so it becomes fixed logic, as on the chip,
// whose tables were computed off-line and hard-wired. Delta_t = 1/180 s: with 16 units on a
// 2880 Hz core clock every unit is advanced 180 times per second, which is real time (this
// time step is derived here; the source design gives the clock and the unit count). The word
// for cell (X, Y) is at address {X, Y}. Read is combinational: the data follows the address in
// the same cycle, which lets one unit be advanced per clock.
module velocity_rom
  import ca_pkg::*;
#(
  parameter int unsigned IDX_W       = CELL_W, // log2 of R and of S
  parameter bit          COMPONENT_Y = 1'b0   // 0: X storage (Dt*F), 1: Y storage (Dt*G)
) (
  input  logic [IDX_W-1:0]   x_idx,
  input  logic [IDX_W-1:0]   y_idx,
  output logic signed [13:0]  vel
);
  localparam int unsigned DEPTH = 1 << (2 * IDX_W);
  localparam int unsigned S     = 1 << IDX_W;

  typedef logic [13:0] table_t [DEPTH];

  function automatic table_t build_table();
    table_t t;
    real x, y, x2, x4, y2, z2, z3, v;
    int  w;
    for (int i = 0; i < int'(S); i++) begin
      for (int j = 0; j < int'(S); j++) begin
        x  = PLANE_MIN + i * CELL_SIZE;
        y  = PLANE_MIN + j * CELL_SIZE;
        x2 = x * x;
        x4 = x2 * x2;
        y2 = y * y;
        z2 = VM2 * x2 / (K2 * K2 + x2);
        z3 = VM3 * (y2 / (KR * KR + y2)) * (x4 / (KA * KA * KA * KA + x4));
        v  = COMPONENT_Y ? (z2 - z3 - KF * y) : (Z0 - z2 + z3 + KF * y - K * x);
        w  = $rtoi($floor(v * DT * 1024.0 + 0.5));
        if (w > 8191)  w = 8191;
        if (w < -8192) w = -8192;
        t[i * S + j] = 14'(w);
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  assign vel = signed'(TABLE[{x_idx, y_idx}]);
endmodule
