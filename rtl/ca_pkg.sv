// ca_pkg: shared widths, number format and constants of the cellular calcium emulator.
//
// State variables and stored velocities are 14-bit signed fixed-point numbers with
// 4 integer bits (sign included) and 10 fraction bits ("4.10"), as in the fabricated chip.
// The cellular phase plane is 32 x 32 cells covering [-0.1, 1.9) in both x and y, so a cell is
// 0.0625 = 64 LSB wide and the cell index is (v - min) >> 6. Sixteen calcium units share one
// datapath. The serial link carries 7-bit UART packets, two per 14-bit value.
// The model constants are those of the CICR model with Hill coefficients m = n = 2, p = 4.
// The numbers above follow the design description; the packet order and the reset state are
// this implementation's choices and are documented in the modules that use them.
package ca_pkg;
  localparam int unsigned W        = 14;   // state / velocity word width
  localparam int unsigned FRAC     = 10;   // fraction bits of the 4.10 format
  localparam int unsigned N_UNITS  = 16;   // pipelined calcium units
  localparam int unsigned CELL_W   = 5;    // log2(R) = log2(S), R = S = 32 cells
  localparam int unsigned CELL_SH  = 6;    // log2(delta_x / LSB) = log2(0.0625 * 1024)
  localparam int unsigned PAR_W    = 6;    // parallel output pins per state variable
  localparam int unsigned PKT_BITS = 7;    // UART data bits per packet

  typedef logic signed [W-1:0] fix_t;

  // -0.1 in 4.10 (rounded): lower edge of the cellular space in x and y.
  localparam fix_t X_MIN_Q = fix_t'(-102);
  localparam fix_t Y_MIN_Q = fix_t'(-102);

  // CICR model constants, Hill coefficients m = n = 2, p = 4, and the cellular plane.
  localparam real Z0 = 1.0;        // uM/s
  localparam real VM2 = 65.0;      // uM/s
  localparam real VM3 = 500.0;     // uM/s
  localparam real K2 = 1.0;        // uM
  localparam real KR = 2.0;        // uM
  localparam real KA = 0.9;        // uM
  localparam real KF = 1.0;        // 1/s
  localparam real K = 10.0;        // 1/s
  localparam real PLANE_MIN = -0.1;    // x_min = y_min, uM
  localparam real CELL_SIZE = 0.0625;  // delta_x = delta_y, uM
  localparam real DT = 1.0 / 180.0;    // Euler step folded into the stored velocities, s
endpackage
