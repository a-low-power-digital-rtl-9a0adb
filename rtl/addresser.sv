// addresser: converts a 4.10 state value into its cidx index on the cellular phase plane.
//
// The cidx index is X = floor((v - v_min) / delta), computed with one subtraction and one
// arithmetic right shift because delta is a power of two (delta = 2^SHIFT LSB). Values below
// the plane give index 0 and values at or above its top edge give the last index, so the
// storage is never addressed outside its R x S array (the clamping is this design's choice;
// the source design only states the subtract-and-shift). With OUT_W = 6 and SHIFT = 5 the same
// circuit produces the 6-bit parallel output code, at twice the cidx resolution.
// Purely combinational; no clock.
module addresser #(
  parameter int unsigned      OUT_W = 5,            // index width: R = 2**OUT_W cells
  parameter int unsigned      SHIFT = 6,            // log2 of the cidx size in LSB
  parameter logic signed [13:0] V_MIN = -14'sd102   // lower edge of the plane, 4.10
) (
  input  logic signed [13:0] v,
  output logic [OUT_W-1:0]   idx
);
  logic signed [14:0] diff;
  logic signed [14:0] cidx;

  always_comb begin
    diff = 15'(v) - 15'(V_MIN);
    cidx = diff >>> SHIFT;
    if (diff < 0)
      idx = '0;
    else if (cidx > 15'((1 << OUT_W) - 1))
      idx = '1;
    else
      idx = cidx[OUT_W-1:0];
  end
endmodule
