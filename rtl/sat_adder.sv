// sat_adder: the Adder block of one dimension, next = prev + velocity + input.
//
// Adds the velocity fetched from the storage block and the external input (tied to zero for
// the y dimension) to the previous state of the variable. The sign of velocity + input sets
// the direction of motion on the phase plane and its size sets the step. The sum is formed at
// 16 bits and saturated to the 14-bit 4.10 range, so a large excursion cannot wrap around
// (saturation is this design's choice; the source design does not discuss overflow).
// Combinational.
module sat_adder (
  input  logic signed [13:0] prev,
  input  logic signed [13:0] vel,
  input  logic signed [13:0] in_ext,
  output logic signed [13:0] next,
  output logic               sat     // high when the result was clipped
);
  localparam logic signed [15:0] MAXV = 16'sd8191;
  localparam logic signed [15:0] MINV = -16'sd8192;
  logic signed [15:0] sum;

  always_comb begin
    sum = 16'(prev) + 16'(vel) + 16'(in_ext);
    sat = 1'b0;
    if (sum > MAXV) begin
      next = 14'sd8191;
      sat  = 1'b1;
    end else if (sum < MINV) begin
      next = -14'sd8192;
      sat  = 1'b1;
    end else begin
      next = sum[13:0];
    end
  end
endmodule
