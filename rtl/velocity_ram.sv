// velocity_ram: writable storage block, used in place of velocity_rom when the design is built
// with the reconfiguration path.
//
// Holds one velocity component (Dt*F for the X storage, Dt*G for the Y storage) for each of the
// R x S cells as a signed 14-bit 4.10 word, at address {X, Y} as in the hard-wired block. Any
// rate law, Hill coefficient set or time step can then be emulated by loading a new table. The
// read is combinational, like the hard-wired block's, so the network's timing does not change.
// One word is written on a rising clock edge when we is high. The contents are not reset and
// are undefined after power-up: the tables must be loaded before the network's outputs mean
// anything. The writable storage and its feed from the receiving UART follow the source
// design's description of its reconfigurable option, which the fabricated chip left out. The
// write port is this design's choice.
module velocity_ram
  import ca_pkg::*;
#(
  parameter int unsigned IDX_W = CELL_W   // log2 of R and of S
) (
  input  logic                   clk,     // CLK_core
  input  logic                   we,
  input  logic [2*IDX_W-1:0]     waddr,   // {X, Y}
  input  logic [13:0]            wdata,
  input  logic [IDX_W-1:0]       x_idx,
  input  logic [IDX_W-1:0]       y_idx,
  output logic signed [13:0]     vel
);
  localparam int unsigned DEPTH = 1 << (2 * IDX_W);

  logic [13:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign vel = signed'(mem[{x_idx, y_idx}]);
endmodule
