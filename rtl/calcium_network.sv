// calcium_network: the pipelined network of N_UNITS calcium units sharing one datapath.
//
// Implements the cellular CICR model  x+ = x- + Dt*F(X, Y) + IN_ext,  y+ = y- + Dt*G(X, Y)
// for every unit in turn. Two ring shift registers hold x and y of all units. The addressers
// are clocked by the core clock: one cycle before a unit reaches the last stage, its x and y
// (stage N-2) are turned into cell indices (X, Y) by one subtraction and one shift, and the
// indices are registered. In the next cycle the unit (unit u) sits in the last stage, the X and
// Y storage blocks return Dt*F and Dt*G for the registered cell, the adders add them (and the
// unit's input, for x) to the old state, and the result enters stage 0. Every unit is thus
// advanced once every N clocks (N >= 2). The register-to-register paths are the
// subtract-and-shift of the addressers, and a table read followed by one addition. x_out / y_out show the state just written (stage 0) and
// out_unit tells which unit it belongs to; frame_tgl changes level on every clock so the serial
// transmitter knows a new pair is ready. After reset every unit starts at x = y = 0 and unit 0
// is advanced first. Structure and word widths follow the source design; the reset state, the
// out_unit port and the edge clamping of the addressers are this design's choices; the clocked
// addressers follow the block diagram, which feeds the core clock to them.
// With RECONFIG = 0 (the fabricated chip) the storage blocks are the hard-wired tables and
// cfg_en is not used. With RECONFIG = 1 they are writable (velocity_ram) and a storage_loader
// writes the words received while cfg_en is high into them, so other rate laws can be
// emulated. The source design describes this option but did not fabricate it.
module calcium_network
  import ca_pkg::*;
#(
  parameter int unsigned N        = N_UNITS,
  parameter bit          RECONFIG = 1'b0     // 1: writable storage blocks, loaded over rx_word
) (
  input  logic                   clk,        // CLK_core
  input  logic                   rst_n,
  input  logic                   load_en,    // Controlling Signals: input loading enable
  input  logic                   cfg_en,     // Controlling Signals: table loading (RECONFIG)
  input  logic [W-1:0]           rx_word,    // input words from the UART receiver
  input  logic                   rx_tgl,
  output fix_t                   x_out,
  output fix_t                   y_out,
  output logic [$clog2(N)-1:0]   out_unit,
  output logic                   frame_tgl,
  output logic                   in_written, // an input word was stored this cycle
  output logic                   sat         // the x or y adder clipped this cycle
);
  localparam int unsigned UW = $clog2(N);

  fix_t              xq, yq, xn, yn, vx, vy, in_ext;
  logic [W-1:0]      xq_raw, yq_raw, xh_raw, yh_raw;
  logic [CELL_W-1:0] xi_d, yi_d, xi, yi;
  fix_t              xp, yp;
  logic [W-1:0]      xp_raw, yp_raw;
  logic [UW-1:0]     u;
  logic              sat_x, sat_y;

  assign xq = fix_t'(xq_raw);
  assign yq = fix_t'(yq_raw);
  assign xp = fix_t'(xp_raw);
  assign yp = fix_t'(yp_raw);

  // cell of the reset state x = y = 0, held by the address registers during reset
  localparam logic [CELL_W-1:0] X_CELL0 = CELL_W'((0 - int'(X_MIN_Q)) >> CELL_SH);
  localparam logic [CELL_W-1:0] Y_CELL0 = CELL_W'((0 - int'(Y_MIN_Q)) >> CELL_SH);

  addresser #(.OUT_W(CELL_W), .SHIFT(CELL_SH), .V_MIN(X_MIN_Q)) u_addr_x (.v(xp), .idx(xi_d));
  addresser #(.OUT_W(CELL_W), .SHIFT(CELL_SH), .V_MIN(Y_MIN_Q)) u_addr_y (.v(yp), .idx(yi_d));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      xi <= X_CELL0;
      yi <= Y_CELL0;
    end else begin
      xi <= xi_d;
      yi <= yi_d;
    end
  end

  if (RECONFIG) begin : g_reconfig
    logic                  we_x, we_y;
    logic [2*CELL_W-1:0]   waddr;
    logic [W-1:0]          wdata;

    storage_loader #(.IDX_W(CELL_W)) u_loader (
      .clk, .rst_n, .cfg_en, .rx_word, .rx_tgl, .we_x, .we_y, .waddr, .wdata);
    velocity_ram #(.IDX_W(CELL_W)) u_x_storage (
      .clk, .we(we_x), .waddr, .wdata, .x_idx(xi), .y_idx(yi), .vel(vx));
    velocity_ram #(.IDX_W(CELL_W)) u_y_storage (
      .clk, .we(we_y), .waddr, .wdata, .x_idx(xi), .y_idx(yi), .vel(vy));
  end else begin : g_fixed
    velocity_rom #(.IDX_W(CELL_W), .COMPONENT_Y(1'b0)) u_x_storage (.x_idx(xi), .y_idx(yi), .vel(vx));
    velocity_rom #(.IDX_W(CELL_W), .COMPONENT_Y(1'b1)) u_y_storage (.x_idx(xi), .y_idx(yi), .vel(vy));
  end

  inputs_table #(.N_UNITS(N)) u_inputs (
    .clk, .rst_n, .load_en, .rx_word, .rx_tgl,
    .rd_idx(u), .in_ext, .wr_pulse(in_written)
  );

  sat_adder u_adder_x (.prev(xq), .vel(vx), .in_ext(in_ext), .next(xn), .sat(sat_x));
  sat_adder u_adder_y (.prev(yq), .vel(vy), .in_ext('0),     .next(yn), .sat(sat_y));

  shift_reg #(.DEPTH(N), .W(W)) u_shift_x (
    .clk, .rst_n, .en(1'b1), .d(xn), .q(xq_raw), .q_next(xp_raw), .head(xh_raw));
  shift_reg #(.DEPTH(N), .W(W)) u_shift_y (
    .clk, .rst_n, .en(1'b1), .d(yn), .q(yq_raw), .q_next(yp_raw), .head(yh_raw));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      u         <= '0;
      out_unit  <= '0;
      frame_tgl <= 1'b0;
    end else begin
      u         <= (u == UW'(N - 1)) ? '0 : u + 1'b1;
      out_unit  <= u;
      frame_tgl <= ~frame_tgl;
    end
  end

  assign x_out = fix_t'(xh_raw);
  assign y_out = fix_t'(yh_raw);
  assign sat   = sat_x | sat_y;
endmodule
