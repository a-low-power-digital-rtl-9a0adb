// cicr_chip: top level of the digital calcium-dynamics emulator chip.
//
// Sixteen Calcium-Induced Calcium Release units are emulated in real time by one pipelined
// datapath (calcium_network). Three clocks drive it, as on the fabricated part: CLK_core
// advances one unit per cycle; CLK_serial1 is the UART baud rate, forty times CLK_core, so that
// the four 10-bit packets carrying one unit's x and y leave in one core period; CLK_serial2 is
// eight times the baud rate and samples the serial input. Per-unit inputs are loaded through
// IN_serial while the load_en control pin is high. Each core cycle the unit just advanced
// appears on the two 6-bit parallel outputs (its position at half-cell resolution, 1/32 uM)
// and, in full 14-bit precision, in the next serial frame on OUT_serial. The pins (one serial
// input, three clocks, one serial output, 2 x 6 parallel outputs) follow the source design; the
// reset pin, the single control pin and the 6-bit output coding are this design's choices.
// With RECONFIG = 1 the two velocity tables are writable and are loaded through IN_serial
// while cfg_en is high (2048 words, X table first); the source design describes this
// option but left it out of the chip. By default the chip is built as fabricated and cfg_en is
// unused. The cfg_en pin is this design's choice.
// rst_n is asynchronous and goes to all three clock domains; release it while the clocks are
// quiet or let the first frames be discarded.
module cicr_chip
  import ca_pkg::*;
#(
  parameter bit RECONFIG = 1'b0   // 1: add the table reconfiguration path (not on the chip)
) (
  input  logic               clk_core,
  input  logic               clk_serial1,
  input  logic               clk_serial2,
  input  logic               rst_n,
  input  logic               load_en,        // Controlling Signals: load the inputs
  input  logic               cfg_en,         // Controlling Signals: load the tables (RECONFIG)
  input  logic               in_serial,      // IN_serial, UART 7 data bits, 2 stop bits
  output logic               out_serial,     // OUT_serial
  output logic [PAR_W-1:0]   out_parallel_x,
  output logic [PAR_W-1:0]   out_parallel_y
);
  logic [W-1:0]            rx_word;
  logic                    rx_tgl;
  logic [PKT_BITS-1:0]     rx_pkt;
  logic                    rx_pkt_valid, rx_frame_err;
  fix_t                    x_out, y_out;
  logic [$clog2(N_UNITS)-1:0] out_unit;
  logic                    frame_tgl, in_written, sat, tx_busy;

  uart_rx #(.OVERSAMPLE(8), .DATA_BITS(PKT_BITS)) u_uart_rx (
    .clk(clk_serial2), .rst_n, .rxd(in_serial),
    .pkt(rx_pkt), .pkt_valid(rx_pkt_valid), .frame_err(rx_frame_err),
    .word(rx_word), .word_tgl(rx_tgl)
  );

  calcium_network #(.N(N_UNITS), .RECONFIG(RECONFIG)) u_network (
    .clk(clk_core), .rst_n, .load_en, .cfg_en, .rx_word, .rx_tgl,
    .x_out, .y_out, .out_unit, .frame_tgl, .in_written, .sat
  );

  uart_tx #(.DATA_BITS(PKT_BITS)) u_uart_tx (
    .clk(clk_serial1), .rst_n, .x_in(x_out), .y_in(y_out), .frame_tgl,
    .txd(out_serial), .busy(tx_busy)
  );

  addresser #(.OUT_W(PAR_W), .SHIFT(CELL_SH - 1), .V_MIN(X_MIN_Q)) u_par_x (
    .v(x_out), .idx(out_parallel_x));
  addresser #(.OUT_W(PAR_W), .SHIFT(CELL_SH - 1), .V_MIN(Y_MIN_Q)) u_par_y (
    .v(y_out), .idx(out_parallel_y));
endmodule
