// inputs_table: the Inputs block, one external input IN_ext = Delta_t * IN per calcium unit.
//
// Holds N_UNITS signed 4.10 input values; the value of the unit being advanced (rd_idx) is
// added to its x update. Values arrive as 14-bit words from the UART receiver, which runs on
// CLK_serial2: its word_tgl is synchronised into the core clock domain with two flops and each
// change writes the word into the next entry, starting at entry 0. The Controlling Signals pin
// load_en (also synchronised) enables writing; while it is low the write pointer returns to 0
// and received words are ignored. Because the hand-off crosses into the slow core clock, a
// sender must leave at least three core clock periods between words. All entries reset to 0
// (no input). The block's role follows the source design; the loading protocol is this
// design's choice.
module inputs_table #(
  parameter int unsigned N_UNITS = 16
) (
  input  logic                          clk,       // CLK_core
  input  logic                          rst_n,
  input  logic                          load_en,   // Controlling Signals pin, asynchronous
  input  logic [13:0]                   rx_word,   // from uart_rx (other clock domain)
  input  logic                          rx_tgl,
  input  logic [$clog2(N_UNITS)-1:0]    rd_idx,
  output logic signed [13:0]            in_ext,
  output logic                          wr_pulse   // a word was written this cycle
);
  localparam int unsigned IW = $clog2(N_UNITS);

  logic signed [13:0] table_q [N_UNITS];
  logic [2:0]         tsync;
  logic [1:0]         lsync;
  logic [IW-1:0]      wp;

  assign wr_pulse = (tsync[1] ^ tsync[2]) && lsync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsync <= '0;
      lsync <= '0;
      wp    <= '0;
      for (int i = 0; i < N_UNITS; i++) table_q[i] <= '0;
    end else begin
      tsync <= {tsync[1:0], rx_tgl};
      lsync <= {lsync[0], load_en};
      if (!lsync[1]) begin
        wp <= '0;
      end else if (wr_pulse) begin
        table_q[wp] <= signed'(rx_word);
        wp          <= (wp == IW'(N_UNITS - 1)) ? '0 : wp + 1'b1;
      end
    end
  end

  assign in_ext = table_q[rd_idx];
endmodule
