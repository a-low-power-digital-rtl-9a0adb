// storage_loader: writes velocity tables received over the serial input into the two storage
// blocks (the reconfiguration path).
//
// While the control pin cfg_en is high, every 14-bit word that the UART receiver completes is
// written to the next storage address: first all R x S words of the X storage, address {X, Y}
// counting up from 0, then all words of the Y storage in the same order. The pointer then wraps
// to the X storage. While cfg_en is low the pointer returns to 0 and words are not written. The
// receiver runs on CLK_serial2: its word_tgl is synchronised into the core clock domain with two
// flops, cfg_en likewise, so a sender must leave at least three core clock periods between
// words (as for the inputs). A word is written on the core edge after its toggle has been
// seen. Loading a full pair of 32 x 32 tables takes 2048 words. The path from the receiving
// UART to both storage blocks follows the source design; the cfg_en pin and the load order are
// this design's choices.
module storage_loader #(
  parameter int unsigned IDX_W = 5   // log2 of R and of S
) (
  input  logic                 clk,       // CLK_core
  input  logic                 rst_n,
  input  logic                 cfg_en,    // Controlling Signals pin, asynchronous
  input  logic [13:0]          rx_word,   // from uart_rx (other clock domain)
  input  logic                 rx_tgl,
  output logic                 we_x,
  output logic                 we_y,
  output logic [2*IDX_W-1:0]   waddr,
  output logic [13:0]          wdata
);
  logic [2:0]         tsync;
  logic [1:0]         csync;
  logic [2*IDX_W:0]   wp;       // top bit selects the Y storage
  logic               wr;

  assign wr = (tsync[1] ^ tsync[2]) && csync[1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsync <= '0;
      csync <= '0;
      wp    <= '0;
      we_x  <= 1'b0;
      we_y  <= 1'b0;
      waddr <= '0;
      wdata <= '0;
    end else begin
      tsync <= {tsync[1:0], rx_tgl};
      csync <= {csync[0], cfg_en};
      we_x  <= wr && !wp[2*IDX_W];
      we_y  <= wr &&  wp[2*IDX_W];
      if (wr) begin
        waddr <= wp[2*IDX_W-1:0];
        wdata <= rx_word;
      end
      if (!csync[1]) wp <= '0;
      else if (wr)   wp <= wp + 1'b1;
    end
  end
endmodule
