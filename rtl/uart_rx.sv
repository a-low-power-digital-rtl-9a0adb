// uart_rx: receive half of the chip's UART interface, clocked by CLK_serial2.
//
// The serial input carries 10-bit frames: one start bit, seven data bits sent LSB first and
// two stop bits. CLK_serial2 runs OVERSAMPLE (8) times faster than the baud rate. The line is
// passed through a two-flop synchroniser; a falling edge starts a frame, the start bit is
// re-checked half a bit later, and from there every bit is sampled at its middle. A low first
// stop bit raises frame_err for one clock and drops the packet (the second stop bit is treated
// as idle line). Two consecutive packets form one 14-bit word, high seven bits first; each
// complete word is placed on word and word_tgl changes level, so a slower clock domain can
// pick the word up through a synchronised toggle. The frame format and the 8x sampling follow
// the source design; the packet order and the toggle hand-off are this design's choices.
module uart_rx #(
  parameter int unsigned OVERSAMPLE = 8,
  parameter int unsigned DATA_BITS  = 7
) (
  input  logic                      clk,        // CLK_serial2
  input  logic                      rst_n,
  input  logic                      rxd,        // IN_serial
  output logic [DATA_BITS-1:0]      pkt,        // last packet received
  output logic                      pkt_valid,  // one-clock pulse per good packet
  output logic                      frame_err,  // one-clock pulse per bad stop bit
  output logic [2*DATA_BITS-1:0]    word,       // last complete word
  output logic                      word_tgl    // changes level when word is updated
);
  typedef enum logic [1:0] {S_IDLE, S_START, S_DATA, S_STOP} state_t;

  localparam int unsigned CW = $clog2(OVERSAMPLE);
  localparam int unsigned BW = $clog2(DATA_BITS + 1);

  state_t                 state;
  logic [CW-1:0]          cnt;
  logic [BW-1:0]          nbits;
  logic [DATA_BITS-1:0]   sh;
  logic [DATA_BITS-1:0]   hi;
  logic                   have_hi;
  logic                   rx_m, rx_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_m <= 1'b1;
      rx_s <= 1'b1;
    end else begin
      rx_m <= rxd;
      rx_s <= rx_m;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      nbits     <= '0;
      sh        <= '0;
      hi        <= '0;
      have_hi   <= 1'b0;
      pkt       <= '0;
      pkt_valid <= 1'b0;
      frame_err <= 1'b0;
      word      <= '0;
      word_tgl  <= 1'b0;
    end else begin
      pkt_valid <= 1'b0;
      frame_err <= 1'b0;
      unique case (state)
        S_IDLE: begin
          cnt <= '0;
          if (!rx_s) state <= S_START;
        end
        S_START: begin
          if (cnt == CW'(OVERSAMPLE / 2 - 1)) begin
            cnt   <= '0;
            nbits <= '0;
            state <= rx_s ? S_IDLE : S_DATA;   // a glitch is not a start bit
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_DATA: begin
          if (cnt == CW'(OVERSAMPLE - 1)) begin
            cnt   <= '0;
            sh    <= {rx_s, sh[DATA_BITS-1:1]};
            nbits <= nbits + 1'b1;
            if (nbits == BW'(DATA_BITS - 1)) state <= S_STOP;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        S_STOP: begin
          if (cnt == CW'(OVERSAMPLE - 1)) begin
            cnt   <= '0;
            state <= S_IDLE;
            if (rx_s) begin
              pkt       <= sh;
              pkt_valid <= 1'b1;
              if (have_hi) begin
                word     <= {hi, sh};
                word_tgl <= ~word_tgl;
                have_hi  <= 1'b0;
              end else begin
                hi      <= sh;
                have_hi <= 1'b1;
              end
            end else begin
              frame_err <= 1'b1;
            end
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
