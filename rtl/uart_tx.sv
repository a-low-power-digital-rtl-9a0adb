// uart_tx: transmit half of the chip's UART interface, clocked by CLK_serial1 (the baud rate).
//
// Every core clock the calcium network presents one unit's new state (x, y) and changes the
// level of frame_tgl. The toggle is brought into the CLK_serial1 domain by a two-flop
// synchroniser; on each change the pair is captured (it has then been stable for two bit times
// and stays so for the rest of the core period) and sent as four UART packets of 10 bits:
// x[13:7], x[6:0], y[13:7], y[6:0], each with one start bit, seven data bits LSB first and two
// stop bits. One frame is 40 bit times, which is why CLK_core = CLK_serial1 / 40; frames then
// follow each other without a gap. The packet format and the 40:1 clock ratio follow the
// source design; the packet order and the synchroniser are this design's choices.
module uart_tx #(
  parameter int unsigned DATA_BITS = 7
) (
  input  logic                     clk,        // CLK_serial1
  input  logic                     rst_n,
  input  logic [2*DATA_BITS-1:0]   x_in,       // core domain, stable for a core period
  input  logic [2*DATA_BITS-1:0]   y_in,
  input  logic                     frame_tgl,  // core domain: new data on every change
  output logic                     txd,        // OUT_serial, idle high
  output logic                     busy
);
  localparam int unsigned PKT   = DATA_BITS + 3;   // start + data + 2 stop
  localparam int unsigned FRAME = 4 * PKT;
  localparam int unsigned CW    = $clog2(FRAME);

  logic [2:0]             tsync;
  logic                   detect;
  logic [4*DATA_BITS-1:0] hold;
  logic                   pending;
  logic [FRAME-1:0]       sreg;
  logic [CW-1:0]          left;
  logic [FRAME-1:0]       frame;

  function automatic logic [PKT-1:0] packet(input logic [DATA_BITS-1:0] d);
    return {2'b11, d, 1'b0};   // sent LSB first: start, d[0] .. d[6], stop, stop
  endfunction

  assign detect = tsync[1] ^ tsync[2];
  assign frame  = {packet(hold[DATA_BITS-1:0]),                  // y low, sent last
                   packet(hold[2*DATA_BITS-1:DATA_BITS]),        // y high
                   packet(hold[3*DATA_BITS-1:2*DATA_BITS]),      // x low
                   packet(hold[4*DATA_BITS-1:3*DATA_BITS])};     // x high, sent first
  assign busy   = (left != '0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tsync   <= '0;
      hold    <= '0;
      pending <= 1'b0;
      sreg    <= '1;
      left    <= '0;
      txd     <= 1'b1;
    end else begin
      tsync <= {tsync[1:0], frame_tgl};
      if (detect) hold <= {x_in, y_in};
      if (left == '0 && pending) begin
        txd     <= frame[0];
        sreg    <= frame >> 1;
        left    <= CW'(FRAME - 1);
        pending <= detect;
      end else begin
        pending <= pending | detect;
        if (left != '0) begin
          txd  <= sreg[0];
          sreg <= sreg >> 1;
          left <= left - 1'b1;
        end else begin
          txd  <= 1'b1;
        end
      end
    end
  end
endmodule
