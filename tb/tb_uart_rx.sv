// tb_uart_rx: drives the receiver with 10-bit UART frames (start, 7 data bits LSB first, two
// stop bits) at one eighth of its clock, with a random phase between frames. It checks every
// packet, every assembled 14-bit word (high packet first, word_tgl changes once per word), that
// a short low glitch is not taken for a start bit, and that a frame with a low stop bit raises
// frame_err and is dropped. Also checks the frame length: pkt_valid comes within the tenth bit.
module tb_uart_rx;
  localparam int OS = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, rxd = 1;
  logic [6:0] pkt;
  logic pkt_valid, frame_err, word_tgl;
  logic [13:0] word;
  int n_pkt = 0, n_err = 0, n_word = 0;
  logic [6:0] last_pkt;
  logic [13:0] last_word;
  logic last_tgl = 0;

  uart_rx #(.OVERSAMPLE(OS), .DATA_BITS(7)) dut (.clk, .rst_n, .rxd, .pkt, .pkt_valid, .frame_err, .word, .word_tgl);

  always #5 clk = ~clk;

  always @(posedge clk) if (rst_n) begin
    if (pkt_valid) begin n_pkt++; last_pkt = pkt; end
    if (frame_err) n_err++;
    if (word_tgl != last_tgl) begin n_word++; last_word = word; last_tgl = word_tgl; end
  end

  task automatic send(logic [6:0] d, bit good_stop = 1);
    logic [9:0] f = {1'b1, good_stop ? 1'b1 : 1'b0, d, 1'b0};
    for (int b = 0; b < 10; b++) begin
      rxd = f[b];
      repeat (OS) @(negedge clk);
    end
    rxd = 1;
    repeat ($urandom_range(0, 11)) @(negedge clk);
  endtask

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %0d exp %0d", what, got, exp); end
  endtask

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] w;
    int p0;
    repeat (4) @(negedge clk);
    rst_n = 1;
    repeat (4) @(negedge clk);
    for (int k = 0; k < 60; k++) begin
      w  = 14'($urandom);
      p0 = n_pkt;
      send(w[13:7]);
      expect_eq("pkt count hi", n_pkt, p0 + 1);
      expect_eq("pkt hi", last_pkt, w[13:7]);
      send(w[6:0]);
      expect_eq("pkt count lo", n_pkt, p0 + 2);
      expect_eq("pkt lo", last_pkt, w[6:0]);
      expect_eq("words", n_word, k + 1);
      expect_eq("word", last_word, w);
    end
    // glitch shorter than half a bit
    p0 = n_pkt;
    rxd = 0; repeat (2) @(negedge clk); rxd = 1;
    repeat (30 * OS) @(negedge clk);
    expect_eq("glitch ignored", n_pkt, p0);
    // frame error: dropped, then resynchronises on the next frame
    send(7'h55, 0);
    expect_eq("frame_err", n_err, 1);
    expect_eq("bad packet dropped", n_pkt, p0);
    send(7'h2a);
    expect_eq("after error", last_pkt, 7'h2a);
    // latency: pkt_valid is raised before the end of the first stop bit plus sync delay
    p0 = n_pkt;
    begin
      logic [9:0] f = {2'b11, 7'h11, 1'b0};
      for (int b = 0; b < 9; b++) begin rxd = f[b]; repeat (OS) @(negedge clk); end
      rxd = 1;
      repeat (OS / 2 + 3) @(negedge clk);
      expect_eq("packet ready within first stop bit", n_pkt, p0 + 1);
      repeat (OS) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
