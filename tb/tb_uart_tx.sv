// tb_uart_tx: a core-clock side changes (x, y) and frame_tgl once every 40 transmitter clocks,
// as CLK_core = CLK_serial1 / 40. A UART decoder in the testbench samples the line once per
// bit, checks start and both stop bits of each packet, rebuilds x and y from the four packets
// (x high, x low, y high, y low) and compares them with the pairs that were offered, in order.
// It also checks that frames follow one another with no idle bit, i.e. one frame per 40 clocks.
module tb_uart_tx;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, tgl = 0, txd, busy;
  logic [13:0] x = 0, y = 0;
  logic [27:0] sent [$];
  int idle_between = 0, frames = 0;

  uart_tx #(.DATA_BITS(7)) dut (.clk, .rst_n, .x_in(x), .y_in(y), .frame_tgl(tgl), .txd, .busy);

  always #5 clk = ~clk;

  // core side: new pair every 40 clocks, changed away from the transmitter's clock edge
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    forever begin
      repeat (40) @(posedge clk);
      #2;
      x = 14'($urandom); y = 14'($urandom);
      sent.push_back({x, y});
      tgl = ~tgl;
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s got %h exp %h", what, got, exp); end
  endtask

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // decoder: samples txd at the falling edge, one bit per clock
  initial begin
    logic [6:0] p [4];
    logic [27:0] exp_pair;
    int gap;
    @(posedge rst_n);
    while (frames < 100) begin
      gap = 0;
      @(negedge clk);
      while (txd) begin gap++; @(negedge clk); end
      if (frames > 0) idle_between += gap;
      for (int k = 0; k < 4; k++) begin
        if (k > 0) begin @(negedge clk); expect_eq("start bit", txd, 0); end
        for (int b = 0; b < 7; b++) begin @(negedge clk); p[k][b] = txd; end
        @(negedge clk); expect_eq("stop bit 1", txd, 1);
        @(negedge clk); expect_eq("stop bit 2", txd, 1);
      end
      exp_pair = sent.pop_front();
      expect_eq("x", {p[0], p[1]}, exp_pair[27:14]);
      expect_eq("y", {p[2], p[3]}, exp_pair[13:0]);
      frames++;
    end
    expect_eq("idle bits between frames", idle_between, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
