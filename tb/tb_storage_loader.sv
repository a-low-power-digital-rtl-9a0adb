// tb_storage_loader: sends words to the storage loader from a separate, faster clock through
// the word/toggle hand-off, spaced four core periods apart, and keeps a model of both storage
// blocks that is written from the loader's outputs. Checks that words are ignored while cfg_en
// is low, that 2048 words fill the X storage then the Y storage in address order, that the
// pointer wraps to X address 0 after that, that dropping cfg_en restarts at X address 0, that
// the two write enables are never high together and that each word causes exactly one write.
module tb_storage_loader;
  int checks = 0, failures = 0, writes = 0;
  logic clk = 0, fclk = 0, rst_n = 1, cfg_en = 0, tgl = 0;
  logic [13:0] word = 0, wdata;
  logic we_x, we_y;
  logic [9:0] waddr;
  logic [13:0] memx [1024], memy [1024], expx [1024], expy [1024];

  storage_loader #(.IDX_W(5)) dut (.clk, .rst_n, .cfg_en, .rx_word(word), .rx_tgl(tgl),
                                   .we_x, .we_y, .waddr, .wdata);

  always #20 clk = ~clk;
  always #3 fclk = ~fclk;

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d", what, got, exp);
    end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (we_x && we_y) expect_eq("one enable at a time", 0, 1);
    if (we_x) begin memx[waddr] <= wdata; writes++; end
    if (we_y) begin memy[waddr] <= wdata; writes++; end
  end

  task automatic push(logic [13:0] w);
    @(posedge fclk);
    word <= w; tgl <= ~tgl;
    repeat (4) @(posedge clk);
  endtask

  task automatic compare(string what);
    repeat (3) @(posedge clk);   // the last word reaches the storage two edges after its toggle
    for (int i = 0; i < 1024; i++) begin
      expect_eq({what, " X"}, int'(memx[i]), int'(expx[i]));
      expect_eq({what, " Y"}, int'(memy[i]), int'(expy[i]));
    end
  endtask

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #100000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [13:0] w;
    int n;
    for (int i = 0; i < 1024; i++) begin
      memx[i] = '0; memy[i] = '0; expx[i] = '0; expy[i] = '0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    push(14'h1234);                        // cfg_en low: ignored
    expect_eq("writes while cfg_en low", writes, 0);
    cfg_en = 1; repeat (3) @(posedge clk);
    for (int i = 0; i < 2048 + 5; i++) begin   // X then Y, then X 0..4 again
      w = 14'($urandom);
      n = i % 2048;
      if (n < 1024) expx[n] = w; else expy[n - 1024] = w;
      push(w);
    end
    compare("full load with wrap");
    expect_eq("one write per word", writes, 2048 + 5);
    cfg_en = 0; repeat (3) @(posedge clk);
    cfg_en = 1; repeat (3) @(posedge clk);
    w = 14'h0011; expx[0] = w; push(w);
    w = 14'h3fee; expx[1] = w; push(w);
    compare("restart at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
