// tb_inputs_table: writes words into the inputs table from a separate, faster clock through
// the word/toggle hand-off, spaced four core periods apart. Checks that words are ignored while
// load_en is low, that entries fill in order from 0 and wrap after 16, that dropping load_en
// restarts at entry 0, and that every entry reads back on in_ext (all zero after reset).
module tb_inputs_table;
  int checks = 0, failures = 0;
  logic clk = 0, fclk = 0, rst_n = 1, load_en = 0, tgl = 0, wr;
  logic [13:0] word = 0;
  logic [3:0] rd_idx = 0;
  logic signed [13:0] in_ext;
  logic [13:0] model [16];

  inputs_table #(.N_UNITS(16)) dut (.clk, .rst_n, .load_en, .rx_word(word), .rx_tgl(tgl),
                                    .rd_idx, .in_ext, .wr_pulse(wr));

  always #20 clk = ~clk;
  always #3 fclk = ~fclk;

  task automatic push(logic [13:0] w);
    @(posedge fclk);
    word <= w; tgl <= ~tgl;
    repeat (4) @(posedge clk);
  endtask

  task automatic readback(string what);
    for (int i = 0; i < 16; i++) begin
      rd_idx = 4'(i);
      #1;
      checks++;
      if (in_ext !== model[i]) begin
        failures++;
        $display("FAIL %s entry %0d = %h exp %h", what, i, in_ext, model[i]);
      end
    end
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
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    readback("after reset");
    push(14'h1234);                    // load_en low: ignored
    readback("ignored");
    load_en = 1; repeat (3) @(posedge clk);
    for (int i = 0; i < 20; i++) begin // 20 words: entries 0..15 then 0..3 again
      w = 14'($urandom);
      model[i % 16] = w;
      push(w);
    end
    readback("load with wrap");
    load_en = 0; repeat (3) @(posedge clk);
    load_en = 1; repeat (3) @(posedge clk);
    w = 14'h0011; model[0] = w; push(w);
    w = 14'h3fee; model[1] = w; push(w);
    readback("restart at 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
