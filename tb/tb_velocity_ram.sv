// tb_velocity_ram: fills a writable storage block with random words through its write port,
// then reads every cell back through the (X, Y) read port. Checks that the word written at
// address {X, Y} is the one read for cell (X, Y), that the read follows the index in the same
// cycle, that a rewrite of some cells replaces exactly those words and that nothing is written
// while we is low.
module tb_velocity_ram;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [9:0] waddr = 0;
  logic [13:0] wdata = 0;
  logic [4:0] x_idx = 0, y_idx = 0;
  logic signed [13:0] vel;
  logic [13:0] model [1024];

  velocity_ram #(.IDX_W(5)) dut (.clk, .we, .waddr, .wdata, .x_idx, .y_idx, .vel);

  always #5 clk = ~clk;

  task automatic write(int a, logic [13:0] d, bit en);
    @(negedge clk);
    we = en; waddr = 10'(a); wdata = d;
    if (en) model[a] = d;
    @(negedge clk);
    we = 0;
  endtask

  task automatic readback(string what);
    for (int i = 0; i < 32; i++) begin
      for (int j = 0; j < 32; j++) begin
        x_idx = 5'(i); y_idx = 5'(j);
        #1;
        checks++;
        if (vel !== signed'(model[i * 32 + j])) begin
          failures++;
          if (failures < 20) $display("FAIL %s cell (%0d,%0d) = %h exp %h", what, i, j, vel, model[i * 32 + j]);
        end
      end
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 1024; a++) write(a, 14'($urandom), 1'b1);
    readback("fill");
    for (int k = 0; k < 64; k++) write(int'($urandom_range(0, 1023)), 14'($urandom), 1'b1);
    readback("rewrite");
    for (int k = 0; k < 64; k++) write(int'($urandom_range(0, 1023)), 14'($urandom), 1'b0);
    readback("we low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
