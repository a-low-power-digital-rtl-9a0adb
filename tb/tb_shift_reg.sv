// tb_shift_reg: checks the 16-stage shift register: all stages read the reset value after
// reset, a word written at d appears at q exactly DEPTH enabled clocks later, at q_next one
// shift earlier and at head one clock later, and nothing moves while en is low. An array in
// the testbench is the reference.
module tb_shift_reg;
  localparam int DEPTH = 16;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 1, en = 0;
  logic [13:0] d = '0, q, q_next, head;
  logic [13:0] model [DEPTH];

  shift_reg #(.DEPTH(DEPTH), .W(14), .INIT(14'h0)) dut (.clk, .rst_n, .en, .d, .q, .q_next, .head);

  always #5 clk = ~clk;

  task automatic compare(string what);
    checks++;
    if (q !== model[DEPTH-1] || q_next !== model[DEPTH-2] || head !== model[0]) begin
      failures++;
      $display("FAIL %s q=%h exp %h q_next=%h exp %h head=%h exp %h", what, q, model[DEPTH-1],
               q_next, model[DEPTH-2], head, model[0]);
    end
  endtask

  initial #1 rst_n = 0;   // a real falling edge: asynchronous reset from time 1

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int i = 0; i < DEPTH; i++) begin   // drain the reset contents
      compare("reset");
      @(negedge clk);
      en = 1; d = 14'($urandom);
      @(posedge clk); #1;
      for (int k = DEPTH-1; k > 0; k--) model[k] = model[k-1];
      model[0] = d;
    end
    repeat (400) begin
      @(negedge clk);
      en = ($urandom_range(0, 3) != 0);
      d  = 14'($urandom);
      @(posedge clk); #1;
      if (en) begin
        for (int k = DEPTH-1; k > 0; k--) model[k] = model[k-1];
        model[0] = d;
      end
      compare(en ? "shift" : "hold");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
