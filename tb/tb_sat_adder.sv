// tb_sat_adder: checks next = prev + vel + in_ext with saturation to the signed 14-bit range
// and the sat flag, for corner cases and random operands. Combinational, no clock.
module tb_sat_adder;
  int checks = 0, failures = 0;
  logic signed [13:0] a, b, c, y;
  logic s;

  sat_adder dut (.prev(a), .vel(b), .in_ext(c), .next(y), .sat(s));

  task automatic check(int pa, int pb, int pc);
    int sum, exp_y;
    bit exp_s;
    a = 14'(pa); b = 14'(pb); c = 14'(pc);
    #1;
    sum = pa + pb + pc;
    exp_s = (sum > 8191) || (sum < -8192);
    exp_y = (sum > 8191) ? 8191 : (sum < -8192) ? -8192 : sum;
    checks++;
    if (int'(y) != exp_y || s != exp_s) begin
      failures++;
      $display("FAIL %0d+%0d+%0d -> %0d sat=%0b (exp %0d %0b)", pa, pb, pc, y, s, exp_y, exp_s);
    end
  endtask

  function automatic int rnd14();
    return int'($urandom_range(0, 16383)) - 8192;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(8191, 1, 0);
    check(8191, 8191, 8191);
    check(-8192, -1, 0);
    check(-8192, -8192, -8192);
    check(8000, 100, 91);
    check(8000, 100, 92);
    check(-102, 17, 16);
    repeat (5000) check(rnd14(), rnd14(), rnd14());
    repeat (2000) check(int'($urandom_range(0, 2100)) - 110, int'($urandom_range(0, 2000)) - 1000, 16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
