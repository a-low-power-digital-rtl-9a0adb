// tb_addresser: checks the cell-index conversion at the network's setting (5-bit index, cell of
// 64 LSB) and at the parallel-output setting (6-bit code, 32 LSB), against an integer model of
// floor((v - v_min) / cell) clamped to the index range. Corners (both clamps, cell edges) are
// driven first, then random values over the whole 14-bit range. Combinational, no clock.
module tb_addresser;
  int checks = 0, failures = 0;
  logic signed [13:0] v;
  logic [4:0] idx5;
  logic [5:0] idx6;

  addresser #(.OUT_W(5), .SHIFT(6), .V_MIN(-14'sd102)) dut5 (.v(v), .idx(idx5));
  addresser #(.OUT_W(6), .SHIFT(5), .V_MIN(-14'sd102)) dut6 (.v(v), .idx(idx6));

  function automatic int ref_idx(int val, int cellsz, int maxi);
    int d = val + 102;
    if (d < 0) return 0;
    if (d / cellsz > maxi) return maxi;
    return d / cellsz;
  endfunction

  task automatic check(int val);
    v = 14'(val);
    #1;
    checks++;
    if (idx5 != 5'(ref_idx(val, 64, 31)) || idx6 != 6'(ref_idx(val, 32, 63))) begin
      failures++;
      $display("FAIL v=%0d idx5=%0d (exp %0d) idx6=%0d (exp %0d)", val, idx5,
               ref_idx(val, 64, 31), idx6, ref_idx(val, 32, 63));
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int corners[] = '{-8192, -103, -102, -101, -39, -38, 0, 26, 1945, 1946, 1947, 8191, 920, 921};
    foreach (corners[i]) check(corners[i]);
    repeat (3000) check(int'($urandom_range(0, 16383)) - 8192);
    repeat (2000) check(int'($urandom_range(0, 2200)) - 150);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
