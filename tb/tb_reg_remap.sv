// Testbench for reg_remap: exhaustive check against an arithmetic model,
// the worked example (logical 7, map 6 -> physical 55) and the register
// partitionings for 1, 2-3 and 4-6 threads, which must give each thread a
// disjoint set of physical registers.
module tb_reg_remap;
  import mt_pkg::*;
  int checks = 0, failures = 0;
  logic [4:0] lreg;
  rrm_t rrm;
  preg_t preg;
  reg_remap dut (.lreg, .rrm, .preg);

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  function automatic int model(input int l, input int m);
    if (l == 0 || l >= 16) return l;
    return (l % 8) + 8 * ((l / 8) | m);
  endfunction

  initial begin
    #1;
    for (int m = 0; m < 8; m++)
      for (int l = 0; l < 32; l++) begin
        lreg = 5'(l); rrm = rrm_t'(m); #1;
        expect_eq(int'(preg), model(l, m), $sformatf("l=%0d m=%0d", l, m));
      end
    lreg = 5'd7; rrm = 3'd6; #1; expect_eq(int'(preg), 55, "example 7|6");
    // two or three threads: logical 1..15 with maps 0, 4, 6
    begin
      int owner [64];
      int maps3 [3] = '{0, 4, 6};
      int maps6 [6] = '{0, 1, 4, 5, 6, 7};
      foreach (owner[i]) owner[i] = -1;
      foreach (maps3[t])
        for (int l = 1; l <= 15; l++) begin
          lreg = 5'(l); rrm = rrm_t'(maps3[t]); #1;
          checks++;
          if (owner[preg] != -1) begin failures++; $display("FAIL overlap 3-thread p=%0d", preg); end
          owner[preg] = t;
        end
      lreg = 5'd1; rrm = 3'd4; #1; expect_eq(int'(preg), 33, "thread1 first reg");
      lreg = 5'd15; rrm = 3'd4; #1; expect_eq(int'(preg), 47, "thread1 last reg");
      foreach (owner[i]) owner[i] = -1;
      foreach (maps6[t])
        for (int l = 1; l <= 7; l++) begin
          lreg = 5'(l); rrm = rrm_t'(maps6[t]); #1;
          checks++;
          if (owner[preg] != -1) begin failures++; $display("FAIL overlap 6-thread p=%0d", preg); end
          owner[preg] = t;
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
