// tb_enc3: self-checking testbench for enc3, the 3-valued encoder of the
// modified 2-input BSC adder.
//
// For every pair of BSC digits x, y in {0,1,2} and both values of the
// incoming carry c_i(1), the encoder sees p_i1 = [x=2] + [y=2] and
// p_i0 = [x=1] + [y=1] (each line order is tried).  Expected outputs are
// computed from the position sum p = x + y alone:
//   c_{i+1}(2) = [p = 4], c_{i+1}(1) = [p >= 2], w = p mod 2,
//   2 v(1) + v(0) = w + c_i(1)
// which is the digit table of the 2-input adder written as arithmetic.
// Combinational; each check waits 1 ns.
module tb_enc3;

  logic [1:0] p1, p0;
  logic       c1_in, c1_out, c2_out, v1, v0;

  int checks = 0;
  int failures = 0;

  enc3 dut (.p1, .p0, .c1_in, .c1_out, .c2_out, .v1, .v0);

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (p1=%b p0=%b c=%b)", what, got, want, p1, p0, c1_in);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = 0; x < 3; x++)
      for (int y = 0; y < 3; y++)
        for (int c = 0; c < 2; c++)
          for (int swap = 0; swap < 2; swap++) begin
            int p, w;
            p     = x + y;
            w     = p % 2;
            p1    = swap ? {x == 2, y == 2} : {y == 2, x == 2};
            p0    = swap ? {x == 1, y == 1} : {y == 1, x == 1};
            c1_in = c[0];
            #1;
            expect_eq("c(2)", int'(c2_out), int'(p == 4));
            expect_eq("c(1)", int'(c1_out), int'(p >= 2));
            expect_eq("v", 2 * int'(v1) + int'(v0), w + c);
            expect_eq("split", 2 * int'(c2_out) + 2 * int'(c1_out) + w, p);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
