// tb_enc4: self-checking testbench for enc4, the 4-valued encoder of the
// modified 3-input BSC adder.
//
// For every triple of BSC digits x, y, z in {0,1,2} and every value of the
// incoming carries c_i(1), c_i(2), the encoder sees p_i1 and p_i0 as the
// lines of the digits' binary components.  Expected outputs come from the
// position sum p = x + y + z written in binary, p = 4 c(2) + 2 c(1) + w,
// and from 2 v(1) + v(0) = w + c_i(1) + c_i(2).  A few rows of the
// decomposition table are also checked literally.
// Combinational; each check waits 1 ns.
module tb_enc4;

  logic [2:0] p1, p0;
  logic       c1_in, c2_in, c1_out, c2_out, v1, v0;

  int checks = 0;
  int failures = 0;

  enc4 dut (.p1, .p0, .c1_in, .c2_in, .c1_out, .c2_out, .v1, .v0);

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d (p1=%b p0=%b c1=%b c2=%b)",
               what, got, want, p1, p0, c1_in, c2_in);
    end
  endtask

  task automatic apply(int x, int y, int z, int c1, int c2);
    p1    = {z == 2, y == 2, x == 2};
    p0    = {z == 1, y == 1, x == 1};
    c1_in = c1[0];
    c2_in = c2[0];
    #1;
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
        for (int z = 0; z < 3; z++)
          for (int c = 0; c < 4; c++) begin
            int p;
            p = x + y + z;
            apply(x, y, z, c % 2, c / 2);
            expect_eq("c(2)", int'(c2_out), (p >> 2) & 1);
            expect_eq("c(1)", int'(c1_out), (p >> 1) & 1);
            expect_eq("v", 2 * int'(v1) + int'(v0), (p & 1) + (c % 2) + (c / 2));
          end
    // literal rows: (p_i1, p_i0) = (1,2) -> c(2)=1 c(1)=0 w=0 ; (3,0) -> 1,1,0 ; (0,3) -> 0,1,1
    apply(2, 1, 1, 0, 0);
    expect_eq("row p=4 (1,2)", {int'(c2_out), int'(c1_out), int'(v0)} == {1, 0, 0}, 1);
    apply(2, 2, 2, 0, 0);
    expect_eq("row p=6 (3,0)", {int'(c2_out), int'(c1_out), int'(v0)} == {1, 1, 0}, 1);
    apply(1, 1, 1, 0, 0);
    expect_eq("row p=3 (0,3)", {int'(c2_out), int'(c1_out), int'(v0)} == {0, 1, 1}, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
