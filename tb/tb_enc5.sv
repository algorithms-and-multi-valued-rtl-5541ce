// tb_enc5: self-checking testbench for enc5, the 5-valued encoder of the
// modified 4-input BSC adder.
//
// For every four BSC digits x, y, z, a in {0,1,2} (their binary components
// forming p_i1 and p_i0) and every value of the five incoming carries:
//  - the carries out must match the decomposition table of the 4-input
//    adder, written out below row by row as (p_i1, p_i0) -> c(3) c(2) c(1) w,
//    and 4 c(3) + 4 c(2) + 2 c(1) + w must equal p = x + y + z + a;
//  - 4 u_{i+2}(2) + 2 u_{i+1}(1) + u_i(0) = w + c_i(1) + c_i(2) + c_i(3) and
//    2 t_{i+1} + v_i(0) = u_i(0) + u_i(1) + u_i(2), with u_i(0) taken as the
//    parity of the left side.
// Combinational; each check waits 1 ns.
module tb_enc5;

  logic [3:0] p1, p0;
  logic       c1_in, c2_in, c3_in, u1_in, u2_in;
  logic       c1_out, c2_out, c3_out, u1_out, u2_out, v1, v0;

  int checks = 0;
  int failures = 0;

  // rows: p_i1, p_i0, c(3), c(2), c(1), w
  localparam int ROWS = 15;
  localparam int TABLE [ROWS][6] = '{
    '{0, 0, 0, 0, 0, 0}, '{0, 1, 0, 0, 0, 1}, '{0, 2, 0, 0, 1, 0}, '{1, 0, 0, 0, 1, 0},
    '{0, 3, 0, 0, 1, 1}, '{1, 1, 0, 0, 1, 1}, '{0, 4, 1, 0, 0, 0}, '{1, 2, 0, 1, 0, 0},
    '{2, 0, 0, 1, 0, 0}, '{1, 3, 0, 1, 0, 1}, '{2, 1, 0, 1, 0, 1}, '{2, 2, 0, 1, 1, 0},
    '{3, 0, 0, 1, 1, 0}, '{3, 1, 0, 1, 1, 1}, '{4, 0, 1, 1, 0, 0}
  };

  enc5 dut (.p1, .p0, .c1_in, .c2_in, .c3_in, .u1_in, .u2_in,
            .c1_out, .c2_out, .c3_out, .u1_out, .u2_out, .v1, .v0);

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      if (failures < 10)
        $display("FAIL %s: got %0d expected %0d (p1=%b p0=%b)", what, got, want, p1, p0);
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
    for (int code = 0; code < 81; code++)
      for (int c = 0; c < 32; c++) begin
        int d [4];
        int n2, n1, p, w, u, u0, row;
        n2 = 0;
        n1 = 0;
        for (int q = 0; q < 4; q++) begin
          d[q] = (code / (3 ** q)) % 3;
          p1[q] = (d[q] == 2);
          p0[q] = (d[q] == 1);
          if (d[q] == 2) n2++;
          if (d[q] == 1) n1++;
        end
        {u2_in, u1_in, c3_in, c2_in, c1_in} = 5'(c);
        #1;
        p  = 2 * n2 + n1;
        w  = n1 % 2;
        row = -1;
        for (int r = 0; r < ROWS; r++) if (TABLE[r][0] == n2 && TABLE[r][1] == n1) row = r;
        expect_eq("table row exists", int'(row >= 0), 1);
        if (row >= 0) begin
          expect_eq("c(3)", int'(c3_out), TABLE[row][2]);
          expect_eq("c(2)", int'(c2_out), TABLE[row][3]);
          expect_eq("c(1)", int'(c1_out), TABLE[row][4]);
          expect_eq("w", w, TABLE[row][5]);
        end
        expect_eq("p split", 4 * int'(c3_out) + 4 * int'(c2_out) + 2 * int'(c1_out) + w, p);
        u  = w + int'(c1_in) + int'(c2_in) + int'(c3_in);
        u0 = u % 2;
        expect_eq("u split", 4 * int'(u2_out) + 2 * int'(u1_out) + u0, u);
        expect_eq("v", 2 * int'(v1) + int'(v0), u0 + int'(u1_in) + int'(u2_in));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
