// tb_bsc_mop_top: end-to-end testbench of bsc_mop_top at its default size:
// 16 operands of 64 bits, six multioperand adders (one per BSC adder family).
//
// Workloads:
//  - 32 x 32 bit signed multiplications: a behavioural radix-4 (modified
//    Booth) recoder in this file turns the multiplier into 16 partial
//    products, each the two's-complement multiple d*A (d in -2..2) shifted
//    by 2j and taken modulo 2^64.  The low 64 bits of every adder's sum must
//    equal A*B.
//  - all-ones operands, zeros and random operands: every sum must equal the
//    exact 68-bit sum, and the value of every redundant BSC result too.
// Mechanisms, counted from the operands by an independent model of the
// first tree level (digit of a BSC operand = sum of two operand bits):
//  - c2_jump  : position sum 4 in a 2-input adder (carry c(2))
//  - transfer : odd position sum after a position sum >= 2 (t = 1)
//  - c3_carry : a 4-input adder's p_i1 or p_i0 reaching 4 (carry c(3))
//  - u_carry  : u_i >= 2 in a 4-input adder (second-stage carries)
//  - c2_3ia   : position sum >= 4 in a 3-input adder (two-position carry)
//  - remainder: the 2-input remainder adder of the 3-input tree gets a
//               non-zero operand
// Each must occur at least once.  Combinational; each check waits 1 ns.
module tb_bsc_mop_top;
  import bsc_pkg::*;

  localparam int unsigned NOPS = 16, W = 64, D = 68;

  logic       [W-1:0] ops     [NOPS];
  logic       [D-1:0] sum     [N_KINDS];
  bsc_digit_t [D-1:0] sum_bsc [N_KINDS];

  int checks = 0;
  int failures = 0;
  int n_mul = 0;
  int c2_jump = 0, transfer = 0, c3_carry = 0, u_carry = 0, c2_3ia = 0, remainder = 0;

  bsc_mop_top dut (.ops, .sum, .sum_bsc);

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 8) $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  // Behavioural modified Booth recoding of B; partial product j is
  // (d_j * A) << 2j modulo 2^64.
  task automatic booth_operands(logic signed [31:0] a, logic [31:0] b);
    for (int j = 0; j < 16; j++) begin
      logic signed [63:0] d, pp;
      logic               lo;
      lo = (j == 0) ? 1'b0 : b[2*j-1];
      d  = -2 * 64'(b[2*j+1]) + 64'(b[2*j]) + 64'(lo);
      pp = d * 64'(a);
      ops[j] = pp << (2 * j);
    end
  endtask

  // BSC digit k of BSC operand j at the tree input.
  function automatic int digit(int j, int k);
    if (k < 0 || k >= W) return 0;
    return int'(ops[2*j][k]) + int'(ops[2*j+1][k]);
  endfunction

  // Count the mechanisms the operands trigger in the first tree level.
  task automatic count_mechanisms();
    // 2-input adders: BSC operand pairs (2g, 2g+1)
    for (int g = 0; g < 4; g++)
      for (int k = 0; k < W; k++) begin
        int p, pl;
        p  = digit(2*g, k) + digit(2*g+1, k);
        pl = digit(2*g, k-1) + digit(2*g+1, k-1);
        if (p == 4) c2_jump++;
        if ((p % 2) == 1 && pl >= 2) transfer++;
      end
    // 3-input adders: BSC operands (0,1,2) and (3,4,5); remainder (6,7)
    for (int g = 0; g < 2; g++)
      for (int k = 0; k < W; k++)
        if (digit(3*g, k) + digit(3*g+1, k) + digit(3*g+2, k) >= 4) c2_3ia++;
    for (int k = 0; k < W; k++)
      if (digit(6, k) + digit(7, k) != 0) begin
        remainder++;
        break;
      end
    // 4-input adders: BSC operands (0..3) and (4..7)
    for (int g = 0; g < 2; g++) begin
      int pos [W];
      for (int k = 0; k < W; k++) begin
        int n2, n1;
        n2 = 0;
        n1 = 0;
        for (int q = 0; q < 4; q++) begin
          if (digit(4*g+q, k) == 2) n2++;
          if (digit(4*g+q, k) == 1) n1++;
        end
        if (n2 == 4 || n1 == 4) c3_carry++;
        pos[k] = 2 * n2 + n1;
      end
      // u_i = w_i + c_i(1) + c_i(2) + c_i(3): bit 0 of p_i, bit 1 of
      // p_{i-1}, and the weight-4 part of p_{i-2}
      for (int k = 0; k < W; k++) begin
        int u;
        u = pos[k] % 2;
        if (k >= 1) u += (pos[k-1] >> 1) % 2;
        if (k >= 2) u += pos[k-2] >> 2;
        if (u >= 2) u_carry++;
      end
    end
  endtask

  task automatic check_all(string what, logic [127:0] expected, bit modular);
    #1;
    count_mechanisms();
    for (int kd = 0; kd < N_KINDS; kd++) begin
      logic [127:0] v;
      v = '0;
      for (int i = 0; i < D; i++) v += 128'(int'(sum_bsc[kd][i][0]) + int'(sum_bsc[kd][i][1])) << i;
      if (modular) begin
        expect_eq($sformatf("%s kind %0d product", what, kd), 128'(sum[kd][W-1:0]), 128'(expected[W-1:0]));
      end else begin
        expect_eq($sformatf("%s kind %0d sum", what, kd), 128'(sum[kd]), expected);
      end
      expect_eq($sformatf("%s kind %0d BSC value", what, kd), v, 128'(sum[kd]));
    end
  endtask

  function automatic logic [127:0] exact_sum();
    logic [127:0] e;
    e = '0;
    for (int q = 0; q < NOPS; q++) e += 128'(ops[q]);
    return e;
  endfunction

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < NOPS; q++) ops[q] = '0;
    check_all("zeros", exact_sum(), 0);
    for (int q = 0; q < NOPS; q++) ops[q] = '1;
    check_all("all ones", exact_sum(), 0);
    for (int n = 0; n < 300; n++) begin
      for (int q = 0; q < NOPS; q++) ops[q] = {$urandom, $urandom};
      check_all("random", exact_sum(), 0);
    end
    for (int n = 0; n < 500; n++) begin
      logic signed [31:0] a, b;
      logic signed [63:0] prod;
      a = $urandom;
      b = $urandom;
      if (n == 0) begin a = 32'sh8000_0000; b = 32'sh8000_0000; end
      if (n == 1) begin a = -1; b = 32'sh7fff_ffff; end
      if (n == 2) begin a = 32'sh7fff_ffff; b = 32'sh5555_5555; end
      prod = 64'(a) * 64'(b);
      booth_operands(a, b);
      check_all("booth product", 128'(prod), 1);
      n_mul++;
    end
    $display("products %0d, c2_jump %0d, transfer %0d, c3_carry %0d, u_carry %0d, c2_3ia %0d, remainder %0d",
             n_mul, c2_jump, transfer, c3_carry, u_carry, c2_3ia, remainder);
    checks++;
    if (c2_jump == 0 || transfer == 0 || c3_carry == 0 || u_carry == 0 || c2_3ia == 0 || remainder == 0) begin
      failures++;
      $display("FAIL: a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
