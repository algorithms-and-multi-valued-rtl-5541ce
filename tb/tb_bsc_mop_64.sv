// tb_bsc_mop_64: workload testbench for the 64 x 64 bit multiplication:
// 32 Booth partial products of 128 bits, i.e. 16 BSC operands.
//
// Builds the two multioperand adders whose tree shape changes at this size:
// 3-input adders (7 of them plus one 2-input adder, 3 levels, with a
// leftover operand passed on at level 1) and 4-input adders (5 of them, 2
// levels).  The 2-input families only add a fourth level of the same shape
// and are covered at the default size by tb_bsc_mop_top.
// A behavioural radix-4 Booth recoder in this file produces the partial
// products of random signed 64-bit operands; the low 128 bits of each sum
// must equal the product.  All-ones operands check the exact sum.
// Combinational; each check waits 1 ns.
module tb_bsc_mop_64;
  import bsc_pkg::*;

  localparam int unsigned NOPS = 32, W = 128, D = 133;

  logic       [W-1:0] ops [NOPS];
  logic       [D-1:0] sum3, sum4;
  bsc_digit_t [D-1:0] bsc3, bsc4;

  int checks = 0;
  int failures = 0;

  bsc_mop_tree #(.KIND(ADD_3IA), .NOPS(NOPS), .W(W)) dut3 (.ops, .sum_bsc(bsc3), .sum(sum3));
  bsc_mop_tree #(.KIND(ADD_4IA), .NOPS(NOPS), .W(W)) dut4 (.ops, .sum_bsc(bsc4), .sum(sum4));

  task automatic expect_eq(string what, logic [D-1:0] got, logic [D-1:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 8) $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  task automatic booth_operands(logic signed [63:0] a, logic [63:0] b);
    for (int j = 0; j < 32; j++) begin
      logic signed [127:0] d, pp;
      logic                lo;
      lo = (j == 0) ? 1'b0 : b[2*j-1];
      d  = -2 * 128'(b[2*j+1]) + 128'(b[2*j]) + 128'(lo);
      pp = d * 128'(a);
      ops[j] = pp << (2 * j);
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
    logic [D-1:0] e;
    for (int q = 0; q < NOPS; q++) ops[q] = '1;
    #1;
    e = '0;
    for (int q = 0; q < NOPS; q++) e += D'(ops[q]);
    expect_eq("all ones, 3-input", sum3, e);
    expect_eq("all ones, 4-input", sum4, e);
    for (int n = 0; n < 300; n++) begin
      logic signed [63:0]  a, b;
      logic signed [127:0] prod;
      a = {$urandom, $urandom};
      b = {$urandom, $urandom};
      if (n == 0) begin a = 64'sh8000_0000_0000_0000; b = a; end
      prod = 128'(a) * 128'(b);
      booth_operands(a, b);
      #1;
      expect_eq("product, 3-input", D'(sum3[W-1:0]), {{(D-W){1'b0}}, prod});
      expect_eq("product, 4-input", D'(sum4[W-1:0]), {{(D-W){1'b0}}, prod});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
