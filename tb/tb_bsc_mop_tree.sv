// tb_bsc_mop_tree: self-checking testbench for bsc_mop_tree, the BSC
// multioperand adder.
//
// 1. Tree plan: the package functions that lay out the tree must give the
//    adder counts and levels of the 32- and 64-operand comparisons (8 and 16
//    BSC operands): 2-input 7/3 and 15/4; 3-input 3+1/2 and 7+1/3; 4-input
//    2+1/2 and 5+0/2, the same for the modified families (adders of the family + remainder adders / levels).
// 2. The default tree (2-input adders, 16 operands of 64 bits) and a second
//    tree with 4-input adders, 13 operands of 16 bits (an unpaired operand,
//    and a remainder of 3 BSC operands going to a 3-input adder) are driven
//    with zeros, all ones and random operands; both the binary sum and the
//    value of the BSC sum must equal the sum of the operands.
// Combinational; each check waits 1 ns.
module tb_bsc_mop_tree;
  import bsc_pkg::*;

  localparam int unsigned NA = 16, WA = 64, DA = WA + 4;
  localparam int unsigned NB = 13, WB = 16, DB = WB + 4;

  logic       [WA-1:0] ops_a [NA];
  logic       [DA-1:0] sum_a;
  bsc_digit_t [DA-1:0] bsc_a;
  logic       [WB-1:0] ops_b [NB];
  logic       [DB-1:0] sum_b;
  bsc_digit_t [DB-1:0] bsc_b;

  int checks = 0;
  int failures = 0;

  bsc_mop_tree dut_a (.ops(ops_a), .sum_bsc(bsc_a), .sum(sum_a));
  bsc_mop_tree #(.KIND(ADD_4IA), .NOPS(NB), .W(WB)) dut_b (.ops(ops_b), .sum_bsc(bsc_b), .sum(sum_b));

  task automatic expect_eq(string what, logic [127:0] got, logic [127:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 8) $display("FAIL %s: got %0h expected %0h", what, got, want);
    end
  endtask

  task automatic check_plan(adder_kind_e k, int unsigned n, int unsigned main_n,
                            int unsigned rem_n, int unsigned levels);
    expect_eq($sformatf("%s adders of %0d", k.name(), n), 128'(num_main_adders(k, n)), 128'(main_n));
    expect_eq($sformatf("%s remainder adders of %0d", k.name(), n), 128'(num_rem_adders(k, n)), 128'(rem_n));
    expect_eq($sformatf("%s levels of %0d", k.name(), n), 128'(num_levels(k, n)), 128'(levels));
  endtask

  task automatic check_sums(string what);
    logic [127:0] ea, eb, va, vb;
    #1;
    ea = '0;
    eb = '0;
    va = '0;
    vb = '0;
    for (int q = 0; q < NA; q++) ea += 128'(ops_a[q]);
    for (int q = 0; q < NB; q++) eb += 128'(ops_b[q]);
    for (int i = 0; i < DA; i++) va += 128'(int'(bsc_a[i][0]) + int'(bsc_a[i][1])) << i;
    for (int i = 0; i < DB; i++) vb += 128'(int'(bsc_b[i][0]) + int'(bsc_b[i][1])) << i;
    expect_eq({what, " sum A"}, 128'(sum_a), ea);
    expect_eq({what, " BSC A"}, va, ea);
    expect_eq({what, " sum B"}, 128'(sum_b), eb);
    expect_eq({what, " BSC B"}, vb, eb);
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_plan(ADD_2IA,  8, 7, 0, 3);
    check_plan(ADD_M2IA, 8, 7, 0, 3);
    check_plan(ADD_52IA, 8, 7, 0, 3);
    check_plan(ADD_3IA,  8, 3, 1, 2);
    check_plan(ADD_M3IA, 8, 3, 1, 2);
    check_plan(ADD_4IA,  8, 2, 1, 2);
    check_plan(ADD_2IA,  16, 15, 0, 4);
    check_plan(ADD_3IA,  16, 7, 1, 3);
    check_plan(ADD_4IA,  16, 5, 0, 2);
    check_plan(ADD_M4IA, 8, 2, 1, 2);
    check_plan(ADD_M4IA, 16, 5, 0, 2);

    for (int q = 0; q < NA; q++) ops_a[q] = '0;
    for (int q = 0; q < NB; q++) ops_b[q] = '0;
    check_sums("zeros");
    for (int q = 0; q < NA; q++) ops_a[q] = '1;
    for (int q = 0; q < NB; q++) ops_b[q] = '1;
    check_sums("all ones");
    for (int n = 0; n < 1000; n++) begin
      for (int q = 0; q < NA; q++) ops_a[q] = {$urandom, $urandom};
      for (int q = 0; q < NB; q++) ops_b[q] = WB'($urandom);
      if (n % 3 == 0)
        for (int q = 0; q < NA; q++) ops_a[q] = ops_a[q] | {$urandom, $urandom};
      check_sums("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
