// tb_bsc_4ia: self-checking testbench for bsc_4ia, the 4-input BSC adder.
//
// Drives 4 operands of N = 64 BSC digits (each digit two unit lines, all
// four line patterns used, so 01 and 10 both mean 1) and checks that the
// value of the (N+3)-digit sum equals the sum of the operand values,
// computed here by plain binary arithmetic.  Directed cases: all zeros, all
// digits at 2 (every position sum at its maximum), alternating patterns and
// single digits; then random operands, uniform and biased towards large
// digits.  The adder is combinational; each check waits 1 ns.
module tb_bsc_4ia;
  import bsc_pkg::*;

  localparam int unsigned N = 64;

  bsc_digit_t [N-1:0] op [4];
  bsc_digit_t [N+2:0] s;

  int checks = 0;
  int failures = 0;

  bsc_4ia dut (
    .x(op[0]),
    .y(op[1]),
    .z(op[2]),
    .a(op[3]),
    .s(s)
  );

  function automatic logic [127:0] value_in(bsc_digit_t [N-1:0] v);
    logic [127:0] acc;
    acc = '0;
    for (int i = 0; i < N; i++) acc += 128'(int'(v[i][0]) + int'(v[i][1])) << i;
    return acc;
  endfunction

  function automatic logic [127:0] value_out(bsc_digit_t [N+2:0] v);
    logic [127:0] acc;
    acc = '0;
    for (int i = 0; i < N + 3; i++) acc += 128'(int'(v[i][0]) + int'(v[i][1])) << i;
    return acc;
  endfunction

  task automatic check(string what);
    logic [127:0] expected;
    #1;
    expected = '0;
    for (int q = 0; q < 4; q++) expected += value_in(op[q]);
    checks++;
    if (value_out(s) !== expected) begin
      failures++;
      if (failures < 5) $display("FAIL %s: got %0h expected %0h", what, value_out(s), expected);
    end
  endtask

  function automatic bsc_digit_t rand_digit(int bias);
    int r;
    r = int'($urandom_range(0, 99));
    if (r < bias) return 2'b11;
    return bsc_digit_t'($urandom_range(0, 3));
  endfunction

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int q = 0; q < 4; q++) op[q] = '0;
    check("zeros");
    for (int q = 0; q < 4; q++) op[q] = {N{2'b11}};
    check("all twos");
    for (int q = 0; q < 4; q++) op[q] = {(N/2){2'b11, 2'b01}};
    check("alternating 2/1");
    for (int q = 0; q < 4; q++) op[q] = {(N/2){2'b00, 2'b11}};
    check("alternating 0/2");
    for (int i = 0; i < N; i++) begin
      for (int q = 0; q < 4; q++) op[q] = '0;
      for (int q = 0; q < 4; q++) op[q][i] = 2'b11;
      check("single position");
    end
    for (int n = 0; n < 4000; n++) begin
      for (int q = 0; q < 4; q++)
        for (int i = 0; i < N; i++) op[q][i] = rand_digit((n % 4) * 25);
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
