// tb_bsc_to_bin: self-checking testbench for bsc_to_bin, the BSC to binary
// converter (lookahead adder), at its default width of 68 digits.
//
// Applies all-zero, all-two, alternating and random BSC numbers (every line
// pattern of a digit used) and checks the binary output against the value
// sum_i (number of active lines of digit i) * 2^i, computed here.
// Combinational; each check waits 1 ns.
module tb_bsc_to_bin;
  import bsc_pkg::*;

  localparam int unsigned N = 68;

  bsc_digit_t [N-1:0] s;
  logic       [N:0]   y;

  int checks = 0;
  int failures = 0;

  bsc_to_bin dut (.s, .y);

  task automatic check(string what);
    logic [N:0] expected;
    #1;
    expected = '0;
    for (int i = 0; i < N; i++) expected += (N+1)'(int'(s[i][0]) + int'(s[i][1])) << i;
    checks++;
    if (y !== expected) begin
      failures++;
      if (failures < 5) $display("FAIL %s: got %0h expected %0h", what, y, expected);
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
    s = '0;
    check("zero");
    s = {N{2'b11}};
    check("all twos");
    s = {(N/2){2'b10, 2'b01}};
    check("all ones, both line orders");
    s = {(N/2){2'b11, 2'b00}};
    check("alternating");
    for (int n = 0; n < 3000; n++) begin
      for (int i = 0; i < N; i++) s[i] = bsc_digit_t'($urandom_range(0, 3));
      check("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
