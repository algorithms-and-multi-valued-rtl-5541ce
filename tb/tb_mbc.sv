// tb_mbc: self-checking testbench for mbc, the m-valued to binary converter.
//
// Instantiates the 3BC, 4BC and 5BC forms (M = 3, 4, 5) and applies every
// pattern of their unit input lines.  The binary components must encode the
// number of active lines: b = popcount(x), counted here independently.
// Combinational; each check waits 1 ns.
module tb_mbc;

  logic [1:0] x3;
  logic [2:0] x4;
  logic [3:0] x5;
  logic [1:0] b3;
  logic [1:0] b4;
  logic [2:0] b5;

  int checks = 0;
  int failures = 0;

  mbc #(.M(3)) dut3 (.x(x3), .b(b3));
  mbc #(.M(4)) dut4 (.x(x4), .b(b4));
  mbc        dut_default (.x(x3), .b());
  mbc #(.M(5)) dut5 (.x(x5), .b(b5));

  function automatic int ones(logic [3:0] v);
    return int'(v[0]) + int'(v[1]) + int'(v[2]) + int'(v[3]);
  endfunction

  task automatic expect_eq(string what, int got, int want);
    checks++;
    if (got != want) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, want);
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
    x3 = '0;
    x4 = '0;
    x5 = '0;
    for (int v = 0; v < 4; v++) begin
      x3 = 2'(v);
      #1;
      expect_eq("3BC", int'(b3), ones(4'(v)));
      expect_eq("3BC default", int'(dut_default.b), ones(4'(v)));
    end
    for (int v = 0; v < 8; v++) begin
      x4 = 3'(v);
      #1;
      expect_eq("4BC", int'(b4), ones(4'(v)));
    end
    for (int v = 0; v < 16; v++) begin
      x5 = 4'(v);
      #1;
      expect_eq("5BC", int'(b5), ones(4'(v)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
