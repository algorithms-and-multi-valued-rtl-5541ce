// bsc_mop_top: the BSC multioperand adders, one of each adder family.
//
// The same NOPS binary operands of W bits (default: the 16 Booth partial
// products of a 32 x 32 bit multiplication, 64 bits wide) feed seven
// multioperand adders that differ only in the BSC adder they are built from:
//   sum[0] 2-input adders of 3BC cells         (7 adders, 3 levels)
//   sum[1] modified 2-input adders (3ENC)       (7 adders, 3 levels)
//   sum[2] 3-input adders (3BC, 4BC)            (3 + one 2-input, 2 levels)
//   sum[3] modified 3-input adders (4ENC)       (3 + one modified 2-input)
//   sum[4] 4-input adders (3BC, 5BC, 4BC)       (2 + one 2-input, 2 levels)
//   sum[5] 2-input adders on 5-valued sums      (7 adders, 3 levels)
//   sum[6] modified 4-input adders (5ENC)        (2 + one modified 2-input)
// indexed by bsc_pkg::adder_kind_e.  All seven sums are equal; they are the
// alternatives whose delay and cell count the document tabulates, placed side
// by side so that each can be simulated and synthesised.  sum_bsc gives the
// redundant BSC result of each tree before the final conversion.
// Combinational.  The 5-valued encoder of sum[6] is this design's (the
// document gives no equations for it); everything else follows the
// document's adder cells.
module bsc_mop_top
  import bsc_pkg::*;
#(
  parameter  int unsigned NOPS = 16,
  parameter  int unsigned W    = 64,
  localparam int unsigned D    = W + $clog2(NOPS)
) (
  input  logic       [W-1:0] ops     [NOPS],
  output logic       [D-1:0] sum     [N_KINDS],
  output bsc_digit_t [D-1:0] sum_bsc [N_KINDS]
);

  for (genvar k = 0; k < N_KINDS; k++) begin : g_kind
    bsc_mop_tree #(.KIND(adder_kind_e'(k)), .NOPS(NOPS), .W(W)) u_tree (
      .ops    (ops),
      .sum_bsc(sum_bsc[k]),
      .sum    (sum[k])
    );
  end

endmodule
