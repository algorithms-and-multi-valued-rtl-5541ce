// bsc_mop_tree: multioperand adder in the binary stored-carry (BSC) system.
//
// Sums NOPS unsigned binary operands of W bits (for a multiplier: the
// partial products left after Booth recoding, already aligned).  Three steps:
//  1. Binary to BSC: operands are paired and their bits summed position by
//     position (as currents), giving ceil(NOPS/2) BSC operands with digits in
//     {0,1,2} and no logic at all.
//  2. A tree of BSC adders of family KIND reduces them to one BSC number.
//     Each level feeds full groups of K operands (K = 2, 3 or 4) to K-input
//     adders; one operand left over passes to the next level, two (three)
//     left over go to a 2-input (3-input) adder.  For 16 operands (8 BSC
//     operands) this gives 7 2-input adders in 3 levels, 3 3-input adders and
//     one 2-input adder in 2 levels, or 2 4-input adders and one 2-input
//     adder in 2 levels.
//  3. A lookahead adder turns the BSC result into binary.
// All BSC numbers in the tree have D = W + clog2(NOPS) digits, enough for
// the exact sum.  Outputs: the BSC sum and its binary value.
// Combinational.  The arrangement of adders follows the document's
// comparison of 32- and 64-operand additions; the handling of leftovers at
// other operand counts is this design's.
module bsc_mop_tree
  import bsc_pkg::*;
#(
  parameter  adder_kind_e KIND = ADD_2IA,
  parameter  int unsigned NOPS = 16,
  parameter  int unsigned W    = 64,
  localparam int unsigned D    = W + $clog2(NOPS)
) (
  input  logic       [W-1:0] ops [NOPS],
  output bsc_digit_t [D-1:0] sum_bsc,
  output logic       [D-1:0] sum
);

  localparam int unsigned NB0 = (NOPS + 1) / 2;          // BSC operands
  localparam int unsigned NL  = num_levels(KIND, NB0);   // adder levels
  localparam int unsigned K   = arity(KIND);

  bsc_digit_t [D-1:0] lvl0 [NB0];  // BSC operands entering the tree
  bsc_digit_t [D-1:0] root;        // tree output

  // Step 1: two binary operands make one BSC operand.
  for (genvar j = 0; j < NB0; j++) begin : g_conv
    for (genvar k = 0; k < D; k++) begin : g_dig
      logic hi, lo;
      if (k < W) begin : g_bit
        assign hi = ops[2*j][k];
        if (2*j + 1 < NOPS) begin : g_pair
          assign lo = ops[2*j+1][k];
        end else begin : g_single
          assign lo = 1'b0;
        end
      end else begin : g_ext
        assign hi = 1'b0;
        assign lo = 1'b0;
      end
      assign lvl0[j][k] = {hi, lo};
    end
  end

  // Step 2: the adder tree.
  for (genvar l = 0; l < NL; l++) begin : g_lvl
    localparam int unsigned NIN_L  = ops_at_level(KIND, NB0, l);
    localparam int unsigned NOUT_L = ops_after_level(KIND, NIN_L);
    localparam int unsigned G      = NIN_L / K;
    localparam int unsigned R      = NIN_L % K;

    bsc_digit_t [D-1:0] src [NB0];  // operands entering this level
    bsc_digit_t [D-1:0] dst [NB0];  // operands leaving this level

    if (l == 0) begin : g_first
      assign src = lvl0;
    end else begin : g_next
      assign src = g_lvl[l-1].dst;
    end

    for (genvar g = 0; g < G; g++) begin : g_grp
      bsc_digit_t [D-1:0] in_ops [K];
      for (genvar q = 0; q < K; q++) begin : g_in
        assign in_ops[q] = src[g*K + q];
      end
      bsc_add_node #(.KIND(KIND), .NIN(K), .D(D)) u_node (
        .opnd(in_ops), .sum(dst[g])
      );
    end

    if (R == 1) begin : g_pass
      assign dst[G] = src[G*K];
    end else if (R >= 2) begin : g_rem
      bsc_digit_t [D-1:0] in_ops [R];
      for (genvar q = 0; q < R; q++) begin : g_in
        assign in_ops[q] = src[G*K + q];
      end
      bsc_add_node #(.KIND(KIND), .NIN(R), .D(D)) u_node (
        .opnd(in_ops), .sum(dst[G])
      );
    end

    for (genvar e = NOUT_L; e < NB0; e++) begin : g_unused
      assign dst[e] = '0;
    end
  end

  if (NL == 0) begin : g_no_tree
    assign root = lvl0[0];
  end else begin : g_tree
    assign root = g_lvl[NL-1].dst[0];
  end

  assign sum_bsc = root;

  // Step 3: back to binary.
  logic [D:0] bin;

  bsc_to_bin #(.N(D)) u_conv (.s(sum_bsc), .y(bin));

  assign sum = bin[D-1:0];

  always_comb begin
    assert (!bin[D]) else $error("bsc_mop_tree: sum exceeds %0d bits", D);
  end

endmodule
