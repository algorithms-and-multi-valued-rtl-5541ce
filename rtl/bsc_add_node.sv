// bsc_add_node: one adder of a BSC adder tree, NIN operands of D digits.
//
// Picks the adder of family KIND that takes NIN operands: a K-input adder of
// the family itself, or the 2-input (3-input) adder that the family uses for
// a remainder of 2 (3) operands at the end of a tree level.  The unmodified
// 3- and 4-input families use the 2-input (3-input) adder of 3BC cells for
// a remainder; the modified 3- and 4-input families use the modified ones.
// The sum is cut back to D digits; the digits cut off are zero whenever the
// true sum is below 2^D (every digit is non-negative), which an assertion
// checks.
// Combinational.
module bsc_add_node
  import bsc_pkg::*;
#(
  parameter adder_kind_e KIND = ADD_2IA,
  parameter int unsigned NIN  = 2,
  parameter int unsigned D    = 68
) (
  input  bsc_digit_t [D-1:0] opnd [NIN],
  output bsc_digit_t [D-1:0] sum
);

  localparam int unsigned EXT = (NIN == 4) ? 3 : (NIN == 3) ? 2 : 1;

  bsc_digit_t [D+EXT-1:0] full;

  if (NIN == 2) begin : g_two
    if (KIND == ADD_M2IA || KIND == ADD_M3IA || KIND == ADD_M4IA) begin : g_m2ia
      bsc_m2ia #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .s(full));
    end else if (KIND == ADD_52IA) begin : g_52ia
      bsc_52ia #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .s(full));
    end else begin : g_2ia
      bsc_2ia  #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .s(full));
    end
  end else if (NIN == 3) begin : g_three
    if (KIND == ADD_M3IA || KIND == ADD_M4IA) begin : g_m3ia
      bsc_m3ia #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .z(opnd[2]), .s(full));
    end else begin : g_3ia
      bsc_3ia  #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .z(opnd[2]), .s(full));
    end
  end else begin : g_four
    if (KIND == ADD_M4IA) begin : g_m4ia
      bsc_m4ia #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .z(opnd[2]), .a(opnd[3]), .s(full));
    end else begin : g_4ia
      bsc_4ia  #(.N(D)) u_add (.x(opnd[0]), .y(opnd[1]), .z(opnd[2]), .a(opnd[3]), .s(full));
    end
  end

  assign sum = full[D-1:0];

  always_comb begin
    assert (full[D+EXT-1:D] == '0) else $error("bsc_add_node: sum exceeds %0d digits", D);
  end

endmodule
