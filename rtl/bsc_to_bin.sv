// bsc_to_bin: converts an N-digit BSC number into binary.
//
// Each BSC digit s_i in {0,1,2} is two unit lines, so the BSC number is the
// sum of two binary numbers: one made of the first line of every digit, one
// of the second.  They are added by a parallel-prefix (Kogge-Stone)
// carry-lookahead adder: generate g = a.b, propagate p = a xor b, log2(N)
// prefix levels, sum = p xor carry.  The result has N+1 bits.
// The document calls for a lookahead adder at this point without detailing
// it; the Kogge-Stone form is this design's choice.  Combinational.
module bsc_to_bin
  import bsc_pkg::*;
#(
  parameter int unsigned N = 68
) (
  input  bsc_digit_t [N-1:0] s,
  output logic       [N:0]   y
);

  localparam int unsigned LV = (N > 1) ? $clog2(N) : 1;

  logic [N-1:0] a, b;
  logic [N-1:0] gg [0:LV];  // group generate after each prefix level
  logic [N-1:0] pp [0:LV];  // group propagate after each prefix level

  always_comb begin
    for (int unsigned i = 0; i < N; i++) begin
      a[i] = s[i][1];
      b[i] = s[i][0];
    end
    gg[0] = a & b;
    pp[0] = a ^ b;
    for (int unsigned l = 0; l < LV; l++) begin
      for (int unsigned i = 0; i < N; i++) begin
        if (i >= (1 << l)) begin
          gg[l+1][i] = gg[l][i] | (pp[l][i] & gg[l][i - (1 << l)]);
          pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
        end else begin
          gg[l+1][i] = gg[l][i];
          pp[l+1][i] = pp[l][i];
        end
      end
    end
    // carry into bit i is the group generate of bits [i-1:0]
    y[0] = a[0] ^ b[0];
    for (int unsigned i = 1; i < N; i++) y[i] = a[i] ^ b[i] ^ gg[LV][i-1];
    y[N] = gg[LV][N-1];
  end

endmodule
