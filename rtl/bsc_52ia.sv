// bsc_52ia: N-digit 2-input BSC adder on 5-valued position sums ("5-2IA").
//
// With five current levels available the position sum p_i = x_i + y_i in
// {0..4} is formed directly as one current (four unit lines) and compared
// with the thresholds G_0..G_3.  The digit then works like the 2-input
// adder, but on p_i alone:
//   c_{i+1}(1) = G1(p_i)                 (p_i >= 2)
//   w_i        = [p_i odd] = G0.~G1 | G2.~G3
//   v_i(0)     = w_i xor c_i(1)
//   t_{i+1}    = w_i . c_i(1) | G3(p_i)   (the v_i(1) transfer and the
//                                          two-unit carry of p_i = 4 share a
//                                          line; they never coincide)
//   s_i        = v_i(0) + t_i
// so s_i depends on positions i, i-1 and i-2 only.
// Interface: two N-digit BSC operands, (N+1)-digit BSC sum.  Combinational.
// The document gives only the outline of this adder (thresholds of p_i,
// then v_i(0), t_{i+1} and s_i = v_i(0) + t_i); the equations above are this
// design's, chosen to compute the same digits as the 2-input adder.
module bsc_52ia
  import bsc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  bsc_digit_t [N-1:0] x,
  input  bsc_digit_t [N-1:0] y,
  output bsc_digit_t [N:0]   s
);

  localparam int unsigned P = N + 1;

  logic [P:0] c1, t;

  assign c1[0] = 1'b0;
  assign t[0]  = 1'b0;

  for (genvar i = 0; i < P; i++) begin : g_dig
    logic [3:0] p;  // position sum, four unit lines
    logic [3:0] g;  // thresholds G0..G3
    logic       w, v0;

    if (i < N) begin : g_in
      assign p = {x[i], y[i]};
    end else begin : g_top
      assign p = '0;
    end

    always_comb begin
      int unsigned cnt;
      cnt = 0;
      for (int unsigned k = 0; k < 4; k++) cnt += p[k] ? 1 : 0;
      for (int unsigned j = 0; j < 4; j++) g[j] = (cnt > j);
    end

    assign w       = (g[0] & ~g[1]) | (g[2] & ~g[3]);
    assign c1[i+1] = g[1];
    assign v0      = w ^ c1[i];
    assign t[i+1]  = (w & c1[i]) | g[3];
    assign s[i]    = {t[i], v0};

    always_comb begin
      assert (!(w && c1[i] && g[3]))
        else $error("bsc_52ia: transfer sources overlap at digit %0d", i);
    end
  end

  always_comb begin
    assert (!(c1[P] || t[P])) else $error("bsc_52ia: carry out of sum");
  end

endmodule
