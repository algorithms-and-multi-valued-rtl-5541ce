// bsc_4ia: N-digit 4-input BSC adder ("4IA"), 3BC, 5BC and 4BC cells.
//
// Four 3BC cells split x_i, y_i, z_i, a_i into binary components.  The
// partial sums p_i1, p_i0 in {0..4} are split by two 5BC cells into
// components of weight 4, 2 and 1, and the position sum
// p_i = 2 p_i1 + p_i0 (at most 8) becomes
//   p_i = 4 c_{i+2}(3) + 4 c_{i+2}(2) + 2 c_{i+1}(1) + w_i
//   c_{i+2}(3) = p_i1(2) + p_i0(2)
//   c_{i+2}(2) = p_i1(2) + p_i1(1) + p_i1(0).p_i0(1)
//   c_{i+1}(1) = p_i1(0) xor p_i0(1)
//   w_i        = p_i0(0)
// Then u_i = w_i + c_i(1) + c_i(2) + c_i(3) (at most 4) is split by a 5BC
// cell into u_i(0) and the carries u_{i+1}(1), u_{i+2}(2); a 4BC cell splits
// v_i = u_i(0) + u_i(1) + u_i(2) into t_{i+1} = v_i(1) and v_i(0), and the
// sum digit is s_i = v_i(0) + t_i.
// Interface: four N-digit BSC operands, (N+3)-digit BSC sum, exact for every
// input.  Combinational.  The cell structure follows the document; the
// carry terms are taken from its decomposition table (p_i1(0).p_i0(1) is the
// pair that moves from c(1) to c(2)).
module bsc_4ia
  import bsc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  bsc_digit_t [N-1:0] x,
  input  bsc_digit_t [N-1:0] y,
  input  bsc_digit_t [N-1:0] z,
  input  bsc_digit_t [N-1:0] a,
  output bsc_digit_t [N+2:0] s
);

  localparam int unsigned P = N + 3;

  logic [P:0]   c1, u1, t;
  logic [P+1:0] c2, c3, u2;

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  assign c2[1] = 1'b0;
  assign c3[0] = 1'b0;
  assign c3[1] = 1'b0;
  assign u1[0] = 1'b0;
  assign u2[0] = 1'b0;
  assign u2[1] = 1'b0;
  assign t[0]  = 1'b0;

  for (genvar i = 0; i < P; i++) begin : g_dig
    bsc_digit_t xi, yi, zi, ai;
    logic [1:0] xb, yb, zb, ab, vb;
    logic [2:0] pb1, pb0, ub;

    if (i < N) begin : g_in
      assign xi = x[i];
      assign yi = y[i];
      assign zi = z[i];
      assign ai = a[i];
    end else begin : g_top
      assign xi = '0;
      assign yi = '0;
      assign zi = '0;
      assign ai = '0;
    end

    mbc #(.M(3)) u_x (.x(xi), .b(xb));
    mbc #(.M(3)) u_y (.x(yi), .b(yb));
    mbc #(.M(3)) u_z (.x(zi), .b(zb));
    mbc #(.M(3)) u_a (.x(ai), .b(ab));

    mbc #(.M(5)) u_p1 (.x({xb[1], yb[1], zb[1], ab[1]}), .b(pb1));
    mbc #(.M(5)) u_p0 (.x({xb[0], yb[0], zb[0], ab[0]}), .b(pb0));

    assign c3[i+2] = pb1[2] | pb0[2];
    assign c2[i+2] = pb1[2] | pb1[1] | (pb1[0] & pb0[1]);
    assign c1[i+1] = pb1[0] ^ pb0[1];

    mbc #(.M(5)) u_u (.x({pb0[0], c1[i], c2[i], c3[i]}), .b(ub));

    assign u2[i+2] = ub[2];
    assign u1[i+1] = ub[1];

    mbc #(.M(4)) u_v (.x({ub[0], u1[i], u2[i]}), .b(vb));

    assign t[i+1] = vb[1];
    assign s[i]   = {t[i], vb[0]};

    always_comb begin
      assert ($onehot0({pb1[2], pb1[1], pb1[0] & pb0[1]}))
        else $error("bsc_4ia: c(2) currents overlap at digit %0d", i);
      assert (!(pb1[2] && pb0[2]))
        else $error("bsc_4ia: c(3) currents overlap at digit %0d", i);
    end
  end

  always_comb begin
    assert (!(c1[P] || c2[P] || c2[P+1] || c3[P] || c3[P+1] || u1[P] || u2[P] || u2[P+1] || t[P]))
      else $error("bsc_4ia: carry out of sum");
  end

endmodule
