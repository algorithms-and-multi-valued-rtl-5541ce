// bsc_3ia: N-digit 3-input BSC adder ("3IA"), 3BC and 4BC cells.
//
// Three 3BC cells split x_i, y_i, z_i into binary components; the components
// of equal weight are summed into p_i1 and p_i0 in {0..3} and split by two
// 4BC cells.  The position sum p_i = 2 p_i1 + p_i0 (at most 6) becomes
//   p_i = 4 c_{i+2}(2) + 2 c_{i+1}(1) + w_i,
//   c_{i+2}(2) = p_i1(1) + p_i1(0).p_i0(1)    (the AND switch)
//   c_{i+1}(1) = p_i1(0) + p_i0(1) less the pair taken by the AND switch
//   w_i        = p_i0(0)
// so c(2) jumps two positions.  A third 4BC cell splits
// v_i = w_i + c_i(1) + c_i(2) into the transfer t_{i+1} = v_i(1) and v_i(0);
// the sum digit is s_i = v_i(0) + t_i in {0,1,2}.
// Interface: three N-digit BSC operands, (N+2)-digit BSC sum, exact for every
// input.  Combinational.  The cell structure follows the document; the
// c_{i+1}(1) term is taken from its decomposition table (an exclusive OR of
// the two components, the AND switch steering the pair to c(2)).
module bsc_3ia
  import bsc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  bsc_digit_t [N-1:0] x,
  input  bsc_digit_t [N-1:0] y,
  input  bsc_digit_t [N-1:0] z,
  output bsc_digit_t [N+1:0] s
);

  localparam int unsigned P = N + 2;

  logic [P:0]   c1, t;
  logic [P+1:0] c2;

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  assign c2[1] = 1'b0;
  assign t[0]  = 1'b0;

  for (genvar i = 0; i < P; i++) begin : g_dig
    bsc_digit_t xi, yi, zi;
    logic [1:0] xb, yb, zb, pb1, pb0, vb;
    logic       both;

    if (i < N) begin : g_in
      assign xi = x[i];
      assign yi = y[i];
      assign zi = z[i];
    end else begin : g_top
      assign xi = '0;
      assign yi = '0;
      assign zi = '0;
    end

    mbc #(.M(3)) u_x (.x(xi), .b(xb));
    mbc #(.M(3)) u_y (.x(yi), .b(yb));
    mbc #(.M(3)) u_z (.x(zi), .b(zb));

    mbc #(.M(4)) u_p1 (.x({xb[1], yb[1], zb[1]}), .b(pb1));
    mbc #(.M(4)) u_p0 (.x({xb[0], yb[0], zb[0]}), .b(pb0));

    assign both    = pb1[0] & pb0[1];
    assign c2[i+2] = pb1[1] | both;
    assign c1[i+1] = (pb1[0] | pb0[1]) & ~both;

    mbc #(.M(4)) u_v (.x({pb0[0], c1[i], c2[i]}), .b(vb));

    assign t[i+1] = vb[1];
    assign s[i]   = {t[i], vb[0]};

    always_comb begin
      assert (!(pb1[1] && both))
        else $error("bsc_3ia: c(2) currents overlap at digit %0d", i);
    end
  end

  always_comb begin
    assert (!(c1[P] || c2[P] || c2[P+1] || t[P])) else $error("bsc_3ia: carry out of sum");
  end

endmodule
