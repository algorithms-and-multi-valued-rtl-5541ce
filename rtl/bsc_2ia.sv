// bsc_2ia: N-digit 2-input BSC adder built only from 3BC cells ("2IA").
//
// Each digit x_i, y_i in {0,1,2} is split by a 3BC cell into binary
// components, x_i = 2 x_i(1) + x_i(0).  The components of equal weight are
// summed as currents, p_i1 = x_i(1) + y_i(1) and p_i0 = x_i(0) + y_i(0), and
// split again by two 3BC cells.  From them
//   c_{i+1}(2) = p_i1(1),  c_{i+1}(1) = p_i1(1) + p_i1(0) + p_i0(1),  w_i = p_i0(0)
// so that p_i = 2 c_{i+1}(2) + 2 c_{i+1}(1) + w_i.  A fifth 3BC cell splits
// v_i = w_i + c_i(1) into the transfer t_{i+1} = v_i(1) and v_i(0), and the
// sum digit is s_i = v_i(0) + t_i + c_i(2), again in {0,1,2}.  The sum digit
// depends on positions i, i-1 and i-2 only: there is no carry chain.
//
// The three currents forming c_{i+1}(1), and t_i with c_i(2), are never
// active together, so their sum is a single line (an OR); assertions check
// this.  Interface: two N-digit BSC operands, one (N+1)-digit BSC sum, exact
// for every input.  Combinational.  The cell structure is the document's;
// the line-bundle model of currents is this design's.
module bsc_2ia
  import bsc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  bsc_digit_t [N-1:0] x,
  input  bsc_digit_t [N-1:0] y,
  output bsc_digit_t [N:0]   s
);

  localparam int unsigned P = N + 1;  // digit positions of the sum

  logic [P:0] c1, c2, t;  // carries and transfer into each position

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  assign t[0]  = 1'b0;

  for (genvar i = 0; i < P; i++) begin : g_dig
    bsc_digit_t xi, yi;
    logic [1:0] xb, yb, pb1, pb0, vb;

    if (i < N) begin : g_in
      assign xi = x[i];
      assign yi = y[i];
    end else begin : g_top
      assign xi = '0;
      assign yi = '0;
    end

    mbc #(.M(3)) u_x  (.x(xi),              .b(xb));
    mbc #(.M(3)) u_y  (.x(yi),              .b(yb));
    mbc #(.M(3)) u_p1 (.x({xb[1], yb[1]}),  .b(pb1));
    mbc #(.M(3)) u_p0 (.x({xb[0], yb[0]}),  .b(pb0));

    assign c2[i+1] = pb1[1];
    assign c1[i+1] = pb1[1] | pb1[0] | pb0[1];

    mbc #(.M(3)) u_v  (.x({pb0[0], c1[i]}), .b(vb));

    assign t[i+1] = vb[1];
    assign s[i]   = {t[i] | c2[i], vb[0]};

    always_comb begin
      assert ($onehot0({pb1[1], pb1[0], pb0[1]}))
        else $error("bsc_2ia: c(1) currents overlap at digit %0d", i);
      assert (!(t[i] && c2[i]))
        else $error("bsc_2ia: t and c(2) overlap at digit %0d", i);
    end
  end

  // Nothing leaves the most significant sum digit.
  always_comb begin
    assert (!(c1[P] || c2[P] || t[P])) else $error("bsc_2ia: carry out of sum");
  end

endmodule
