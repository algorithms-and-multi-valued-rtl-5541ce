// bsc_m2ia: N-digit modified 2-input BSC adder ("M2IA").
//
// Same arithmetic as bsc_2ia, but per digit only the two input 3BC cells
// remain; the 3BC cells that split p_i1, p_i0 and v_i are merged into one
// 3-valued encoder (enc3), which cuts the critical path from three cell
// levels to one 3BC plus one encoder.  The sum digit is
// s_i = v_i(0) + t_i + c_i(2); t_i and c_i(2) are never both active.
// Interface: two N-digit BSC operands, (N+1)-digit BSC sum.  Combinational.
// Structure as in the document; the bundle-of-lines current model is this
// design's.
module bsc_m2ia
  import bsc_pkg::*;
#(
  parameter int unsigned N = 64
) (
  input  bsc_digit_t [N-1:0] x,
  input  bsc_digit_t [N-1:0] y,
  output bsc_digit_t [N:0]   s
);

  localparam int unsigned P = N + 1;

  logic [P:0] c1, c2, t;

  assign c1[0] = 1'b0;
  assign c2[0] = 1'b0;
  assign t[0]  = 1'b0;

  for (genvar i = 0; i < P; i++) begin : g_dig
    bsc_digit_t xi, yi;
    logic [1:0] xb, yb;
    logic       v0;

    if (i < N) begin : g_in
      assign xi = x[i];
      assign yi = y[i];
    end else begin : g_top
      assign xi = '0;
      assign yi = '0;
    end

    mbc #(.M(3)) u_x (.x(xi), .b(xb));
    mbc #(.M(3)) u_y (.x(yi), .b(yb));

    enc3 u_enc (
      .p1    ({xb[1], yb[1]}),
      .p0    ({xb[0], yb[0]}),
      .c1_in (c1[i]),
      .c1_out(c1[i+1]),
      .c2_out(c2[i+1]),
      .v1    (t[i+1]),
      .v0    (v0)
    );

    assign s[i] = {t[i] | c2[i], v0};

    always_comb begin
      assert (!(t[i] && c2[i]))
        else $error("bsc_m2ia: t and c(2) overlap at digit %0d", i);
    end
  end

  always_comb begin
    assert (!(c1[P] || c2[P] || t[P])) else $error("bsc_m2ia: carry out of sum");
  end

endmodule
