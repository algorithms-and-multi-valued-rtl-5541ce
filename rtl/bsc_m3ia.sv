// bsc_m3ia: N-digit modified 3-input BSC adder ("M3IA").
//
// Same arithmetic as bsc_3ia.  Per digit, three 3BC cells split the inputs
// and one 4-valued encoder (enc4) replaces the two levels of 4BC cells,
// producing c_{i+1}(1), c_{i+2}(2), t_{i+1} = v_i(1) and v_i(0) from p_i1,
// p_i0, c_i(1) and c_i(2).  The sum digit is s_i = v_i(0) + t_i.
// Interface: three N-digit BSC operands, (N+2)-digit BSC sum.  Combinational.
// Structure as in the document.
module bsc_m3ia
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
    logic [1:0] xb, yb, zb;
    logic       v0;

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

    enc4 u_enc (
      .p1    ({xb[1], yb[1], zb[1]}),
      .p0    ({xb[0], yb[0], zb[0]}),
      .c1_in (c1[i]),
      .c2_in (c2[i]),
      .c1_out(c1[i+1]),
      .c2_out(c2[i+2]),
      .v1    (t[i+1]),
      .v0    (v0)
    );

    assign s[i] = {t[i], v0};
  end

  always_comb begin
    assert (!(c1[P] || c2[P] || c2[P+1] || t[P])) else $error("bsc_m3ia: carry out of sum");
  end

endmodule
