// bsc_m4ia: N-digit modified 4-input BSC adder.
//
// Same arithmetic as bsc_4ia.  Per digit, four 3BC cells split the operand
// digits into binary components, and one 5-valued encoder (enc5) takes the
// partial sums p_i1, p_i0 and the incoming carries c_i(1), c_i(2), c_i(3),
// u_i(1), u_i(2) in place of the three 5BC cells and the 4BC cell.  The sum
// digit is s_i = v_i(0) + t_i.
// Interface: four N-digit BSC operands, (N+3)-digit BSC sum, exact for every
// input.  Combinational.  The document lists this adder in its comparison
// but gives no equations for the encoder; see enc5.
module bsc_m4ia
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
    logic [1:0] xb, yb, zb, ab;
    logic       v0;

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

    enc5 u_enc (
      .p1    ({xb[1], yb[1], zb[1], ab[1]}),
      .p0    ({xb[0], yb[0], zb[0], ab[0]}),
      .c1_in (c1[i]),
      .c2_in (c2[i]),
      .c3_in (c3[i]),
      .u1_in (u1[i]),
      .u2_in (u2[i]),
      .c1_out(c1[i+1]),
      .c2_out(c2[i+2]),
      .c3_out(c3[i+2]),
      .u1_out(u1[i+1]),
      .u2_out(u2[i+2]),
      .v1    (t[i+1]),
      .v0    (v0)
    );

    assign s[i] = {t[i], v0};
  end

  always_comb begin
    assert (!(c1[P] || c2[P] || c2[P+1] || c3[P] || c3[P+1] || u1[P] || u2[P] || u2[P+1] || t[P]))
      else $error("bsc_m4ia: carry out of sum");
  end

endmodule
