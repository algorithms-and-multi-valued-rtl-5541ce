// enc5: 5-valued encoder ("5ENC") of the modified 4-input BSC adder.
//
// It replaces the three 5BC cells and the final 4BC cell of one digit of the
// 4-input adder by a single block.  Inputs: the partial sums
// p_i1 = x(1)+y(1)+z(1)+a(1) and p_i0 = x(0)+y(0)+z(0)+a(0) (four unit lines
// each, p_i1 + p_i0 <= 4), the carries c_i(1) (from i-1), c_i(2), c_i(3)
// (from i-2) and the second-stage carries u_i(1) (from i-1), u_i(2) (from
// i-2).  With the threshold functions G_j of each partial sum:
//   components  q(2) = G3, q(1) = G1.~G3, q(0) = G0.~G1 | G2.~G3  (q = p_i1, p_i0)
//   c_{i+2}(3) = p_i1(2) | p_i0(2)
//   c_{i+2}(2) = p_i1(2) | p_i1(1) | p_i1(0).p_i0(1)
//   c_{i+1}(1) = p_i1(0) xor p_i0(1),      w_i = p_i0(0)
//   u_i = w_i + c_i(1) + c_i(2) + c_i(3) -> u_{i+2}(2) = G3(u), u_{i+1}(1) = G1(u).~G3(u),
//                                           u_i(0) = [u odd]
//   v_i = u_i(0) + u_i(1) + u_i(2)       -> t_{i+1} = G1(v), v_i(0) = [v odd]
// The document names this encoder but gives no equations for it; these are
// the equations of the cells it replaces, written as one block, which is the
// simplest circuit with that function.  Combinational.
module enc5 (
  input  logic [3:0] p1,      // p_i1, four unit lines
  input  logic [3:0] p0,      // p_i0, four unit lines
  input  logic       c1_in,   // c_i(1)
  input  logic       c2_in,   // c_i(2)
  input  logic       c3_in,   // c_i(3)
  input  logic       u1_in,   // u_i(1)
  input  logic       u2_in,   // u_i(2)
  output logic       c1_out,  // c_{i+1}(1)
  output logic       c2_out,  // c_{i+2}(2)
  output logic       c3_out,  // c_{i+2}(3)
  output logic       u1_out,  // u_{i+1}(1)
  output logic       u2_out,  // u_{i+2}(2)
  output logic       v1,      // v_i(1) = t_{i+1}
  output logic       v0       // v_i(0)
);

  // thresholds G0..G3 of four unit lines
  function automatic logic [3:0] thresholds(logic [3:0] l);
    int unsigned cnt;
    logic [3:0]  g;
    cnt = 0;
    for (int unsigned k = 0; k < 4; k++) cnt += l[k] ? 1 : 0;
    for (int unsigned j = 0; j < 4; j++) g[j] = (cnt > j);
    return g;
  endfunction

  logic [3:0] g1, g0, gu;
  logic       p12, p11, p10, p02, p01, p00;
  logic       u0;
  logic [2:0] gv;

  always_comb begin
    g1  = thresholds(p1);
    g0  = thresholds(p0);
    p12 = g1[3];
    p11 = g1[1] & ~g1[3];
    p10 = (g1[0] & ~g1[1]) | (g1[2] & ~g1[3]);
    p02 = g0[3];
    p01 = g0[1] & ~g0[3];
    p00 = (g0[0] & ~g0[1]) | (g0[2] & ~g0[3]);

    c3_out = p12 | p02;
    c2_out = p12 | p11 | (p10 & p01);
    c1_out = p10 ^ p01;

    gu     = thresholds({p00, c1_in, c2_in, c3_in});
    u2_out = gu[3];
    u1_out = gu[1] & ~gu[3];
    u0     = (gu[0] & ~gu[1]) | (gu[2] & ~gu[3]);

    gv[0]  = u0 | u1_in | u2_in;
    gv[1]  = (u0 & u1_in) | (u0 & u2_in) | (u1_in & u2_in);
    gv[2]  = u0 & u1_in & u2_in;
    v1     = gv[1];
    v0     = (gv[0] & ~gv[1]) | gv[2];
  end

endmodule
