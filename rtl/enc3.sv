// enc3: 3-valued encoder ("3ENC") of the modified 2-input BSC adder.
//
// It replaces the two 3BC cells that decompose the partial position sums and
// the 3BC cell that decomposes v_i = w_i + c_i(1).  Inputs are the two
// ternary partial sums p_i1 = x_i(1) + y_i(1) and p_i0 = x_i(0) + y_i(0)
// (two unit lines each) and the incoming carry c_i(1).  With the threshold
// functions G_j:
//   c_{i+1}(2) = G1(p_i1)
//   c_{i+1}(1) = G0(p_i1) | G1(p_i0)
//   v_i(1)     = c_i(1) . G0(p_i0) . ~G1(p_i0)
//   v_i(0)     = ~c_i(1) . G0(p_i0) . ~G1(p_i0) | c_i(1) . (~G0(p_i0) | G1(p_i0))
// which are the document's equations.  v_i(1) is the transfer t_{i+1}.
// Combinational.
module enc3 (
  input  logic [1:0] p1,      // p_i1, two unit lines
  input  logic [1:0] p0,      // p_i0, two unit lines
  input  logic       c1_in,   // c_i(1) from position i-1
  output logic       c1_out,  // c_{i+1}(1)
  output logic       c2_out,  // c_{i+1}(2)
  output logic       v1,      // v_i(1) = t_{i+1}
  output logic       v0       // v_i(0)
);

  logic g0_p1, g1_p1, g0_p0, g1_p0;

  always_comb begin
    g0_p1 = p1[0] | p1[1];
    g1_p1 = p1[0] & p1[1];
    g0_p0 = p0[0] | p0[1];
    g1_p0 = p0[0] & p0[1];
    c2_out = g1_p1;
    c1_out = g0_p1 | g1_p0;
    v1     = c1_in & g0_p0 & ~g1_p0;
    v0     = (~c1_in & g0_p0 & ~g1_p0) | (c1_in & (~g0_p0 | g1_p0));
  end

endmodule
