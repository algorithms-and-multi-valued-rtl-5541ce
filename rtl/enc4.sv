// enc4: 4-valued encoder ("4ENC") of the modified 3-input BSC adder.
//
// It replaces the two levels of 4BC cells of the 3-input adder.  Inputs are
// the quaternary partial sums p_i1 = x(1)+y(1)+z(1) and p_i0 = x(0)+y(0)+z(0)
// (three unit lines each; p_i1 + p_i0 <= 3 for BSC inputs) and the incoming
// carries c_i(1) (from position i-1) and c_i(2) (from position i-2).
// The position sum p_i = 2 p_i1 + p_i0 is split as
//   p_i = 4 c_{i+2}(2) + 2 c_{i+1}(1) + w_i
// with, in threshold functions,
//   c_{i+2}(2) = G1(p_i1) | G0(p_i1) . G1(p_i0)
//   c_{i+1}(1) = G1(p_i0) xor [p_i1 odd],  p_i1 odd = G0.~G1 | G2 of p_i1
//   w_i        = [p_i0 odd]                = G0.~G1 | G2 of p_i0
// and v_i = w_i + c_i(1) + c_i(2) is encoded as
//   v_i(1) = c_i(2).c_i(1) | (c_i(2) xor c_i(1)) . w_i
//   v_i(0) = (c_i(2) xnor c_i(1)) . w_i | (c_i(2) xor c_i(1)) . ~w_i
// v_i(1) is the transfer t_{i+1}.  These outputs reproduce the document's
// decomposition table and its v-encoding table entry by entry; the
// expressions for c_{i+1}(1) and the w_i term are written from those tables.
// Combinational.
module enc4 (
  input  logic [2:0] p1,      // p_i1, three unit lines
  input  logic [2:0] p0,      // p_i0, three unit lines
  input  logic       c1_in,   // c_i(1)
  input  logic       c2_in,   // c_i(2)
  output logic       c1_out,  // c_{i+1}(1)
  output logic       c2_out,  // c_{i+2}(2)
  output logic       v1,      // v_i(1) = t_{i+1}
  output logic       v0       // v_i(0)
);

  logic [2:0] g_p1, g_p0;  // G0..G2 of each partial sum
  logic       p1_odd, w, cx;

  function automatic logic [2:0] thresholds(logic [2:0] l);
    logic [2:0] g;
    g[0] = l[0] | l[1] | l[2];
    g[1] = (l[0] & l[1]) | (l[0] & l[2]) | (l[1] & l[2]);
    g[2] = l[0] & l[1] & l[2];
    return g;
  endfunction

  always_comb begin
    g_p1   = thresholds(p1);
    g_p0   = thresholds(p0);
    p1_odd = (g_p1[0] & ~g_p1[1]) | g_p1[2];
    w      = (g_p0[0] & ~g_p0[1]) | g_p0[2];
    c2_out = g_p1[1] | (g_p1[0] & g_p0[1]);
    c1_out = g_p0[1] ^ p1_odd;
    cx     = c2_in ^ c1_in;
    v1     = (c2_in & c1_in) | (cx & w);
    v0     = (~cx & w) | (cx & ~w);
  end

endmodule
