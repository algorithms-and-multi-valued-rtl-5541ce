// mbc: m-valued current input to binary current output converter ("mBC").
//
// M = 3, 4 and 5 give the 3BC, 4BC and 5BC cells of the BSC adders.  The
// input is an M-valued current, modelled as M-1 unit lines whose number of
// active lines is the level x in {0..M-1}.  Like the current-mode cell, the
// converter first forms the threshold signals G_j(x) = (x > j), j = 0..M-2,
// then steers one unit current to each binary component of x:
// x = sum_k 2^k * b[k].  For M = 3 this is b[1] = G1(x), b[0] = G0(x).~G1(x),
// the two outputs x(1), x(0) of the 3BC cell.  Which lines are active does
// not matter, only how many (a current sum has no order).
//
// Purely combinational; no clock.  The threshold-then-steer structure follows
// the document's 3BC cell; the 4BC and 5BC use the same structure with more
// thresholds, which is this design's reading of "mBC".
module mbc #(
  parameter  int unsigned M  = 3,
  localparam int unsigned NB = $clog2(M)
) (
  input  logic [M-2:0]  x,  // M-1 unit lines, level = number of ones
  output logic [NB-1:0] b   // binary components, weight 2^k on b[k]
);

  logic [M-2:0] g;    // threshold detectors G_j
  logic [M-1:1] lev;  // one-hot level detection, level 1..M-1

  always_comb begin
    int unsigned cnt;
    cnt = 0;
    for (int unsigned i = 0; i < M - 1; i++) cnt += x[i] ? 1 : 0;
    for (int unsigned j = 0; j < M - 1; j++) g[j] = (cnt > j);
  end

  always_comb begin
    for (int unsigned l = 1; l < M; l++) begin
      if (l < M - 1) lev[l] = g[l-1] & ~g[l];
      else           lev[l] = g[l-1];
    end
    b = '0;
    for (int unsigned l = 1; l < M; l++)
      for (int unsigned k = 0; k < NB; k++)
        if (((l >> k) & 1) != 0) b[k] = b[k] | lev[l];
  end

endmodule
