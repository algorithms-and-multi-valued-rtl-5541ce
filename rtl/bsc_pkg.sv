// Shared types and tree-planning functions for the binary stored-carry (BSC)
// multioperand adders.
//
// A multi-valued current level k in E_m = {0..m-1} is modelled as a bundle of
// unit-current lines: k of them carry one unit, the others none.  The analog
// (Kirchhoff) sum of two currents is then simply the union of their bundles,
// and a threshold detector G_j(x) is "more than j lines are active".  A BSC
// digit (value 0, 1 or 2) is such a bundle of two lines; the usual encodings
// 00 = 0, 01 = 1, 11 = 2 are covered, and 10 also reads as 1.
//
// The functions below describe how an adder tree of a given kind reduces a
// number of BSC operands: full groups of K operands go to K-input adders, a
// remainder of one operand is passed on, a remainder of 2 (or 3) goes to a
// 2-input (or 3-input) adder of the same family.  This is the arrangement
// behind the adder counts of the 32- and 64-operand comparisons.
package bsc_pkg;

  typedef logic [1:0] bsc_digit_t;

  typedef enum int unsigned {
    ADD_2IA  = 0,  // 2-input adder of 3BC cells
    ADD_M2IA = 1,  // modified 2-input adder (3BC + 3-valued encoder)
    ADD_3IA  = 2,  // 3-input adder of 3BC and 4BC cells
    ADD_M3IA = 3,  // modified 3-input adder (3BC + 4-valued encoder)
    ADD_4IA  = 4,  // 4-input adder of 3BC, 5BC and 4BC cells
    ADD_52IA = 5,  // 2-input adder on a single 5-valued position sum
    ADD_M4IA = 6   // modified 4-input adder (3BC + 5-valued encoder)
  } adder_kind_e;

  localparam int unsigned N_KINDS = 7;

  // Value of one BSC digit (number of active lines).
  function automatic int unsigned digit_value(bsc_digit_t d);
    return int'(d[0]) + int'(d[1]);
  endfunction

  // Number of inputs of the main adder of a family.
  function automatic int unsigned arity(adder_kind_e k);
    case (k)
      ADD_3IA, ADD_M3IA: return 3;
      ADD_4IA, ADD_M4IA: return 4;
      default:           return 2;
    endcase
  endfunction

  // Operands left after one tree level that starts with n operands.
  function automatic int unsigned ops_after_level(adder_kind_e k, int unsigned n);
    int unsigned a;
    a = arity(k);
    return n / a + ((n % a) != 0 ? 1 : 0);
  endfunction

  // Adders of any kind used by one level that starts with n operands.
  function automatic int unsigned adders_in_level(adder_kind_e k, int unsigned n);
    int unsigned a;
    a = arity(k);
    return n / a + ((n % a) >= 2 ? 1 : 0);
  endfunction

  // Tree levels needed to reduce n operands to one.
  function automatic int unsigned num_levels(adder_kind_e k, int unsigned n);
    int unsigned l, m;
    l = 0;
    m = n;
    while (m > 1) begin
      m = ops_after_level(k, m);
      l++;
    end
    return l;
  endfunction

  // Operand count at the input of level lvl (level 0 is the tree input).
  function automatic int unsigned ops_at_level(adder_kind_e k, int unsigned n, int unsigned lvl);
    int unsigned m;
    m = n;
    for (int unsigned i = 0; i < lvl; i++) m = ops_after_level(k, m);
    return m;
  endfunction

  // Adders of the family's own arity (K inputs) over the whole tree.
  function automatic int unsigned num_main_adders(adder_kind_e k, int unsigned n);
    int unsigned m, c;
    m = n;
    c = 0;
    while (m > 1) begin
      c += m / arity(k);
      m = ops_after_level(k, m);
    end
    return c;
  endfunction

  // Adders with fewer inputs (remainders) over the whole tree.
  function automatic int unsigned num_rem_adders(adder_kind_e k, int unsigned n);
    int unsigned m, c;
    m = n;
    c = 0;
    while (m > 1) begin
      c += adders_in_level(k, m) - m / arity(k);
      m = ops_after_level(k, m);
    end
    return c;
  endfunction

endpackage
