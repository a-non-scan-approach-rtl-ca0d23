// tb_ref_pkg: reference model of the example controller for the testbenches.
//
// Written from the state table of the example controller, independently of
// the RTL: the next-state function is a plain lookup table indexed by
// state and input, the outputs follow the rules listed with the table, and
// the invalid test state generator is modelled as a list walk. States are
// numbered Sk = k (k = 0..9) and ISk = 9 + k.
package tb_ref_pkg;

  // NEXT[state][x] for the ten valid states.
  localparam int NEXT [10][4] = '{
    '{0, 1, 2, 3},   // S0
    '{1, 4, 0, 6},   // S1
    '{2, 5, 0, 7},   // S2
    '{3, 8, 0, 0},   // S3
    '{4, 0, 9, 9},   // S4
    '{5, 9, 0, 0},   // S5
    '{6, 0, 0, 0},   // S6
    '{7, 8, 0, 0},   // S7
    '{8, 9, 0, 0},   // S8
    '{9, 0, 0, 0}    // S9
  };

  function automatic int ref_ns(int s, int x);
    return (s < 10) ? NEXT[s][x] : 0;
  endfunction

  // po[0]: flag of S4 and S9; po[1]: x[1] in odd states, x[0] in even ones.
  // Unreachable states: po = {x[0], x[1]}.
  function automatic int ref_po(int s, int x);
    int x0 = x & 1;
    int x1 = (x >> 1) & 1;
    if (s >= 10) return (x0 << 1) | x1;
    return ((((s % 2) == 1) ? x1 : x0) << 1) | ((s == 4 || s == 9) ? 1 : 0);
  endfunction

  // Invalid test states in generation order, after the reset state S0.
  localparam int IS_SEQ [3] = '{10, 11, 12};

  function automatic int ref_isg(int s);
    for (int k = 0; k < 3; k++)
      if (s == IS_SEQ[k]) return (k == 2) ? 0 : IS_SEQ[k + 1];
    return IS_SEQ[0];
  endfunction

  // Parity of a bit vector held in an int.
  function automatic int parity(int v);
    int p = 0;
    for (int i = 0; i < 32; i++) p ^= (v >> i) & 1;
    return p;
  endfunction

endpackage
