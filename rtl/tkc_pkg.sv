// Shared constants and index arithmetic for the high-dimensional discrete
// torus knot code (nDm code).
//
// An nDm code block is an n-dimensional cube with m cells per axis, m**n cells
// in all. A cell is addressed by its coordinates (x0 .. x(n-1)), each 0..m-1,
// and by the linear address a = sum(xk * m**k). Along every axis, coordinate
// m-1 holds the even-parity digit of the line and coordinates 0..m-2 hold
// data, so the block carries (m-1)**n data digits.
//
// The functions below are evaluated at elaboration time: they turn the code
// geometry into wiring (which cell feeds which in the torus shift register,
// which cells form a parity line), so the hardware itself holds no address
// arithmetic. The defaults are the 4D5 code of the reference chip.
//
// The cube, the even-parity lines and the oblique torus knot transmission
// order follow the code's definition; the exact winding formula, the parity
// position (coordinate m-1) and the placement of data bits are this design's
// choices.
package tkc_pkg;

  parameter int unsigned N_DIM_DEF  = 4;   // code dimension n
  parameter int unsigned M_SIZE_DEF = 5;   // axis size m

  // Integer power b**e.
  function automatic int unsigned ipow(input int unsigned b, input int unsigned e);
    int unsigned r;
    r = 1;
    for (int unsigned i = 0; i < e; i++) r = r * b;
    return r;
  endfunction

  // Digit k of value a written in base m.
  function automatic int unsigned digit(input int unsigned a, input int unsigned k,
                                        input int unsigned m);
    return (a / ipow(m, k)) % m;
  endfunction

  // Linear address of the cell sent t-th (t = 0 .. m**n-1) on the channel.
  // With t = sum(dk * m**k), the cell is x0 = d0 and xk = (d0 + dk) mod m for
  // k >= 1. While t counts up without a carry out of d0, every step moves one
  // cell diagonally along all n axes at once; each carry starts the next turn
  // of the winding one cell further on. The sequence thus winds obliquely
  // round the discrete torus and visits every cell once. Any m consecutive
  // digits have different x0, so no two of them share a line of axes 1..n-1,
  // and they share an axis-0 line only where t crosses a multiple of
  // m**(n-1) (four places in a 4D5 block).
  function automatic int unsigned torus_addr(input int unsigned t, input int unsigned n,
                                             input int unsigned m);
    int unsigned a;
    a = digit(t, 0, m);
    for (int unsigned k = 1; k < n; k++)
      a = a + ((digit(t, 0, m) + digit(t, k, m)) % m) * ipow(m, k);
    return a;
  endfunction

  // Linear cube address of data bit j (j = 0 .. (m-1)**n-1): the base-(m-1)
  // digits of j are the cell's coordinates.
  function automatic int unsigned data_addr(input int unsigned j, input int unsigned n,
                                            input int unsigned m);
    int unsigned a;
    a = 0;
    for (int unsigned k = 0; k < n; k++) a = a + digit(j, k, m - 1) * ipow(m, k);
    return a;
  endfunction

  // 1 if cell a holds a data digit (no coordinate equal to m-1).
  function automatic bit is_data_cell(input int unsigned a, input int unsigned n,
                                      input int unsigned m);
    for (int unsigned k = 0; k < n; k++) if (digit(a, k, m) == m - 1) return 1'b0;
    return 1'b1;
  endfunction

  // Data bit index held by data cell a (inverse of data_addr).
  function automatic int unsigned data_index(input int unsigned a, input int unsigned n,
                                             input int unsigned m);
    int unsigned j;
    j = 0;
    for (int unsigned k = 0; k < n; k++) j = j + digit(a, k, m) * ipow(m - 1, k);
    return j;
  endfunction

  // Index (0 .. m**(n-1)-1) of the parity line along axis k through cell a:
  // the cell address with coordinate k removed.
  function automatic int unsigned line_index(input int unsigned a, input int unsigned k,
                                             input int unsigned m);
    return (a / ipow(m, k + 1)) * ipow(m, k) + (a % ipow(m, k));
  endfunction

  // Linear address of cell i (i = 0 .. m-1) of line l along axis k.
  function automatic int unsigned line_cell(input int unsigned l, input int unsigned k,
                                            input int unsigned i, input int unsigned m);
    return (l / ipow(m, k)) * ipow(m, k + 1) + i * ipow(m, k) + (l % ipow(m, k));
  endfunction

  // Bits needed to hold values 0 .. v.
  function automatic int unsigned cnt_width(input int unsigned v);
    return (v < 2) ? 1 : $clog2(v + 1);
  endfunction

endpackage
