// Reference model of the nDm torus knot code for the test benches.
//
// Written from the code definition with explicit coordinate arrays rather
// than from the RTL's index functions: cells are visited by coordinates,
// parity lines by walking one coordinate, and the transmission order by
// the base-m digits of the time index. Dynamic arrays of bit
// hold cubes, indexed by linear address a = sum(xk * m**k).
package tb_tkc_model;

  localparam int MAXN = 8;

  function automatic int pw(int b, int e);
    int r = 1;
    for (int i = 0; i < e; i++) r *= b;
    return r;
  endfunction

  function automatic void to_coords(int a, int n, int m, output int x[MAXN]);
    for (int k = 0; k < MAXN; k++) x[k] = 0;
    for (int k = 0; k < n; k++) begin
      x[k] = a % m;
      a    = a / m;
    end
  endfunction

  function automatic int from_coords(int x[MAXN], int n, int m);
    int a = 0;
    for (int k = n - 1; k >= 0; k--) a = a * m + x[k];
    return a;
  endfunction

  // Cell sent at time t: x0 is the lowest base-m digit of t, every other
  // coordinate is that digit plus the coordinate's own digit, mod m.
  function automatic int tx_cell(int t, int n, int m);
    int x[MAXN];
    int d[MAXN];
    for (int k = 0; k < MAXN; k++) begin
      d[k] = t % m;
      t    = t / m;
      x[k] = 0;
    end
    x[0] = d[0];
    for (int k = 1; k < n; k++) x[k] = (d[0] + d[k]) % m;
    return from_coords(x, n, m);
  endfunction

  // Data bit j sits at the cell whose coordinates are j's base-(m-1) digits.
  function automatic int data_cell(int j, int n, int m);
    int x[MAXN];
    for (int k = 0; k < MAXN; k++) x[k] = 0;
    for (int k = 0; k < n; k++) begin
      x[k] = j % (m - 1);
      j    = j / (m - 1);
    end
    return from_coords(x, n, m);
  endfunction

  // Parity (XOR) of the line along axis k through cell a.
  function automatic bit line_par(bit cube[], int a, int k, int n, int m);
    int x[MAXN];
    bit p = 0;
    to_coords(a, n, m, x);
    for (int i = 0; i < m; i++) begin
      x[k] = i;
      p ^= cube[from_coords(x, n, m)];
    end
    return p;
  endfunction

  function automatic void encode(bit data[], int n, int m, output bit cube[]);
    int x[MAXN];
    int cells = pw(m, n);
    cube = new[cells];
    foreach (cube[a]) cube[a] = 0;
    for (int j = 0; j < pw(m - 1, n); j++) cube[data_cell(j, n, m)] = data[j];
    for (int k = 0; k < n; k++)
      for (int a = 0; a < cells; a++) begin
        to_coords(a, n, m, x);
        if (x[k] == m - 1) begin
          bit p = 0;
          for (int i = 0; i < m - 1; i++) begin
            x[k] = i;
            p ^= cube[from_coords(x, n, m)];
          end
          cube[a] = p;
        end
      end
  endfunction

  // Number of failed lines through cell a.
  function automatic int fails(bit cube[], int a, int n, int m);
    int c = 0;
    for (int k = 0; k < n; k++) c += line_par(cube, a, k, n, m);
    return c;
  endfunction

  // Iterated majority decoding: pass i uses thr[i]; each pass is done in
  // `slices` processes, process s treating the cells with x(n-1) mod slices
  // == s, all of them from the same snapshot. Returns the number of flips.
  function automatic int decode(ref bit cube[], input int n, input int m, input int thr[],
                                input int slices);
    int x[MAXN];
    int nflip = 0;
    bit fl[];
    fl = new[cube.size()];
    foreach (thr[i])
      for (int s = 0; s < slices; s++) begin
        foreach (cube[a]) begin
          to_coords(a, n, m, x);
          fl[a] = ((x[n-1] % slices) == s) && (fails(cube, a, n, m) >= thr[i]);
        end
        foreach (cube[a]) if (fl[a]) begin
          cube[a] ^= 1'b1;
          nflip++;
        end
      end
    return nflip;
  endfunction

endpackage
