// tb_ict_ref_pkg: straightforward reference model of the ICT(10,9,6,2,3,1)
// used by the testbenches. It multiplies by the full 8x8 integer kernel J
// (no fast factorization) and normalizes in floating point, so it shares no
// structure with the RTL.
package tb_ict_ref_pkg;

  // Order-8 ICT kernel, rows = frequency k, columns = sample n.
  function automatic int jm(input int k, input int n);
    int a = 10, b = 9, c = 6, d = 2, e = 3, f = 1, g = 1;
    int tbl [8][8];
    tbl[0] = '{ g,  g,  g,  g,  g,  g,  g,  g};
    tbl[1] = '{ a,  b,  c,  d, -d, -c, -b, -a};
    tbl[2] = '{ e,  f, -f, -e, -e, -f,  f,  e};
    tbl[3] = '{ b, -d, -a, -c,  c,  a,  d, -b};
    tbl[4] = '{ g, -g, -g,  g,  g, -g, -g,  g};
    tbl[5] = '{ c, -a,  d,  b, -b, -d,  a, -c};
    tbl[6] = '{ f, -e,  e, -f, -f,  e, -e,  f};
    tbl[7] = '{ d, -c,  b, -a,  a, -b,  c, -d};
    return tbl[k][n];
  endfunction

  // Normalization factor 1/||row k of J||.
  function automatic real kn(input int k);
    int s = 0;
    for (int n = 0; n < 8; n++) s += jm(k, n) * jm(k, n);
    return 1.0 / $sqrt(real'(s));
  endfunction

  // 1-D un-normalized transform of an 8-vector.
  function automatic int j1d(input int x [8], input int k);
    int acc = 0;
    for (int n = 0; n < 8; n++) acc += jm(k, n) * x[n];
    return acc;
  endfunction

  // 2-D un-normalized coefficient Y(l,k) = sum_i sum_j J(l,i) x(i,j) J(k,j).
  function automatic longint j2d(input int x [8][8], input int l, input int k);
    longint acc = 0;
    for (int i = 0; i < 8; i++)
      for (int j = 0; j < 8; j++)
        acc += longint'(jm(l, i)) * x[i][j] * jm(k, j);
    return acc;
  endfunction

  function automatic real absr(input real v);
    return (v < 0.0) ? -v : v;
  endfunction

endpackage
