// pasta_ref_pkg: reference models used by the testbenches, written from
// the arithmetic, not from the RTL.
//   pasta_iters  - runs the PASTA recursion on integers and returns the
//                  number of iterations until no carry is left:
//                  S^0 = a^b, C^0 = a&b; S^j = S^{j-1} ^ C_in^{j-1},
//                  C^j = S^{j-1} & C_in^{j-1}, C_in = (C << 1) | cin_once.
//   csa_vectors  - the sum and carry vectors left by an n x n carry-save
//                  array, computed row by row with integer arithmetic.
package pasta_ref_pkg;

  function automatic int pasta_iters(longint unsigned a, longint unsigned b,
                                     bit cin, int w);
    longint unsigned mask, s, c, cv, s_n;
    bit c0;
    int k;
    mask = (w >= 63) ? '1 : ((64'd1 << (w + 1)) - 1);
    s  = (a ^ b) & mask;
    c  = (a & b) & mask;
    c0 = cin;
    k  = 0;
    while ((c != 0) || c0) begin
      cv  = ((c << 1) | longint'(c0)) & mask;
      s_n = s ^ cv;
      c   = s & cv;
      s   = s_n;
      c0  = 1'b0;
      k++;
      if (k > 1000) break;
    end
    return k;
  endfunction

  // Carry-save array: row 0 holds x0&y; row i adds x_i&y_j, the row-above
  // sum of weight i+j and the row-above carry of weight i+j.
  function automatic void csa_vectors(longint unsigned x, longint unsigned y, int n,
                                      output longint unsigned sum_vec,
                                      output longint unsigned carry_vec);
    bit s [64], c [64], s_n [64], c_n [64];
    for (int j = 0; j < n; j++) begin
      s[j] = x[0] & y[j];
      c[j] = 1'b0;
    end
    for (int i = 1; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        bit p, sa, ca;
        p  = x[i] & y[j];
        sa = (j == n - 1) ? 1'b0 : s[j+1];
        ca = c[j];
        s_n[j] = p ^ sa ^ ca;
        c_n[j] = (int'(p) + int'(sa) + int'(ca)) >= 2;
      end
      for (int j = 0; j < n; j++) begin
        s[j] = s_n[j];
        c[j] = c_n[j];
      end
    end
    sum_vec   = 0;
    carry_vec = 0;
    for (int j = 1; j < n; j++) sum_vec[j-1] = s[j];
    for (int j = 0; j < n; j++) carry_vec[j] = c[j];
  endfunction

endpackage
