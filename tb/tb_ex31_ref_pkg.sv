// tb_ex31_ref_pkg: reference model of the running example for testbenches.
//
// Evaluates the three equations of the example directly over the index
// space, independently of the RTL:
//   y[i,j,k] = y[i,j-1,k-1] * u[i,j,k-2] + a[i-1,j-1,k-1] * u[i,j-1,k]
//   a[i,j,k] = y[i,j-1,k] - a[i-1,j,k]
//   u[i,j,k] = u[i,j-1,k-1] - y[i-1,j-1,k] * y[i-1,j,k-4]
// on 16-bit words modulo 2^16. A value at a processor index outside the
// processor space Q is a border value, given by border_val(); a value
// inside Q before time step 0 is zero. Points are evaluated in order of
// k, then i, then j, which respects every dependence of the example.
package tb_ex31_ref_pkg;
  import paro_pkg::*;

  typedef enum int { V_Y = 0, V_A = 1, V_U = 2 } var_t;

  word_t ref_v [3][H1_MIN:H1_MAX][H2_MIN:H2_MAX][K_MIN:K_MAX];
  int unsigned border_seed = 1;

  // Deterministic pseudo-random border value of variable v at (i, j, k).
  function automatic word_t border_val(var_t v, int i, int j, int k);
    int unsigned h;
    h = border_seed * 32'h9E3779B1 + int'(v) * 32'h85EBCA6B + (i + 8) * 32'hC2B2AE35 +
        (j + 8) * 32'h27D4EB2F + (k + 8) * 32'h165667B1;
    h = h ^ (h >> 15);
    h = h * 32'h2C1B3C6D;
    h = h ^ (h >> 12);
    return word_t'(h);
  endfunction

  function automatic word_t get(var_t v, int i, int j, int k);
    if (!inside_q(i, j)) return border_val(v, i, j, k);
    if (k < K_MIN) return '0;
    return ref_v[v][i][j][k];
  endfunction

  function automatic void compute(int unsigned seed);
    border_seed = seed;
    for (int k = K_MIN; k <= K_MAX; k++)
      for (int i = H1_MIN; i <= H1_MAX; i++)
        for (int j = H2_MIN; j <= H2_MAX; j++)
          if (inside_q(i, j)) begin
            word_t y1, y2, u1;
            y1 = get(V_Y, i, j-1, k-1) * get(V_U, i, j, k-2);
            y2 = get(V_A, i-1, j-1, k-1) * get(V_U, i, j-1, k);
            ref_v[V_Y][i][j][k] = y1 + y2;
            ref_v[V_A][i][j][k] = get(V_Y, i, j-1, k) - get(V_A, i-1, j, k);
            u1 = get(V_Y, i-1, j-1, k) * get(V_Y, i-1, j, k-4);
            ref_v[V_U][i][j][k] = get(V_U, i, j-1, k-1) - u1;
          end
  endfunction

  // Border input of the PE at (p1, p2) for time step k. A field whose
  // source PE exists is filled with noise, since the array must not use it.
  function automatic pe_in_t border_in(int p1, int p2, int k);
    pe_in_t b;
    b.y01_t0 = inside_q(p1, p2-1)   ? word_t'($urandom) : get(V_Y, p1, p2-1, k);
    b.y01_t1 = inside_q(p1, p2-1)   ? word_t'($urandom) : get(V_Y, p1, p2-1, k-1);
    b.u01_t0 = inside_q(p1, p2-1)   ? word_t'($urandom) : get(V_U, p1, p2-1, k);
    b.u01_t1 = inside_q(p1, p2-1)   ? word_t'($urandom) : get(V_U, p1, p2-1, k-1);
    b.y11_t0 = inside_q(p1-1, p2-1) ? word_t'($urandom) : get(V_Y, p1-1, p2-1, k);
    b.a11_t1 = inside_q(p1-1, p2-1) ? word_t'($urandom) : get(V_A, p1-1, p2-1, k-1);
    b.y10_t4 = inside_q(p1-1, p2)   ? word_t'($urandom) : get(V_Y, p1-1, p2, k-4);
    b.a10_t0 = inside_q(p1-1, p2)   ? word_t'($urandom) : get(V_A, p1-1, p2, k);
    return b;
  endfunction

endpackage
