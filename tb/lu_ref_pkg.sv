// lu_ref_pkg: test matrices and a reference factorization for the engine's
// testbenches.
//
// gen() builds a random sparse, diagonally dominant n x n matrix (so no
// pivoting is needed). symbolic() adds the fill-ins of LU factorization to
// the nonzero pattern, which is the host's symbolic analysis. factor()
// computes L (unit diagonal implied) and U in place, in the same left-looking
// order as the hardware and with the same single precision rounding at every
// operation, so the hardware result must match it bit for bit.
package lu_ref_pkg;
  import fp_ref_pkg::*;

  localparam int NT = 400;                 // largest test matrix

  bit          pat [NT][NT];               // nonzero pattern, [row][col]
  logic [31:0] aval [NT][NT];              // matrix values
  logic [31:0] lu   [NT][NT];              // reference result

  // random pattern with about 'per_col' off-diagonal entries per column
  // (plus a band just below the diagonal so columns depend on each other)
  function automatic void gen(input int n, input int per_col);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        pat[i][j]  = (i == j);
        aval[i][j] = 32'd0;
      end
    for (int j = 0; j < n; j++) begin
      for (int c = 0; c < per_col; c++) pat[$urandom_range(n - 1, 0)][j] = 1'b1;
      if (j + 1 < n) pat[j + 1][j] = 1'b1;
      if (j > 0 && $urandom_range(1, 0) == 1) pat[j - 1][j] = 1'b1;
    end
    revalue(n);
  endfunction

  // new values on the same pattern: off-diagonal in +-[0.25,1), diagonal in
  // [n, 2n) so every pivot stays well away from zero
  function automatic void revalue(input int n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        if (i == j)        aval[i][j] = r2s(real'(n) * (1.0 + real'($urandom_range(1000, 0)) / 1001.0));
        else if (pat[i][j]) aval[i][j] = {1'($urandom), 8'(125 + $urandom_range(1, 0)), 23'($urandom)};
        else               aval[i][j] = 32'd0;
      end
  endfunction

  // add fill-ins: eliminating column k joins row patterns
  function automatic void symbolic(input int n);
    for (int k = 0; k < n; k++)
      for (int i = k + 1; i < n; i++)
        if (pat[i][k])
          for (int j = k + 1; j < n; j++)
            if (pat[k][j]) pat[i][j] = 1'b1;
  endfunction

  function automatic void factor(input int n);
    logic [31:0] x [NT];
    for (int k = 0; k < n; k++) begin
      for (int i = 0; i < n; i++) x[i] = pat[i][k] ? aval[i][k] : 32'd0;
      for (int j = 0; j < k; j++)
        if (pat[j][k])
          for (int i = j + 1; i < n; i++)
            if (pat[i][j]) x[i] = ref_sub(x[i], ref_mul(lu[i][j], x[j]));
      for (int i = 0; i < n; i++)
        if (pat[i][k]) lu[i][k] = (i <= k) ? x[i] : ref_div(x[i], x[k]);
        else           lu[i][k] = 32'd0;
    end
  endfunction

  function automatic int nnz(input int n);
    int c = 0;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) c += int'(pat[i][j]);
    return c;
  endfunction

endpackage
