// tb_ref_pkg: reference arithmetic shared by the testbenches.
//
// Holds matrix B as exact fractions (numerator / denominator) and computes,
// independently of the RTL, what the hardware should produce: each constant
// truncated to F fractional bits, a row of C as an integer count of 2**-F
// units, and the exact (real) value of C for error measurements.
package tb_ref_pkg;

  localparam int BNUM [4][4] = '{
    '{1, 1, 3, 1},
    '{3, 3, 3, 2},
    '{1, 5, 7, 3},
    '{1, 140, 1, 3}
  };
  localparam int BDEN [4][4] = '{
    '{1, 8, 1, 4},
    '{4, 2, 8, 1},
    '{2, 1, 15, 1},
    '{1, 123, 4, 4}
  };

  // B_kj truncated to f fractional bits, as an integer number of 2**-f.
  function automatic int bq(input int k, input int j, input int f);
    return (BNUM[k][j] << f) / BDEN[k][j];
  endfunction

  // C_ij in units of 2**-f, from one row a[0..3] of A.
  function automatic int cq(input int a [4], input int j, input int f);
    int s = 0;
    for (int k = 0; k < 4; k++) s += a[k] * bq(k, j, f);
    return s;
  endfunction

  // Exact C_ij.
  function automatic real cexact(input int a [4], input int j);
    real s = 0.0;
    for (int k = 0; k < 4; k++) s += real'(a[k]) * real'(BNUM[k][j]) / real'(BDEN[k][j]);
    return s;
  endfunction

endpackage
