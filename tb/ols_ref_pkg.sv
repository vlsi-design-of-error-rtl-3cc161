// ols_ref_pkg: reference model of the extended double-error-correcting OLS
// code, used by the testbenches to work out expected values on their own.
//
// It builds each column of the parity check matrix from the Latin squares
// directly (row, column, a+b and a+alpha*b in GF(m), with a general carry-less
// GF multiplier), adds the extension columns group by group, and decodes with
// a bit-serial majority vote. It also offers structural checks of the matrix
// (column weight 2t and at most one shared check bit between any two columns)
// that do not depend on how the columns were built. Widths are sized for the
// largest supported codes (m = 32 extended: 1312 data bits; t = 4: 2tm check
// bits up to 256). The *_t functions cover plain codes of any t; the others
// the t = 2 code, plain or extended.
package ols_ref_pkg;

  localparam int KM = 1312;
  localparam int RM = 256;

  typedef logic [KM-1:0] dvec_t;
  typedef logic [RM-1:0] cvec_t;

  typedef struct {
    dvec_t data;
    logic  det;
    logic  corr;
    logic  unc;
    logic  ced;
  } ref_dec_t;

  function automatic int log2m(int m);
    int q = 0;
    while ((1 << q) < m) q++;
    return q;
  endfunction

  // Carry-less product of a and b reduced modulo the field polynomial.
  function automatic int gf_mul(int a, int b, int m);
    int poly;
    int p = 0;
    int q = log2m(m);
    case (m)
      4:       poly = 7;
      8:       poly = 11;
      16:      poly = 19;
      default: poly = 37;
    endcase
    for (int i = 0; i < q; i++) if (((b >> i) & 1) != 0) p ^= a << i;
    for (int i = 2 * q - 2; i >= q; i--) if (((p >> i) & 1) != 0) p ^= poly << (i - q);
    return p;
  endfunction

  function automatic int n_ext(int m);
    return (m == 4) ? 1 : (m == 8) ? 2 : (m == 16) ? 20 : 72;
  endfunction

  function automatic int n_data(int m, bit ext);
    return ext ? m * m + 4 * n_ext(m) : m * m;
  endfunction

  // Columns of codes whose extension is a plain choice of four bits (m <= 8).
  function automatic cvec_t small_col(int m, int col);
    cvec_t v = '0;
    if (col < m * m) begin
      int a = col / m;
      int b = col % m;
      v[a] = 1'b1;
      v[m + b] = 1'b1;
      v[2 * m + (a ^ b)] = 1'b1;
      v[3 * m + (a ^ gf_mul(2, b, m))] = 1'b1;
    end else begin
      int e = col - m * m;
      int g = e / n_ext(m);
      int c = e % n_ext(m);
      if (m == 4) v[g * 4 +: 4] = 4'hF;
      else        v[g * 8 + 4 * c +: 4] = 4'hF;
    end
    return v;
  endfunction

  function automatic cvec_t ref_col(int m, int col);
    if (m <= 8 || col < m * m) return small_col(m, col);
    begin
      int e = col - m * m;
      int g = e / n_ext(m);
      int c = e % n_ext(m);
      return small_col(m / 4, c) << (g * m);
    end
  endfunction

  // Plain OLS code correcting t errors: group g >= 2 uses the Latin square
  // a + lambda_g * b with lambda_g = alpha^(g-2) computed by gf_mul.
  function automatic cvec_t ref_col_t(int m, int t, int col);
    cvec_t v = '0;
    int a = col / m;
    int b = col % m;
    int lambda = 1;
    v[a] = 1'b1;
    v[m + b] = 1'b1;
    for (int g = 2; g < 2 * t; g++) begin
      v[g * m + (a ^ gf_mul(lambda, b, m))] = 1'b1;
      lambda = gf_mul(lambda, 2, m);
    end
    return v;
  endfunction

  function automatic cvec_t ref_encode_t(int m, int t, dvec_t d);
    cvec_t c = '0;
    for (int col = 0; col < m * m; col++) if (d[col]) c ^= ref_col_t(m, t, col);
    return c;
  endfunction

  function automatic bit ref_osmld_ok_t(int m, int t);
    for (int i = 0; i < m * m; i++) begin
      if ($countones(ref_col_t(m, t, i)) != 2 * t) return 1'b0;
      for (int j = i + 1; j < m * m; j++)
        if ($countones(ref_col_t(m, t, i) & ref_col_t(m, t, j)) > 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic cvec_t ref_encode(int m, bit ext, dvec_t d);
    cvec_t c = '0;
    for (int col = 0; col < n_data(m, ext); col++) if (d[col]) c ^= ref_col(m, col);
    return c;
  endfunction

  // 1 when every column has weight 4 and no two columns share two check bits.
  function automatic bit ref_osmld_ok(int m, bit ext);
    int n = n_data(m, ext);
    for (int i = 0; i < n; i++) begin
      if ($countones(ref_col(m, i)) != 4) return 1'b0;
      for (int j = i + 1; j < n; j++)
        if ($countones(ref_col(m, i) & ref_col(m, j)) > 1) return 1'b0;
    end
    return 1'b1;
  endfunction

  function automatic ref_dec_t ref_decode(int m, bit ext, dvec_t d, cvec_t chk);
    ref_dec_t r;
    cvec_t s = ref_encode(m, ext, d) ^ chk;
    cvec_t resid = s;
    int nflip = 0;
    r.data = d;
    for (int col = 0; col < n_data(m, ext); col++) begin
      if ($countones(s & ref_col(m, col)) >= 3) begin
        r.data[col] = ~d[col];
        resid ^= ref_col(m, col);
        nflip++;
      end
    end
    r.det  = (s != '0);
    r.corr = (nflip != 0);
    r.unc  = (nflip + $countones(resid)) > 2;
    r.ced  = 1'b0;
    return r;
  endfunction

endpackage
