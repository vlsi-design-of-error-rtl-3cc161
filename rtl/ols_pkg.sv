// ols_pkg: constants and construction functions of the t-error-correcting
// Orthogonal Latin Square (OLS) code and of the extended double-error-
// correcting (t = 2) form.
//
// Code structure. A data word of m*m bits is arranged as an m x m array; data
// bit number c sits at row a = c / m and column b = c % m. The code has
// 2*t*m check bits split into 2t groups of m bits:
//   group 0 (M1): check a            -- every row of M1 holds m consecutive ones
//   group 1 (M2): check m + b        -- M2 = [I_m I_m ... I_m]
//   group g >= 2: check g*m + (a ^ alpha^(g-2) * b)
//                 (Latin squares a + b, a + alpha*b, a + alpha^2*b, ...)
// Addition and multiplication are in GF(m) (m a power of two, alpha = x), which
// makes the Latin squares mutually orthogonal and orthogonal to the row and
// column squares: any two data bits share at most one check bit, the property
// one-step majority-logic decoding (OS-MLD) needs. Every data bit feeds exactly
// one check bit of each group. GF(m) allows at most m - 1 such squares, so
// 2t <= m + 1 (t <= 2 for m = 4, t <= 4 for m = 8). t = 1 is the
// single-error-correcting code H = [M1; M2 | I_2m]; adding 2m check bits per
// step gives the codes for larger t.
//
// Extension. Because no original column holds more than one 1 inside a group,
// extra data columns can be formed from 2t = 4 check bits taken all from one
// group, provided two such columns share at most one bit. Per group of m bits:
//   m = 4 : one column, all four bits of the group             (k 16 -> 20)
//   m = 8 : two columns, bits 0-3 and bits 4-7 of the group     (k 64 -> 72)
//   m >= 16, m = 4*l : the columns of the extended code with parameter l,
//           which has exactly 4l = m check bits (m=16: 20 per group, k 256 -> 336;
//           m=32: 72 per group, k 1024 -> 1312).
// Extended data columns are numbered after the m*m original ones, group by
// group. The extension is built for t = 2 only. The functions below are
// evaluated at elaboration time only.
package ols_pkg;

  // Largest supported m and t, and the resulting largest widths.
  localparam int unsigned MMAX = 32;
  localparam int unsigned TMAX = 4;
  localparam int unsigned RMAX = 2 * TMAX * MMAX;
  localparam int unsigned KMAX = MMAX * MMAX + 4 * 72;

  typedef logic [RMAX-1:0] hcol_t;
  typedef logic [KMAX-1:0] hrow_t;

  // Status reported by the decoder with every read word.
  typedef struct packed {
    logic err_detected;   // syndrome is not zero
    logic corrected;      // at least one data bit was flipped by the vote
    logic uncorrectable;  // the implied error pattern has more than t bits
    logic ced_err;        // parity prediction of the syndrome logic failed
  } dec_status_t;

  // Extension columns that fit in one group of m check bits (t = 2).
  function automatic int unsigned ext_per_group(int unsigned m);
    case (m)
      4:       return 1;
      8:       return 2;
      16:      return 16 + 4 * 1;
      32:      return 64 + 4 * 2;
      default: return 0;
    endcase
  endfunction

  // Data bits of the code: plain (ext = 0) or extended (ext = 1, t = 2 only).
  function automatic int unsigned data_bits(int unsigned m, int unsigned t, bit ext);
    return m * m + ((ext && t == 2) ? 4 * ext_per_group(m) : 0);
  endfunction

  function automatic int unsigned check_bits(int unsigned m, int unsigned t);
    return 2 * t * m;
  endfunction

  // 1 when (m, t, ext) is a configuration these functions can build.
  function automatic bit config_ok(int unsigned m, int unsigned t, bit ext);
    return (m == 4 || m == 8 || m == 16 || m == 32) && t >= 1 && t <= TMAX &&
           2 * t <= m + 1 && (!ext || t == 2);
  endfunction

  // Multiply by alpha (= x) in GF(m), m = 4, 8, 16 or 32.
  function automatic int unsigned gf_mul_alpha(int unsigned b, int unsigned m);
    int unsigned p;
    int unsigned poly;
    case (m)
      4:       poly = 'h7;   // x^2 + x + 1
      8:       poly = 'hB;   // x^3 + x + 1
      16:      poly = 'h13;  // x^4 + x + 1
      default: poly = 'h25;  // x^5 + x^2 + 1
    endcase
    p = b << 1;
    if (p >= m) p = p ^ poly;
    return p;
  endfunction

  // Index of the j-th (j = 0 .. 2t-1) check bit of data column col. Extension
  // columns (col >= m*m) exist for t = 2 only and have j = 0..3.
  function automatic int unsigned chk_idx(int unsigned m, int unsigned col, int unsigned j);
    int unsigned mm;
    int unsigned c;
    int unsigned offset;
    int unsigned e;
    int unsigned a;
    int unsigned b;
    mm = m;
    c = col;
    offset = 0;
    // At most three levels of nesting are needed for m <= 32.
    for (int lvl = 0; lvl < 4; lvl++) begin
      if (c < mm * mm) begin
        a = c / mm;
        b = c % mm;
        if (j == 0) return offset + a;
        if (j == 1) return offset + mm + b;
        // b times alpha^(j-2)
        for (int unsigned i = 2; i < j; i++) b = gf_mul_alpha(b, mm);
        return offset + j * mm + (a ^ b);
      end
      e = c - mm * mm;
      offset = offset + (e / ext_per_group(mm)) * mm;
      c = e % ext_per_group(mm);
      if (mm == 4) return offset + j;
      if (mm == 8) return offset + 4 * c + j;
      mm = mm / 4;
    end
    return 0;
  endfunction

  // Column col of the parity check matrix restricted to the check bits.
  function automatic hcol_t h_col(int unsigned m, int unsigned t, int unsigned col);
    hcol_t v;
    v = '0;
    for (int unsigned j = 0; j < 2 * t; j++) v[chk_idx(m, col, j)] = 1'b1;
    return v;
  endfunction

  // Row r of the G matrix: which data bits feed check bit r.
  function automatic hrow_t h_row(int unsigned m, int unsigned t, bit ext, int unsigned r);
    hrow_t v;
    v = '0;
    for (int unsigned col = 0; col < data_bits(m, t, ext); col++)
      for (int unsigned j = 0; j < 2 * t; j++)
        if (chk_idx(m, col, j) == r) v[col] = 1'b1;
    return v;
  endfunction

endpackage
