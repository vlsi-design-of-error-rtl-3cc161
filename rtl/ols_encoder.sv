// ols_encoder: check-bit generator of the OLS code (default: extended
// double-error-correcting code, m = 4, 20 data bits, 16 check bits).
//
// Each of the R = 2tm check bits is the XOR of the data bits marked in its row
// of the generator matrix G = [M1; M2; ...; M2t] (plus, for the extended code,
// the extra data columns built from four bits of one group, see ols_pkg). The
// code is systematic: the stored codeword is {check, data}.
//
// Interface: data_i (K bits) in, check_o (R bits) out. Purely combinational,
// one XOR tree per check bit; no clock, no latency.
//
// The matrix construction (M1 rows of m consecutive ones, M2 = [I I ... I],
// groups of m check bits, extension columns) follows the code description;
// the choice of the Latin squares for M3, M4, ... (a + alpha^i * b over
// GF(m)) is this design's own.
module ols_encoder
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,     // side of the Latin squares; k = m*m
  parameter int unsigned T   = 2,     // errors corrected; 2t*m check bits
  parameter bit          EXT = 1'b1,  // 1: extended code (k = 20 for m = 4, t = 2)
  localparam int unsigned K = data_bits(M, T, EXT),
  localparam int unsigned R = check_bits(M, T)
) (
  input  logic [K-1:0] data_i,
  output logic [R-1:0] check_o
);

  initial assert (config_ok(M, T, EXT))
    else $error("ols_encoder: M must be 4, 8, 16 or 32, 2T <= M+1, EXT only with T = 2");

  for (genvar r = 0; r < R; r++) begin : g_chk
    localparam hrow_t ROW = h_row(M, T, EXT, r);
    assign check_o[r] = ^(data_i & ROW[K-1:0]);
  end

endmodule
