// ols_multi_err_detect: flags errors of more than t bits (default t = 2).
//
// The majority vote alone miscorrects or ignores many patterns of three or
// more errors. This block checks whether the decision of the vote is a
// consistent explanation of the syndrome with at most t errors: the syndrome
// columns of the flipped data bits are XORed out of the syndrome; what remains
// must be errors in check bits, one syndrome bit each. If flipped data bits
// plus remaining syndrome bits exceed t, the word is reported uncorrectable.
// For t or fewer errors the vote is exact and the count equals the true error
// weight, so the flag is never raised; many (not all) heavier errors raise it.
//
// Interface: syn_i (R) and flip_i (K) in; uncorr_o out. Combinational.
// The document asks for detection of errors beyond two bits; this weight test
// is this design's own way of doing it.
module ols_multi_err_detect
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K = data_bits(M, T, EXT),
  localparam int unsigned R = check_bits(M, T)
) (
  input  logic [R-1:0] syn_i,
  input  logic [K-1:0] flip_i,
  output logic         uncorr_o
);

  localparam int unsigned CW = $clog2(K + R + 1);

  // Syndrome each flipped data bit accounts for.
  logic [R-1:0] explained [K];
  for (genvar c = 0; c < K; c++) begin : g_col
    localparam hcol_t COL = h_col(M, T, c);
    assign explained[c] = flip_i[c] ? COL[R-1:0] : '0;
  end

  logic [R-1:0]  residual;
  logic [CW-1:0] weight;

  always_comb begin
    residual = syn_i;
    for (int c = 0; c < K; c++) residual ^= explained[c];
    weight = CW'($countones(flip_i)) + CW'($countones(residual));
  end

  assign uncorr_o = (weight > CW'(T));

endmodule
