// ols_decoder: OS-MLD decoder of the OLS code (default: extended double-error-
// correcting code, m = 4), with detection of heavier errors and concurrent
// error detection.
//
// Data path: ols_syndrome recomputes the check bits and forms the syndrome;
// ols_mld_corrector takes a majority vote over the 2t syndrome bits of each
// data bit and flips the bit on t+1 or more (3 of 4 for t = 2); in parallel
// ols_multi_err_detect flags words whose errors exceed t bits, and ols_ced_checker checks the
// syndrome logic by parity prediction (all three run off the syndrome, so the
// checks sit beside the vote, not after it).
//
// Interface: data_i (K) and check_i (R) of the word read back; data_o, the
// corrected data, and status_o (dec_status_t). Combinational, no clock.
// Up to t errors anywhere in the 2tm + k bit word are corrected in the data;
// check bits are not corrected.
module ols_decoder
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K = data_bits(M, T, EXT),
  localparam int unsigned R = check_bits(M, T)
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] check_i,
  output logic [K-1:0] data_o,
  output dec_status_t  status_o
);

  logic [R-1:0] syn;
  logic [K-1:0] flip;
  logic         uncorr;
  logic         ced_err;

  ols_syndrome #(.M(M), .T(T), .EXT(EXT)) u_syn (
    .data_i (data_i),
    .check_i(check_i),
    .syn_o  (syn)
  );

  ols_mld_corrector #(.M(M), .T(T), .EXT(EXT)) u_mld (
    .data_i(data_i),
    .syn_i (syn),
    .data_o(data_o),
    .flip_o(flip)
  );

  ols_multi_err_detect #(.M(M), .T(T), .EXT(EXT)) u_med (
    .syn_i   (syn),
    .flip_i  (flip),
    .uncorr_o(uncorr)
  );

  ols_ced_checker #(.M(M), .T(T)) u_ced (
    .data_i(data_i[M*M-1:0]),
    .vec_i (syn),
    .ref_i (check_i),
    .err_o (ced_err)
  );

  assign status_o.err_detected  = |syn;
  assign status_o.corrected     = |flip;
  assign status_o.uncorrectable = uncorr;
  assign status_o.ced_err       = ced_err;

endmodule
