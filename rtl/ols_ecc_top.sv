// ols_ecc_top: error correction for one memory or register word with the
// extended double-error-correcting Orthogonal Latin Square code
// (default m = 4, t = 2: 20 data bits, 16 check bits, 36-bit stored word).
// Parameters M, T and EXT select the other sizes: extended t = 2 codes for
// m = 8, 16, 32, and plain OLS codes for any t with 2t <= m + 1.
//
// Write side: ols_encoder computes the check bits of wr_data_i; the caller
// stores {wr_check_o, wr_data_i}. An ols_ced_checker checks the encoder by
// parity prediction while the word is being written and raises wr_ced_err_o
// on an internal encoder fault.
// Read side: the stored word (rd_data_i, rd_check_i) goes through ols_decoder,
// which returns corrected data and a dec_status_t: error seen, data corrected,
// uncorrectable (more than t bits in error) and syndrome-logic fault.
//
// The storage itself is outside this module; its ports carry the codeword.
// Both sides are combinational; a user registers them as their timing needs.
module ols_ecc_top
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K = data_bits(M, T, EXT),
  localparam int unsigned R = check_bits(M, T)
) (
  // write side
  input  logic [K-1:0] wr_data_i,
  output logic [R-1:0] wr_check_o,
  output logic         wr_ced_err_o,
  // read side
  input  logic [K-1:0] rd_data_i,
  input  logic [R-1:0] rd_check_i,
  output logic [K-1:0] rd_data_o,
  output dec_status_t  rd_status_o
);

  ols_encoder #(.M(M), .T(T), .EXT(EXT)) u_enc (
    .data_i (wr_data_i),
    .check_o(wr_check_o)
  );

  ols_ced_checker #(.M(M), .T(T)) u_enc_ced (
    .data_i(wr_data_i[M*M-1:0]),
    .vec_i (wr_check_o),
    .ref_i ('0),
    .err_o (wr_ced_err_o)
  );

  ols_decoder #(.M(M), .T(T), .EXT(EXT)) u_dec (
    .data_i  (rd_data_i),
    .check_i (rd_check_i),
    .data_o  (rd_data_o),
    .status_o(rd_status_o)
  );

endmodule
