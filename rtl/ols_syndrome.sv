// ols_syndrome: syndrome computation of the OLS decoder.
//
// The check bits are recomputed from the received data bits with the same
// generator matrix as the encoder, and XORed with the received check bits.
// Syndrome bit r is 1 when check equation r fails. Each data bit's 2t
// syndrome bits (one per group of m) are the inputs of its majority vote.
//
// Interface: data_i (K), check_i (R) in; syn_o (R) out. Combinational.
// Follows the code description; the module boundary is this design's own.
module ols_syndrome
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
  output logic [R-1:0] syn_o
);

  logic [R-1:0] recomputed;

  ols_encoder #(.M(M), .T(T), .EXT(EXT)) u_recompute (
    .data_i (data_i),
    .check_o(recomputed)
  );

  assign syn_o = recomputed ^ check_i;

endmodule
