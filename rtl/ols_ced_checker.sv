// ols_ced_checker: concurrent error detection by parity prediction.
//
// Every original data bit of an OLS code feeds exactly one check bit in each
// of the 2t groups of m check bits, so the XOR of the check bits of any group
// equals the parity of the m*m original data bits. An extension data bit feeds
// four check bits of a single group and so cancels out of that parity. The
// checker predicts the parity from the data and compares it with the XOR of
// each group of vec_i XOR ref_i:
//   encoder check:  vec_i = computed check bits, ref_i = 0
//   syndrome check: vec_i = syndrome, ref_i = received check bits
// A fault on any single node of the encoder or syndrome XOR trees changes one
// group parity and raises err_o.
//
// Interface: data_i (the m*m original data bits only; extension bits cannot
// change any group parity), vec_i (R), ref_i (R) in; err_o out.
// Combinational. The use of the OLS properties for parity prediction on the
// encoder and syndrome logic follows the described scheme; the exact checker
// structure is this design's own.
module ols_ced_checker
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  localparam int unsigned R = check_bits(M, T)
) (
  input  logic [M*M-1:0] data_i,
  input  logic [R-1:0]   vec_i,
  input  logic [R-1:0]   ref_i,
  output logic           err_o
);

  logic predicted;
  logic [R-1:0] v;

  assign predicted = ^data_i;
  assign v         = vec_i ^ ref_i;

  logic [2*T-1:0] group_err;

  for (genvar g = 0; g < 2 * T; g++) begin : g_grp
    assign group_err[g] = (^v[g*M +: M]) ^ predicted;
  end

  assign err_o = |group_err;

endmodule
