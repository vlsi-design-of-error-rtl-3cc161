// ols_mld_corrector: one-step majority-logic (OS-MLD) correction.
//
// For every data bit the 2t syndrome bits of the check equations it takes
// part in are counted (4 for the default t = 2). Because any other bit shares
// at most one of those equations, up to t errors leave the count of an
// erroneous data bit at t+1 or more and that of a correct data bit at t or
// less. The bit is flipped when the count reaches t+1 (3 of 4 for t = 2).
//
// Interface: data_i (K) and syn_i (R) in; data_o (K, corrected) and flip_o
// (K, one bit per corrected data bit) out. Combinational; check bits are not
// corrected, only data bits, as in the described decoder.
module ols_mld_corrector
  import ols_pkg::*;
#(
  parameter int unsigned M   = 4,
  parameter int unsigned T   = 2,
  parameter bit          EXT = 1'b1,
  localparam int unsigned K = data_bits(M, T, EXT),
  localparam int unsigned R = check_bits(M, T)
) (
  input  logic [K-1:0] data_i,
  input  logic [R-1:0] syn_i,
  output logic [K-1:0] data_o,
  output logic [K-1:0] flip_o
);

  localparam int unsigned VW = $clog2(2 * T + 1);

  for (genvar c = 0; c < K; c++) begin : g_vote
    logic [2*T-1:0] sel;
    logic [VW-1:0]  votes;
    for (genvar j = 0; j < 2 * T; j++) begin : g_in
      localparam int unsigned IDX = chk_idx(M, c, j);
      assign sel[j] = syn_i[IDX];
    end
    assign votes     = VW'($countones(sel));
    assign flip_o[c] = (votes >= VW'(T + 1));
  end

  assign data_o = data_i ^ flip_o;

endmodule
