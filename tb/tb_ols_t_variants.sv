// tb_ols_t_variants: ols_ecc_top built as plain OLS codes with other
// correction capabilities: t = 1 with m = 4 (16 data bits, 8 check bits, the
// single-error-correcting code), t = 3 and t = 4 with m = 8 (64 data bits,
// 48 and 64 check bits). For each: the reference matrix has the OS-MLD
// structure (column weight 2t, pairwise overlap at most one), the encoder
// matches the reference, every random error of weight up to t is corrected
// with the right status, and errors of weight t+1 raise the uncorrectable
// flag at least once.
module tb_ols_t_variants;
  import ols_pkg::*;
  import ols_ref_pkg::*;

  localparam int NV = 3;
  localparam int MS [NV] = '{4, 8, 8};
  localparam int TS [NV] = '{1, 3, 4};
  localparam int TRIALS = 400;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  bit done [NV];

  for (genvar s = 0; s < NV; s++) begin : g_var
    localparam int M = MS[s];
    localparam int T = TS[s];
    localparam int K = data_bits(M, T, 1'b0);
    localparam int R = check_bits(M, T);
    localparam int N = K + R;

    logic [K-1:0] wr_data;
    logic [R-1:0] wr_check;
    logic         wr_ced_err;
    logic [K-1:0] rd_data_in;
    logic [R-1:0] rd_check_in;
    logic [K-1:0] rd_data;
    dec_status_t  rd_status;
    int           n_unc;

    ols_ecc_top #(.M(M), .T(T), .EXT(1'b0)) dut (
      .wr_data_i   (wr_data),
      .wr_check_o  (wr_check),
      .wr_ced_err_o(wr_ced_err),
      .rd_data_i   (rd_data_in),
      .rd_check_i  (rd_check_in),
      .rd_data_o   (rd_data),
      .rd_status_o (rd_status)
    );

    initial begin
      dvec_t dd;
      wr_data = '0;
      rd_data_in = '0;
      rd_check_in = '0;
      n_unc = 0;
      checks++;
      if (K != M * M || R != 2 * T * M || !ref_osmld_ok_t(M, T)) begin
        failures++;
        $display("FAIL m=%0d t=%0d: sizes %0d/%0d or matrix structure", M, T, K, R);
      end
      for (int n = 0; n < TRIALS; n++) begin
        logic [N-1:0] e;
        int w;
        for (int i = 0; i < K; i += 32) wr_data[i +: 32] = $urandom;
        #1;
        dd = '0;
        dd[K-1:0] = wr_data;
        checks++;
        if (wr_check !== R'(ref_encode_t(M, T, dd)) || wr_ced_err) begin
          failures++;
          $display("FAIL m=%0d t=%0d: encoder", M, T);
        end
        w = n % (T + 2);
        e = '0;
        while ($countones(e) < w) e[$urandom_range(N - 1)] = 1'b1;
        rd_data_in  = wr_data ^ e[K-1:0];
        rd_check_in = wr_check ^ e[N-1:K];
        #1;
        checks++;
        if (rd_status.ced_err || rd_status.err_detected !== (e != '0)) begin
          failures++;
          $display("FAIL m=%0d t=%0d: status %b for %0d errors", M, T, rd_status, w);
        end
        if (w <= T) begin
          checks++;
          if (rd_data !== wr_data || rd_status.corrected !== (e[K-1:0] != '0) ||
              rd_status.uncorrectable) begin
            failures++;
            $display("FAIL m=%0d t=%0d: %0d errors not corrected, status %b", M, T, w, rd_status);
          end
        end else if (rd_status.uncorrectable) n_unc++;
      end
      checks++;
      if (n_unc == 0) begin
        failures++;
        $display("FAIL m=%0d t=%0d: no t+1 error flagged", M, T);
      end
      $display("m=%0d t=%0d: %0d of %0d errors of weight t+1 flagged", M, T, n_unc, TRIALS / (T + 2));
      done[s] = 1'b1;
    end
  end

  initial begin
    for (int s = 0; s < NV; s++) done[s] = 1'b0;
    wait (done[0] && done[1] && done[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
