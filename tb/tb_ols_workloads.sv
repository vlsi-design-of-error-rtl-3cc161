// tb_ols_workloads: runs the extended code sizes beyond the default one
// through ols_ecc_top: m = 8 (72 data bits, 32 check bits) and m = 16 (336 data
// bits, 64 check bits). m = 32 (1312 data bits, 128 check bits) passes the
// same test when 32 and 1312 are added to MS/KS and the wait below extended,
// but its C++ build can take over ten minutes, so it is left out by default.
// For each size: the data width the top elaborates to, the OS-MLD structure
// of the reference matrix (m = 8 and 16), the encoder against the reference,
// and correction of random single and double errors anywhere in the word
// with the status flags as expected. Each size runs in its own process; the
// result line is printed when all are done.
module tb_ols_workloads;
  import ols_pkg::*;
  import ols_ref_pkg::*;

  localparam int NSIZES = 2;
  localparam int MS [NSIZES] = '{8, 16};
  localparam int KS [NSIZES] = '{72, 336};
  localparam int TRIALS = 200;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  bit done [NSIZES];

  for (genvar s = 0; s < NSIZES; s++) begin : g_size
    localparam int M = MS[s];
    localparam int K = data_bits(M, 2, 1'b1);
    localparam int R = check_bits(M, 2);
    localparam int N = K + R;

    logic [K-1:0] wr_data;
    logic [R-1:0] wr_check;
    logic         wr_ced_err;
    logic [K-1:0] rd_data_in;
    logic [R-1:0] rd_check_in;
    logic [K-1:0] rd_data;
    dec_status_t  rd_status;

    ols_ecc_top #(.M(M), .EXT(1'b1)) dut (
      .wr_data_i   (wr_data),
      .wr_check_o  (wr_check),
      .wr_ced_err_o(wr_ced_err),
      .rd_data_i   (rd_data_in),
      .rd_check_i  (rd_check_in),
      .rd_data_o   (rd_data),
      .rd_status_o (rd_status)
    );

    function automatic logic [K-1:0] rand_data();
      logic [K-1:0] v;
      for (int i = 0; i < K; i += 32) v[i +: 32] = $urandom;
      return v;
    endfunction

    initial begin
      dvec_t dd;
      wr_data = '0;
      rd_data_in = '0;
      rd_check_in = '0;
      checks++;
      if (K != KS[s]) begin
        failures++;
        $display("FAIL m=%0d: k=%0d, expected %0d", M, K, KS[s]);
      end
      if (M <= 16) begin
        checks++;
        if (!ref_osmld_ok(M, 1'b1)) begin
          failures++;
          $display("FAIL m=%0d: reference matrix lacks OS-MLD property", M);
        end
      end
      for (int n = 0; n < TRIALS; n++) begin
        int i;
        int j;
        logic [N-1:0] e;
        wr_data = rand_data();
        #1;
        dd = '0;
        dd[K-1:0] = wr_data;
        checks++;
        if (wr_check !== R'(ref_encode(M, 1'b1, dd)) || wr_ced_err) begin
          failures++;
          $display("FAIL m=%0d: encoder", M);
        end
        e = '0;
        i = $urandom_range(N - 1);
        j = $urandom_range(N - 1);
        if (n % 3 != 0) e[i] = 1'b1;
        if (n % 3 == 2) e[j] = 1'b1;
        rd_data_in  = wr_data ^ e[K-1:0];
        rd_check_in = wr_check ^ e[N-1:K];
        #1;
        checks++;
        if (rd_data !== wr_data || rd_status.err_detected !== (e != '0) ||
            rd_status.corrected !== (e[K-1:0] != '0) || rd_status.uncorrectable ||
            rd_status.ced_err) begin
          failures++;
          $display("FAIL m=%0d: decode with errors at %0d,%0d status=%b", M, i, j, rd_status);
        end
      end
      done[s] = 1'b1;
    end
  end

  initial begin
    for (int s = 0; s < NSIZES; s++) done[s] = 1'b0;
    wait (done[0] && done[1]);
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
