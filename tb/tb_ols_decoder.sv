// tb_ols_decoder: self-checking test of ols_decoder (m = 4, k = 20).
// Exhaustive over all single and double errors in the 36-bit word: data must
// come back intact, err_detected set, corrected set exactly when a data bit
// was hit, uncorrectable and ced_err clear. Random errors of weight 3 to 6
// are compared with the reference decoder bit for bit.
module tb_ols_decoder;
  import ols_pkg::*;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;
  localparam int N = K + R;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] data_in;
  logic [R-1:0] check_in;
  logic [K-1:0] data_out;
  dec_status_t  status;
  int checks = 0;
  int failures = 0;
  int n_unc = 0;
  int n_sdc = 0;

  ols_decoder dut (.data_i(data_in), .check_i(check_in), .data_o(data_out), .status_o(status));

  task automatic expect_bit(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: data=%h check=%h got=%b expected=%b", what, data_in, check_in, got, exp);
    end
  endtask

  task automatic expect_data(logic [K-1:0] exp, string what);
    checks++;
    if (data_out !== exp) begin
      failures++;
      $display("FAIL %s: data_out=%h expected=%h", what, data_out, exp);
    end
  endtask

  initial begin
    for (int i = -1; i < N; i++) begin
      for (int j = i; j < N; j++) begin
        logic [N-1:0] e;
        logic [K-1:0] d;
        logic [R-1:0] c;
        e = '0;
        if (i >= 0) e[i] = 1'b1;
        if (j >= 0) e[j] = 1'b1;
        d = K'({$urandom, $urandom});
        c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
        data_in  = d ^ e[K-1:0];
        check_in = c ^ e[N-1:K];
        #1;
        expect_data(d, "corrected data");
        expect_bit(status.err_detected, e != '0, "err_detected");
        expect_bit(status.corrected, e[K-1:0] != '0, "corrected");
        expect_bit(status.uncorrectable, 1'b0, "uncorrectable");
        expect_bit(status.ced_err, 1'b0, "ced_err");
      end
    end
    for (int n = 0; n < 2000; n++) begin
      logic [N-1:0] e;
      logic [K-1:0] d;
      logic [R-1:0] c;
      dvec_t dd;
      cvec_t cc;
      ref_dec_t r;
      e = '0;
      while ($countones(e) < 3 + n % 4) e[$urandom_range(N - 1)] = 1'b1;
      d = K'({$urandom, $urandom});
      c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
      data_in  = d ^ e[K-1:0];
      check_in = c ^ e[N-1:K];
      dd = '0; dd[K-1:0] = data_in;
      cc = '0; cc[R-1:0] = check_in;
      r = ref_decode(M, 1'b1, dd, cc);
      #1;
      expect_data(r.data[K-1:0], "heavy error data");
      expect_bit(status.err_detected, r.det, "heavy err_detected");
      expect_bit(status.corrected, r.corr, "heavy corrected");
      expect_bit(status.uncorrectable, r.unc, "heavy uncorrectable");
      expect_bit(status.ced_err, 1'b0, "heavy ced_err");
      if (status.uncorrectable) n_unc++;
      else if (data_out != d) n_sdc++;
    end
    $display("heavy errors: %0d of 2000 flagged, %0d silently wrong", n_unc, n_sdc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
