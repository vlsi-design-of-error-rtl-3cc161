// tb_ols_syndrome: self-checking test of ols_syndrome (m = 4, k = 20).
// The syndrome must be zero for every valid codeword, equal the error bits for
// check-bit errors, equal a data bit's column for a data-bit error, and match
// the reference model for random (data, check) pairs.
module tb_ols_syndrome;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] data;
  logic [R-1:0] check;
  logic [R-1:0] syn;
  int checks = 0;
  int failures = 0;

  ols_syndrome dut (.data_i(data), .check_i(check), .syn_o(syn));

  task automatic expect_syn(logic [R-1:0] exp, string what);
    checks++;
    if (syn !== exp) begin
      failures++;
      $display("FAIL %s: data=%h check=%h syn=%h expected=%h", what, data, check, syn, exp);
    end
  endtask

  initial begin
    for (int n = 0; n < 200; n++) begin
      logic [K-1:0] d;
      logic [R-1:0] c;
      d = K'({$urandom, $urandom});
      c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
      data = d; check = c;
      #1 expect_syn('0, "valid codeword");
      for (int r = 0; r < R; r += 5) begin
        check = c ^ (R'(1) << r);
        #1 expect_syn(R'(1) << r, "check-bit error");
      end
      check = c;
      for (int i = 0; i < K; i += 3) begin
        data = d ^ (K'(1) << i);
        #1 expect_syn(R'(ref_col(M, i)), "data-bit error");
      end
      data = K'({$urandom, $urandom});
      check = R'($urandom);
      #1 expect_syn(R'(ref_encode(M, 1'b1, dvec_t'(data))) ^ check, "random");
    end
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
