// tb_ols_mld_corrector: self-checking test of ols_mld_corrector (m = 4, k = 20).
// With the syndrome of up to two errors the corrector must restore the data
// and flip exactly the data bits in error; for arbitrary syndromes each flip
// must equal "three or more of the bit's four syndrome bits set".
module tb_ols_mld_corrector;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;
  localparam int N = K + R;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] data_in;
  logic [R-1:0] syn;
  logic [K-1:0] data_out;
  logic [K-1:0] flip;
  int checks = 0;
  int failures = 0;

  ols_mld_corrector dut (.data_i(data_in), .syn_i(syn), .data_o(data_out), .flip_o(flip));

  task automatic check_eq(logic [K-1:0] got, logic [K-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: syn=%h got=%h expected=%h", what, syn, got, exp);
    end
  endtask

  initial begin
    // Every single error and every pair of errors over the 36-bit word.
    for (int i = 0; i < N; i++) begin
      for (int j = i; j < N; j++) begin
        logic [N-1:0] e;
        logic [K-1:0] d;
        logic [R-1:0] c;
        e = (N'(1) << i) | (N'(1) << j);
        d = K'({$urandom, $urandom});
        c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
        data_in = d ^ e[K-1:0];
        syn = R'(ref_encode(M, 1'b1, dvec_t'(data_in))) ^ (c ^ e[N-1:K]);
        #1;
        check_eq(data_out, d, "corrected data");
        check_eq(flip, e[K-1:0], "flip mask");
      end
    end
    // Arbitrary syndromes.
    for (int n = 0; n < 300; n++) begin
      logic [K-1:0] exp;
      data_in = K'({$urandom, $urandom});
      syn = R'($urandom);
      for (int c = 0; c < K; c++) exp[c] = ($countones(R'(ref_col(M, c)) & syn) >= 3);
      #1;
      check_eq(flip, exp, "vote");
      check_eq(data_out, data_in ^ exp, "data");
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
