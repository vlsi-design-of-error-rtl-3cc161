// tb_ols_multi_err_detect: self-checking test of ols_multi_err_detect
// (m = 4, k = 20). For random error patterns of weight 0 to 5 the syndrome and
// the vote are formed by the reference model; the flag must be clear for
// weights up to two and equal the reference weight test for heavier ones.
// Hand-built cases: three check-bit errors in three groups raise the flag.
module tb_ols_multi_err_detect;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;
  localparam int N = K + R;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [R-1:0] syn;
  logic [K-1:0] flip;
  logic         uncorr;
  int checks = 0;
  int failures = 0;
  int flagged [6];

  ols_multi_err_detect dut (.syn_i(syn), .flip_i(flip), .uncorr_o(uncorr));

  initial begin
    for (int w = 0; w < 6; w++) flagged[w] = 0;
    for (int n = 0; n < 3000; n++) begin
      int w;
      logic [N-1:0] e;
      logic [K-1:0] d;
      logic [R-1:0] c;
      ref_dec_t r;
      w = n % 6;
      e = '0;
      while ($countones(e) < w) e[$urandom_range(N - 1)] = 1'b1;
      d = K'({$urandom, $urandom});
      c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
      r = ref_decode(M, 1'b1, dvec_t'(d ^ e[K-1:0]), cvec_t'(c ^ e[N-1:K]));
      syn  = R'(ref_encode(M, 1'b1, dvec_t'(d ^ e[K-1:0]))) ^ c ^ e[N-1:K];
      flip = r.data[K-1:0] ^ d ^ e[K-1:0];
      #1;
      checks++;
      if (uncorr !== r.unc || (w <= 2 && uncorr)) begin
        failures++;
        $display("FAIL weight %0d: e=%h uncorr=%b expected=%b", w, e, uncorr, r.unc);
      end
      if (uncorr) flagged[w]++;
    end
    // Check bits 0 (group 0), 5 (group 1) and 10 (group 2): data bit (0,1)?
    // No data bit owns all three, so no vote fires and the weight is three.
    syn = 16'h0421; flip = '0; #1;
    checks++;
    if (uncorr !== 1'b1) begin failures++; $display("FAIL three check errors"); end
    // One data bit flipped and nothing left over: weight one.
    syn = R'(ref_col(M, 7)); flip = K'(1) << 7; #1;
    checks++;
    if (uncorr !== 1'b0) begin failures++; $display("FAIL single data error"); end
    for (int w = 3; w < 6; w++) $display("weight %0d: %0d of 500 flagged", w, flagged[w]);
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
