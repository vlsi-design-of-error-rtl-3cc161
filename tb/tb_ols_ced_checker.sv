// tb_ols_ced_checker: self-checking test of ols_ced_checker (m = 4).
// Encoder use (ref = 0): silent on every valid check word, alarm when any
// single check bit is wrong or two wrong bits lie in different groups, silent
// for two wrong bits in one group (even parity change, by construction).
// Syndrome use (vec = syndrome, ref = received check): silent for any received
// word, correct or not, as long as the syndrome is right; alarm when one
// syndrome bit is wrong.
module tb_ols_ced_checker;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [M*M-1:0] data;
  logic [R-1:0]   vec;
  logic [R-1:0]   refv;
  logic           err;
  int checks = 0;
  int failures = 0;

  ols_ced_checker dut (.data_i(data), .vec_i(vec), .ref_i(refv), .err_o(err));

  task automatic expect_err(logic exp, string what);
    checks++;
    if (err !== exp) begin
      failures++;
      $display("FAIL %s: data=%h vec=%h ref=%h err=%b", what, data, vec, refv, err);
    end
  endtask

  initial begin
    for (int n = 0; n < 300; n++) begin
      logic [K-1:0] d;
      logic [R-1:0] c;
      int i;
      int j;
      d = K'({$urandom, $urandom});
      c = R'(ref_encode(M, 1'b1, dvec_t'(d)));
      data = d[M*M-1:0];
      refv = '0;
      vec = c;                         #1 expect_err(1'b0, "valid encoder output");
      i = $urandom_range(R - 1);
      vec = c ^ (R'(1) << i);          #1 expect_err(1'b1, "one wrong check bit");
      j = (i / M) * M + ((i % M) + 1) % M;
      vec = c ^ (R'(1) << i) ^ (R'(1) << j);
      #1 expect_err(1'b0, "two wrong bits in one group");
      j = (i + M) % R;
      vec = c ^ (R'(1) << i) ^ (R'(1) << j);
      #1 expect_err(1'b1, "two wrong bits in two groups");
      // syndrome use on a received word with random errors
      begin
        logic [K-1:0] dr;
        logic [R-1:0] cr;
        logic [R-1:0] s;
        dr = d ^ K'($urandom) & K'($urandom) & K'($urandom);
        cr = c ^ R'($urandom) & R'($urandom);
        s  = R'(ref_encode(M, 1'b1, dvec_t'(dr))) ^ cr;
        data = dr[M*M-1:0];
        refv = cr;
        vec = s;                       #1 expect_err(1'b0, "right syndrome");
        vec = s ^ (R'(1) << i);        #1 expect_err(1'b1, "wrong syndrome bit");
      end
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
