// tb_ols_encoder: self-checking test of ols_encoder for the default extended
// code (m = 4, k = 20, 16 check bits).
// Checks: the reference matrix has the OS-MLD structure; a few check-bit
// patterns written out by hand from the matrix definition; every unit data
// vector and 500 random words against the reference model.
module tb_ols_encoder;
  import ols_ref_pkg::*;

  localparam int M = 4;
  localparam int K = 20;
  localparam int R = 16;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] data;
  logic [R-1:0] check;
  int checks = 0;
  int failures = 0;

  ols_encoder dut (.data_i(data), .check_o(check));

  task automatic expect_check(logic [R-1:0] exp, string what);
    checks++;
    if (check !== exp) begin
      failures++;
      $display("FAIL %s: data=%h check=%h expected=%h", what, data, check, exp);
    end
  endtask

  initial begin
    checks++;
    if (!ref_osmld_ok(M, 1'b1)) begin
      failures++;
      $display("FAIL reference matrix lacks the OS-MLD property");
    end
    // Hand-worked columns: bit 0 (a=0,b=0) -> checks 0,4,8,12;
    // bit 6 (a=1,b=2): 1, 4+2, 8+(1^2)=11, 12+(1^alpha*2=3)=14;
    // bit 17 (extension, group 1) -> checks 4..7.
    data = 20'd1 << 0;  #1 expect_check(16'h1111, "bit0");
    data = 20'd1 << 6;  #1 expect_check(16'h4842, "bit6");
    data = 20'd1 << 17; #1 expect_check(16'h00F0, "bit17");
    data = '0;          #1 expect_check(16'h0000, "zero");
    for (int i = 0; i < K; i++) begin
      data = K'(1) << i;
      #1 expect_check(R'(ref_encode(M, 1'b1, dvec_t'(data))), "unit");
    end
    for (int n = 0; n < 500; n++) begin
      data = K'({$urandom, $urandom});
      #1 expect_check(R'(ref_encode(M, 1'b1, dvec_t'(data))), "random");
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
