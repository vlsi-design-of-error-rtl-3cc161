// tb_ols_ecc_top: end-to-end test of ols_ecc_top at its default size
// (extended code, m = 4: 20 data bits + 16 check bits).
// Each transaction encodes a random word on the write side, models the store
// with an injected error pattern, and reads it back through the decoder.
// Mechanisms counted, each must occur: clean read, single and double data
// corrections, check-bit-only errors (detected, nothing to correct), errors
// of three or more bits flagged uncorrectable, an encoder fault caught by its
// parity prediction and a syndrome-logic fault caught by its own (both
// injected with force on internal nets).
module tb_ols_ecc_top;
  import ols_pkg::*;
  import ols_ref_pkg::*;

  localparam int K = 20;
  localparam int R = 16;
  localparam int N = K + R;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [K-1:0] wr_data;
  logic [R-1:0] wr_check;
  logic         wr_ced_err;
  logic [K-1:0] rd_data_in;
  logic [R-1:0] rd_check_in;
  logic [K-1:0] rd_data;
  dec_status_t  rd_status;

  logic bad_bit;
  int checks = 0;
  int failures = 0;
  int n_clean = 0, n_single = 0, n_double = 0, n_chk_only = 0;
  int n_unc = 0, n_enc_ced = 0, n_syn_ced = 0;

  ols_ecc_top dut (
    .wr_data_i  (wr_data),
    .wr_check_o (wr_check),
    .wr_ced_err_o(wr_ced_err),
    .rd_data_i  (rd_data_in),
    .rd_check_i (rd_check_in),
    .rd_data_o  (rd_data),
    .rd_status_o(rd_status)
  );

  task automatic fail(string what);
    failures++;
    $display("FAIL %s: wr=%h rd=%h/%h out=%h status=%b", what, wr_data, rd_data_in,
             rd_check_in, rd_data, rd_status);
  endtask

  // One write, store with error mask e, read back; checks against the
  // reference model and, for up to two errors, against the written data.
  task automatic transact(logic [N-1:0] e);
    dvec_t dd;
    cvec_t cc;
    ref_dec_t r;
    int w;
    w = $countones(e);
    wr_data = K'({$urandom, $urandom});
    @(posedge clk);
    checks++;
    if (wr_check !== R'(ref_encode(4, 1'b1, dvec_t'(wr_data)))) fail("encoder");
    checks++;
    if (wr_ced_err) fail("false encoder CED alarm");
    rd_data_in  = wr_data ^ e[K-1:0];
    rd_check_in = wr_check ^ e[N-1:K];
    @(posedge clk);
    dd = '0; dd[K-1:0] = rd_data_in;
    cc = '0; cc[R-1:0] = rd_check_in;
    r = ref_decode(4, 1'b1, dd, cc);
    checks++;
    if (rd_data !== r.data[K-1:0] || rd_status.err_detected !== r.det ||
        rd_status.corrected !== r.corr || rd_status.uncorrectable !== r.unc ||
        rd_status.ced_err)
      fail("decoder against reference");
    if (w <= 2) begin
      checks++;
      if (rd_data !== wr_data || rd_status.uncorrectable) fail("correctable error");
      if (w == 0) n_clean++;
      else if ($countones(e[K-1:0]) == 0) n_chk_only++;
      else if ($countones(e[K-1:0]) == 1 && w == 1) n_single++;
      else if (w == 2 && e[K-1:0] != '0) n_double++;
    end else if (rd_status.uncorrectable) n_unc++;
  endtask

  function automatic logic [N-1:0] rand_err(int w);
    logic [N-1:0] e = '0;
    while ($countones(e) < w) e[$urandom_range(N - 1)] = 1'b1;
    return e;
  endfunction

  initial begin
    rd_data_in = '0;
    rd_check_in = '0;
    wr_data = '0;
    for (int n = 0; n < 3000; n++) transact(rand_err(n % 5));

    // Encoder fault: one check bit stuck at the wrong value.
    wr_data = K'({$urandom, $urandom});
    @(posedge clk);
    bad_bit = ~wr_check[5];
    force dut.u_enc.check_o[5] = bad_bit;
    @(posedge clk);
    checks++;
    if (!wr_ced_err) fail("encoder fault not caught");
    else n_enc_ced++;
    release dut.u_enc.check_o[5];
    @(posedge clk);
    checks++;
    if (wr_ced_err) fail("encoder CED alarm after release");

    // Syndrome-logic fault: one syndrome bit inverted.
    rd_data_in  = wr_data;
    rd_check_in = wr_check;
    @(posedge clk);
    force dut.u_dec.syn[9] = 1'b1;
    @(posedge clk);
    checks++;
    if (!rd_status.ced_err) fail("syndrome fault not caught");
    else n_syn_ced++;
    release dut.u_dec.syn[9];
    @(posedge clk);
    checks++;
    if (rd_status.ced_err || rd_data !== wr_data) fail("after syndrome fault release");

    $display("clean=%0d single=%0d double=%0d check_only=%0d uncorrectable=%0d enc_ced=%0d syn_ced=%0d",
             n_clean, n_single, n_double, n_chk_only, n_unc, n_enc_ced, n_syn_ced);
    if (n_clean == 0)    begin failures++; $display("FAIL no clean read"); end
    if (n_single == 0)   begin failures++; $display("FAIL no single correction"); end
    if (n_double == 0)   begin failures++; $display("FAIL no double correction"); end
    if (n_chk_only == 0) begin failures++; $display("FAIL no check-bit-only error"); end
    if (n_unc == 0)      begin failures++; $display("FAIL no uncorrectable flag"); end
    if (n_enc_ced == 0)  begin failures++; $display("FAIL no encoder CED alarm"); end
    if (n_syn_ced == 0)  begin failures++; $display("FAIL no syndrome CED alarm"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
