// tb_bch_chien: the error locator Lambda(x) = prod (1 + X_l x) of chosen
// error positions is built here and handed to the Chien search with the
// beta of the word length; with an all-zero buffered word every output bit
// must be 1 exactly at the error positions, the word must last n cycles
// (with output stalls) and `fail` must stay low.  A locator with a root
// outside the shortened word must raise `fail`.
`timescale 1ns/1ps
module tb_bch_chien;
  import bch_pkg::*;
  import tb_gf_pkg::*;
  localparam int T_MAX = 57;
  logic clk = 0, rst_n = 0, start = 0, busy, out_valid, out_ready = 1, out_bit, out_err, out_last, fail;
  gf_t lambda [T_MAX+1];
  gf_t beta;
  logic [9:0] n_len;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bch_chien #(.M(10), .T_MAX(T_MAX), .N_MAX(1023)) dut (.clk, .rst_n, .start, .lambda, .beta, .n_len, .busy,
    .fifo_bit(1'b0), .out_valid, .out_ready, .out_bit, .out_err, .out_last, .fail);
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  task automatic run(int n, int pos [$], bit expect_fail);
    logic [9:0] l [T_MAX+1];
    int p, got_fail, ones;
    got_fail = 0; ones = 0;
    for (int i = 0; i <= T_MAX; i++) l[i] = (i == 0);
    foreach (pos[k]) begin          // multiply by (1 + alpha^pos x)
      for (int i = T_MAX; i > 0; i--) l[i] = l[i] ^ m10(l[i-1], apow(pos[k]));
    end
    for (int i = 0; i <= T_MAX; i++) lambda[i] = gf_t'(l[i]);
    beta = gf_t'(apow(-(n - 1)));
    n_len = 10'(n);
    start <= 1; @(posedge clk); start <= 0;
    p = n - 1;
    while (p >= 0) begin
      out_ready <= ($urandom_range(3) != 0);
      @(negedge clk);
      if (out_valid && out_ready) begin
        if (!expect_fail) check(out_bit == (p inside {pos}), $sformatf("position %0d", p));
        ones += out_bit;
        check(out_last == (p == 0), "last");
        if (out_last) got_fail = fail;
        p--;
      end
      @(posedge clk);
    end
    out_ready <= 1;
    @(posedge clk);
    check(!busy, "idle");
    check(got_fail == expect_fail, $sformatf("fail flag %0d", got_fail));
    if (!expect_fail) check(ones == pos.size(), "corrections");
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(1023, '{0, 5, 1022, 400}, 0);
    run(600, '{599, 0, 17, 18, 19}, 0);
    run(100, '{}, 0);
    begin
      int many [$];
      for (int i = 0; i < 57; i++) many.push_back(i * 13);
      run(800, many, 0);
    end
    run(600, '{3, 700}, 1);        // root beyond the shortened word
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
