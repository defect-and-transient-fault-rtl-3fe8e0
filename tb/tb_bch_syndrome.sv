// tb_bch_syndrome: random words of several lengths; every S_j, j=1..2t_max,
// must equal r(alpha^j) evaluated with the reference field arithmetic, and
// beta must equal alpha^-(n-1).
`timescale 1ns/1ps
module tb_bch_syndrome;
  import bch_pkg::*;
  import tb_gf_pkg::*;
  localparam int T_MAX = 57;
  logic clk = 0, rst_n = 0, in_valid = 0, in_bit = 0, first = 0, last = 0, done;
  gf_t synd [2*T_MAX];
  gf_t beta;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bch_syndrome #(.M(10), .T_MAX(T_MAX)) dut (.clk, .rst_n, .in_valid, .in_bit, .first, .last, .synd, .beta, .done);
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int lens [4] = '{1023, 600, 77, 1};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (lens[w]) begin
      bit bits [$];
      bits = {};
      for (int i = 0; i < lens[w]; i++) bits.push_back(1'($urandom));
      for (int i = 0; i < lens[w]; i++) begin
        in_valid <= 1; in_bit <= bits[i]; first <= (i == 0); last <= (i == lens[w] - 1);
        @(posedge clk);
        if ($urandom_range(3) == 0) begin in_valid <= 0; @(posedge clk); end
      end
      in_valid <= 0; first <= 0; last <= 0;
      @(posedge clk);
      check(done == 1'b1, "done pulse");
      for (int j = 1; j <= 2 * T_MAX; j++) begin
        logic [9:0] aj, acc;
        aj = apow(j); acc = '0;
        foreach (bits[i]) acc = m10(acc, aj) ^ 10'(bits[i]);
        check(synd[j-1][9:0] == acc && synd[j-1][12:10] == 0, $sformatf("S_%0d len %0d", j, lens[w]));
      end
      check(beta[9:0] == apow(-(lens[w] - 1)), "beta");
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
