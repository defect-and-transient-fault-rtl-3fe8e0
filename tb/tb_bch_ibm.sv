// tb_bch_ibm: syndromes of random error patterns (S_j = sum of X_l^j over
// the error locations X_l = alpha^p_l) are fed to the Berlekamp-Massey
// unit; the result must have degree equal to the number of errors and
// vanish at every X_l^-1.  Also checks the run time (valid 2t edges after
// the start edge, seen here 2t+2 samples after start is raised) and that the
// result is held until taken.
`timescale 1ns/1ps
module tb_bch_ibm;
  import bch_pkg::*;
  import tb_gf_pkg::*;
  localparam int T_MAX = 57;
  logic clk = 0, rst_n = 0, start = 0, busy, valid, take = 0;
  logic [5:0] t = '0;
  gf_t synd [2*T_MAX];
  gf_t lambda [T_MAX+1];
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  bch_ibm #(.M(10), .T_MAX(T_MAX)) dut (.clk, .rst_n, .start, .synd, .t, .busy, .valid, .take, .lambda);
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int tv [6] = '{57, 57, 8, 33, 1, 0};
    int ne [6] = '{57, 20, 8, 0, 1, 0};
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (tv[c]) for (int rep = 0; rep < 3; rep++) begin
      int pos [$];
      int cyc, deg;
      logic [9:0] v, xi;
      pos = {};
      while (pos.size() < ne[c]) begin
        int p; p = $urandom_range(1022);
        if (!(p inside {pos})) pos.push_back(p);
      end
      for (int j = 1; j <= 2 * T_MAX; j++) begin
        logic [9:0] s; s = '0;
        foreach (pos[l]) s ^= apow(pos[l] * j);
        synd[j-1] = gf_t'(s);
      end
      t <= 6'(tv[c]); start <= 1; @(posedge clk); start <= 0;
      cyc = 1;
      while (!valid) begin @(posedge clk); cyc++; end
      check(cyc == 2 * tv[c] + 2, $sformatf("run time %0d for t=%0d", cyc, tv[c]));
      repeat (3) @(posedge clk);
      check(valid, "held");
      deg = 0;
      for (int i = 0; i <= T_MAX; i++) if (lambda[i] != 0) deg = i;
      check(deg == ne[c], $sformatf("degree %0d, errors %0d", deg, ne[c]));
      foreach (pos[l]) begin
        xi = apow(-pos[l]); v = '0;
        for (int i = T_MAX; i >= 0; i--) v = m10(v, xi) ^ lambda[i][9:0];
        check(v == 0, $sformatf("root of error %0d", pos[l]));
      end
      take <= 1; @(posedge clk); take <= 0; @(posedge clk);
      check(!busy, "idle after take");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
