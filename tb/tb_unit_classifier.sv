// tb_unit_classifier: random defect maps of three densities on 4096 cells,
// 32-cell units, GF(2^10) (threshold floor(32/10) = 3 defects); every
// unit's usable bit and the unusable count are compared with a direct
// count, and the scan must take one cycle per cell.
`timescale 1ns/1ps
module tb_unit_classifier;
  localparam int N = 4096, L_C = 32, NU = N / L_C;
  logic clk = 0, rst_n = 0, start = 0, busy, done, dm_defect, u_usable;
  logic [11:0] dm_addr;
  logic [6:0] u_addr = '0;
  logic [7:0] n_unusable;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string w); checks++; if (!c) begin failures++; $display("FAIL: %s", w); end endtask
  bit defmap [N];
  assign dm_defect = defmap[dm_addr];
  unit_classifier #(.N_CELLS(N), .L_C(L_C), .M(10)) dut (.clk, .rst_n, .start, .busy, .done, .dm_addr,
    .dm_defect, .u_addr, .u_usable, .n_unusable);
  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    int dens [3] = '{20, 100, 200};    // per mille
    repeat (2) @(posedge clk); rst_n = 1;
    foreach (dens[d]) begin
      int cyc, nbad;
      for (int a = 0; a < N; a++) defmap[a] = $urandom_range(999) < dens[d];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 1;
      while (!done) begin @(negedge clk); cyc++; end
      check(cyc == N + 1, $sformatf("scan cycles %0d", cyc));   // N cells + the start cycle
      nbad = 0;
      for (int u = 0; u < NU; u++) begin
        int c; c = 0;
        for (int k = 0; k < L_C; k++) c += defmap[u * L_C + k];
        u_addr = 7'(u); #1;
        check(u_usable == (c <= 3), $sformatf("unit %0d with %0d defects", u, c));
        nbad += (c > 3);
      end
      check(int'(n_unusable) == nbad, "unusable count");
      $display("density %0d/1000: %0d unusable units of %0d", dens[d], nbad, NU);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
